// cpu2s_control_tb: self-checking test of the control unit.
// Feeds instruction words with every opcode value (and random address
// fields) and, for the fetch and the execute cycle of each, compares the
// control word with the signal table written out here. Also checks that
// HLT stops the sequence until reset and that reset returns to fetch.
module cpu2s_control_tb;
  import cpu2s_pkg::*;
  logic  clk = 0, rst, halted, fetch;
  word_t ir;
  ctrl_t ctrl, exp;
  int checks = 0, failures = 0;

  cpu2s_control dut (.clk, .rst, .ir, .ctrl, .halted, .fetch);

  always #5 clk = ~clk;

  // Expected control word: {muxA, muxB, muxC, alu, ldACC, ldIP, ldIR, mio, mwe, oeIP, ieOP}
  function automatic ctrl_t expect_exec(logic [3:0] opc);
    ctrl_t c = '0;
    c.sel_alu_f = ALU_ZERO;
    c.sel_mux_a = 1'b1;
    case (opc)
      4'h0: begin c.mio = 1; c.sel_alu_f = ALU_PASS; c.ld_acc = 1; end
      4'h2: begin c.mio = 1; c.sel_alu_f = ALU_ADD;  c.ld_acc = 1; end
      4'h1: begin c.mio = 1; c.mwe = 1; end
      4'h8: begin c.oe_ip = 1; c.sel_mux_c = 1; c.sel_alu_f = ALU_PASS; c.ld_acc = 1; end
      4'h9: c.ie_op = 1;
      4'h4: begin c.sel_mux_b = 1; c.sel_alu_f = ALU_PASS; c.ld_ip = 1; end
      default: ;
    endcase
    return c;
  endfunction

  function automatic ctrl_t expect_fetch();
    ctrl_t c = '0;
    c.mio = 1; c.ld_ir = 1; c.sel_mux_b = 1; c.sel_alu_f = ALU_INC; c.ld_ip = 1;
    return c;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: ir=%h ctrl=%h expected=%h halted=%b fetch=%b", what, ir, ctrl, exp, halted, fetch);
    end
  endtask

  initial begin
    rst = 1; ir = '0;
    @(posedge clk); #1;
    rst = 0;
    for (int rep = 0; rep < 4; rep++) begin
      for (int o = 0; o < 16; o++) begin
        if (o == 7) continue;                  // HLT tested below
        // fetch cycle
        ir = 16'($urandom);                    // old IR content must not matter
        exp = expect_fetch();
        #1 check("fetch", ctrl == exp && fetch && !halted);
        @(posedge clk); #1;
        // execute cycle with the new instruction
        ir = {4'(o), 12'($urandom)};
        exp = expect_exec(4'(o));
        #1 check("execute", ctrl == exp && !fetch && !halted);
        @(posedge clk); #1;
      end
    end
    // HLT: fetch, execute, then halted with all loads off
    exp = expect_fetch();
    check("fetch before HLT", ctrl == exp && fetch);
    @(posedge clk); #1;
    ir = 16'h7000;
    exp = '0;
    exp.sel_mux_a = 1'b1;
    check("execute HLT", ctrl == exp && !halted);
    @(posedge clk); #1;
    for (int i = 0; i < 5; i++) begin
      ir = 16'($urandom);
      exp = '0;
      check("halted", ctrl == exp && halted && !fetch);
      @(posedge clk); #1;
    end
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    exp = expect_fetch();
    check("fetch after reset", ctrl == exp && fetch && !halted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
