// cpu2s_tb: end-to-end test of the CPU2S at its default configuration.
// The RAM holds the first example program (IN; ADD 11; OUT; HLT) and the
// example data segment (RAM[11h] = 3). With a random word W on the input
// port the CPU must: step IP 0,1,2,3,4 loading 8000, 2011, 9000, 7000 into
// IR; put W into ACC; put W+3 into ACC; drive W+3 on the output port; halt.
// Each instruction takes a fetch and an execute cycle, so the CPU halts 8
// cycles after reset. The run is repeated for several input words, with
// reset in between (the program does not write the RAM). The testbench
// counts each mechanism it sees (instruction fetch, IN, ADD, OUT, HLT,
// zero flag set and clear) and fails for any never seen.
module cpu2s_tb;
  import cpu2s_pkg::*;
  logic  clk = 0, rst;
  word_t in_data, out_data, acc, ip, ir;
  logic  halted, fetch, zero;
  int checks = 0, failures = 0;
  int n_fetch = 0, n_in = 0, n_add = 0, n_out = 0, n_hlt = 0, n_zero_set = 0, n_zero_clr = 0;

  cpu2s dut (.clk, .rst, .in_data, .out_data, .halted, .fetch, .zero, .acc, .ip, .ir);

  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // The program and the datum it adds, written out here.
  localparam logic [15:0] PROG [4] = '{16'h8000, 16'h2011, 16'h9000, 16'h7000};
  localparam logic [15:0] DATA_11 = 16'h0003;

  task automatic run_once(logic [15:0] w);
    int cycles = 0;
    in_data = w;
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    check("IP after reset", ip, 16'd0);
    check("ACC after reset", acc, 16'd0);
    check("zero flag after reset", 16'(zero), 16'd1);
    if (zero) n_zero_set++;
    for (int k = 0; k < 4; k++) begin
      // fetch cycle
      check("fetch state", 16'(fetch), 16'd1);
      check("IP before fetch", ip, 16'(k));
      @(posedge clk); #1; cycles++;
      n_fetch++;
      check("IR after fetch", ir, PROG[k]);
      check("IP after fetch", ip, 16'(k + 1));
      // execute cycle
      @(posedge clk); #1; cycles++;
      case (k)
        0: begin check("ACC after IN", acc, w); n_in++; end
        1: begin check("ACC after ADD 11", acc, w + DATA_11); n_add++; end
        2: begin check("output after OUT", out_data, w + DATA_11); n_out++; end
        3: begin check("halted after HLT", 16'(halted), 16'd1); n_hlt++; end
        default: ;
      endcase
      if (k == 0 && w != 0) begin
        check("zero flag clear", 16'(zero), 16'd0);
        if (!zero) n_zero_clr++;
      end
      if (k < 2) check("output before OUT", out_data, 16'd0);
    end
    check("cycles to halt", 16'(cycles), 16'd8);
    // stays halted, nothing changes
    repeat (5) @(posedge clk);
    #1;
    check("still halted", 16'(halted), 16'd1);
    check("IP frozen", ip, 16'd4);
    check("output held", out_data, w + DATA_11);
    check("ACC held", acc, w + DATA_11);
  endtask

  initial begin
    rst = 1; in_data = '0;
    run_once(16'h0005);
    run_once(16'hfffe);      // wraps to 0001
    for (int i = 0; i < 8; i++) run_once(16'($urandom) | 16'h0100);
    checks++; if (n_fetch == 0)    begin failures++; $display("FAIL no fetch seen"); end
    checks++; if (n_in == 0)       begin failures++; $display("FAIL no IN seen"); end
    checks++; if (n_add == 0)      begin failures++; $display("FAIL no ADD seen"); end
    checks++; if (n_out == 0)      begin failures++; $display("FAIL no OUT seen"); end
    checks++; if (n_hlt == 0)      begin failures++; $display("FAIL no HLT seen"); end
    checks++; if (n_zero_set == 0) begin failures++; $display("FAIL zero flag never set"); end
    checks++; if (n_zero_clr == 0) begin failures++; $display("FAIL zero flag never clear"); end
    $display("mechanisms: fetch=%0d IN=%0d ADD=%0d OUT=%0d HLT=%0d zero_set=%0d zero_clear=%0d",
             n_fetch, n_in, n_add, n_out, n_hlt, n_zero_set, n_zero_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
