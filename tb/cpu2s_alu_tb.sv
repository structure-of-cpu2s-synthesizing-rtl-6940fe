// cpu2s_alu_tb: self-checking test of the ALU.
// Every function code, including the unused ones, with random operands plus
// corner values (zero, all ones, wrap-around); op and the zero flag are
// compared with results computed here from the function table.
module cpu2s_alu_tb;
  import cpu2s_pkg::*;
  logic [15:0] a, b, op;
  alu_fn_e     fn;
  logic        zero;
  logic [15:0] exp_op;
  int checks = 0, failures = 0;

  cpu2s_alu dut (.in_a(a), .in_b(b), .sel_alu_f(fn), .op, .zero);

  task automatic try(logic [2:0] f, logic [15:0] x, logic [15:0] y);
    fn = alu_fn_e'(f); a = x; b = y;
    #1;
    case (f)
      3'b001:  exp_op = y;
      3'b010:  exp_op = y + 16'd1;
      3'b011:  exp_op = x + y;
      3'b100:  exp_op = x - y;
      default: exp_op = 16'd0;
    endcase
    checks += 2;
    if (op !== exp_op) begin
      failures++;
      $display("FAIL op f=%b a=%h b=%h got %h expected %h", f, x, y, op, exp_op);
    end
    if (zero !== (x == 16'd0)) begin
      failures++;
      $display("FAIL zero a=%h got %b", x, zero);
    end
  endtask

  initial begin
    for (int f = 0; f < 8; f++) begin
      try(3'(f), 16'h0000, 16'h0000);
      try(3'(f), 16'hffff, 16'h0001);
      try(3'(f), 16'h0001, 16'hffff);
      try(3'(f), 16'h0000, 16'h1234);
      for (int i = 0; i < 50; i++) try(3'(f), 16'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
