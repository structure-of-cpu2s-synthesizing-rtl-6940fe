// cpu2s_reg_tb: self-checking test of the load-enabled register.
// Drives random words with random load enables and compares the output
// after every rising edge with a reference copy kept in the testbench;
// also checks reset and that the output does not change between edges.
module cpu2s_reg_tb;
  localparam int W = 16;
  logic clk = 0, rst, ld;
  logic [W-1:0] din, dout, model;
  int checks = 0, failures = 0;

  cpu2s_reg #(.WIDTH(W), .RESET_VAL(16'h0000)) dut (
    .clk, .rst, .ld, .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; ld = 0; din = 16'hffff;
    @(posedge clk); #1;
    check("reset", dout, '0);
    model = '0;
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      ld  = 1'($urandom);
      din = 16'($urandom);
      #2 check("hold before edge", dout, model);
      @(posedge clk); #1;
      if (ld) model = din;
      check("after edge", dout, model);
    end
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
