// cpu2s_out_port_tb: self-checking test of the output port register.
// Random words on the input with random capture enables; the pins must
// show the last word captured on a rising edge with ie_op high, and zero
// after reset.
module cpu2s_out_port_tb;
  localparam int W = 16;
  logic clk = 0, rst, ie;
  logic [W-1:0] din, dout, model;
  int checks = 0, failures = 0;

  cpu2s_out_port #(.WIDTH(W)) dut (.clk, .rst, .ie_op(ie), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; ie = 1; din = 16'h1234;
    @(posedge clk); #1;
    check("reset", dout, '0);
    rst = 0; model = '0;
    for (int i = 0; i < 200; i++) begin
      ie  = ($urandom % 4) == 0;
      din = 16'($urandom);
      #2 check("hold before edge", dout, model);
      @(posedge clk); #1;
      if (ie) model = din;
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
