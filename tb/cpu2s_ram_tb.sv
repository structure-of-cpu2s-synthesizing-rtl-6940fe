// cpu2s_ram_tb: self-checking test of the 32x16 RAM.
// Checks the initial image (the first example program and data segment),
// then random reads and writes against a reference array kept here: a
// write happens only on a rising edge with mio and mwe high, a read is
// combinational with mio high and mwe low, and data_out is zero otherwise.
module cpu2s_ram_tb;
  import cpu2s_pkg::*;
  logic clk = 0, mio, mwe;
  logic [4:0] addr;
  word_t din, dout;
  word_t model [32];
  int checks = 0, failures = 0;

  // Expected start image, written out independently of the package.
  localparam logic [15:0] EXPECT_INIT [32] = '{
    16'h8000, 16'h2011, 16'h9000, 16'h7000, 16'h0, 16'h0, 16'h0, 16'h0,
    16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0,
    16'h0002, 16'h0003, 16'h0004, 16'h0005, 16'h0001, 16'h0001, 16'h0002, 16'h0006,
    16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0};

  cpu2s_ram dut (.clk, .mio, .mwe, .addr, .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%0h: got %h expected %h", what, addr, got, exp);
    end
  endtask

  initial begin
    mio = 0; mwe = 0; addr = 0; din = 0;
    foreach (model[i]) model[i] = EXPECT_INIT[i];
    // initial contents, combinational read
    for (int i = 0; i < 32; i++) begin
      mio = 1; mwe = 0; addr = 5'(i);
      #1 check("initial image", dout, model[i]);
    end
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      mio  = 1'($urandom);
      mwe  = 1'($urandom);
      addr = 5'($urandom);
      din  = 16'($urandom);
      #1;
      if (mio && !mwe) check("read", dout, model[addr]);
      else             check("idle output", dout, 16'h0000);
      @(posedge clk);
      if (mio && mwe) model[addr] = din;
      @(negedge clk);
    end
    // final sweep
    for (int i = 0; i < 32; i++) begin
      mio = 1; mwe = 0; addr = 5'(i);
      #1 check("final image", dout, model[i]);
    end
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
