// cpu2s_in_port_tb: self-checking test of the gated input port.
// data_out must follow data_in while oe_ip is high and be zero otherwise.
module cpu2s_in_port_tb;
  localparam int W = 16;
  logic oe;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;

  cpu2s_in_port #(.WIDTH(W)) dut (.oe_ip(oe), .data_in(din), .data_out(dout));

  initial begin
    for (int i = 0; i < 300; i++) begin
      oe  = 1'($urandom);
      din = 16'($urandom) | 16'h0001;   // never all zero, so a gated output shows
      #1;
      checks++;
      if (dout !== (oe ? din : 16'h0000)) begin
        failures++;
        $display("FAIL oe=%b in=%h out=%h", oe, din, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
