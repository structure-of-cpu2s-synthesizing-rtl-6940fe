// cpu2s_mux2_tb: self-checking test of the two-input multiplexer.
// Random inputs and select; y must equal in1 when sel is high, else in0.
module cpu2s_mux2_tb;
  localparam int W = 16;
  logic sel;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  cpu2s_mux2 #(.WIDTH(W)) dut (.sel, .in0(a), .in1(b), .y);

  initial begin
    for (int i = 0; i < 300; i++) begin
      sel = 1'($urandom);
      a = 16'($urandom);
      b = 16'($urandom);
      #1;
      checks++;
      if (y !== (sel ? b : a)) begin
        failures++;
        $display("FAIL sel=%b in0=%h in1=%h y=%h", sel, a, b, y);
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
