// cpu2s_out_port: 16-bit output port (OutPt) of the CPU2S.
//
// A latched port: on a rising clock edge with `ie_op` (ieOP) high the word on
// dbus2 (the accumulator) is captured, and `data_out` then holds it for the
// outside world until the next OUT instruction. Capturing on the rising edge
// follows the document. The synchronous reset to zero is this design's
// addition, so the pins are defined before the first OUT.
//
// Ports: clk, rst, ie_op, data_in (dbus2), data_out (pins).
module cpu2s_out_port #(
  parameter int WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ie_op,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);

  always_ff @(posedge clk) begin
    if (rst)        data_out <= '0;
    else if (ie_op) data_out <= data_in;
  end

endmodule
