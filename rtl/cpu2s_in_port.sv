// cpu2s_in_port: 16-bit input port (InPt) of the CPU2S.
//
// Not a register: a row of AND gates. While the output enable `oe_ip`
// (oeIP) is high the external `data_in` appears on `data_out`, which feeds
// muxC and from there dbus1; otherwise `data_out` is all zeros. This is the
// document's behaviour. No clock, no latency.
//
// Ports: oe_ip, data_in (pins), data_out (to muxC).
module cpu2s_in_port #(
  parameter int WIDTH = 16
) (
  input  logic             oe_ip,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);

  always_comb data_out = oe_ip ? data_in : '0;

endmodule
