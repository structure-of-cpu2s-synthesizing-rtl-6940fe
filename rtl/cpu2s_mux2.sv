// cpu2s_mux2: two-input multiplexer (muxA, muxB and muxC of the CPU2S).
//
// Purely combinational: `y` is `in1` when `sel` is high and `in0` when it is
// low. The document only says each mux picks one of two inputs on its select
// signal; which input a select value of 1 picks is this design's choice and
// is fixed by how the top connects the two inputs.
//
// Ports: sel, in0, in1, y. No clock; no latency.
module cpu2s_mux2 #(
  parameter int WIDTH = 16
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] y
);

  always_comb y = sel ? in1 : in0;

endmodule
