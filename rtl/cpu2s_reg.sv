// cpu2s_reg: load-enabled register of the CPU2S (used for ACC, IR and IP).
//
// A bank of D flip-flops: on a rising clock edge with `ld` high, `data_in`
// is copied to `data_out`; with `ld` low the register keeps its value. The
// output changes only on a rising edge, one cycle after the inputs are
// presented. This follows the document's register. The synchronous,
// active-high reset to RESET_VAL is this design's addition, so that the
// instruction pointer starts at 0 and every register starts defined.
//
// Ports: clk, rst (sync, active high), ld (load enable), data_in, data_out.
module cpu2s_reg #(
  parameter int                WIDTH     = 16,
  parameter logic [WIDTH-1:0]  RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ld,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);

  always_ff @(posedge clk) begin
    if (rst)     data_out <= RESET_VAL;
    else if (ld) data_out <= data_in;
  end

endmodule
