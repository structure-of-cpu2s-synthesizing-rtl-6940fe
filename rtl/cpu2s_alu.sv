// cpu2s_alu: arithmetic logic unit of the CPU2S.
//
// Combinational. `sel_alu_f` picks the result `op`:
//   001 inB   (pass, used to load ACC from a bus and to load IP for a jump)
//   010 inB+1 (increment, used to step the instruction pointer)
//   011 inA+inB
//   100 inA-inB
//   any other code gives 0.
// `zero` is high when inA (the accumulator) is zero. The function table and
// the zero flag follow the document; arithmetic wraps modulo 2^WIDTH and no
// carry or overflow is produced, since the document names none.
//
// Ports: in_a (from ACC), in_b (from muxB), sel_alu_f, op, zero.
module cpu2s_alu
  import cpu2s_pkg::*;
#(
  parameter int WIDTH = WORD_W
) (
  input  logic [WIDTH-1:0] in_a,
  input  logic [WIDTH-1:0] in_b,
  input  alu_fn_e          sel_alu_f,
  output logic [WIDTH-1:0] op,
  output logic             zero
);

  always_comb begin
    unique case (sel_alu_f)
      ALU_PASS: op = in_b;
      ALU_INC:  op = in_b + WIDTH'(1);
      ALU_ADD:  op = in_a + in_b;
      ALU_SUB:  op = in_a - in_b;
      default:  op = '0;
    endcase
  end

  assign zero = (in_a == '0);

endmodule
