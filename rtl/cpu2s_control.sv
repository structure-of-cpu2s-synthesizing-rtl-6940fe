// cpu2s_control: control unit (sequencer) of the CPU2S.
//
// Every instruction takes two clock cycles, a fetch and an execute:
//   FETCH   abus = IP; RAM is read onto dbus1 and loaded into IR; at the same
//           edge the ALU computes abus+1 and loads it into IP.
//   EXECUTE acts on the opcode in IR (bits 15:12), with abus = the address
//           field of IR where an address is used:
//             LDA aa  ACC <= RAM[aa]        (muxB = dbus1, ALU pass)
//             ADD aa  ACC <= ACC + RAM[aa]  (muxB = dbus1, ALU add)
//             STO aa  RAM[aa] <= ACC        (mio and mwe high)
//             IN      ACC <= input port     (oeIP, muxC = InPt, ALU pass)
//             OUT     output port <= ACC    (ieOP)
//             JMP aa  IP <= aa              (muxB = abus, ALU pass)
//             HLT     enter HALT, where nothing is loaded until reset.
//           Any other opcode does nothing and the next instruction follows.
// The instruction set, its encodings and the datapath the signals steer are
// the document's. The document does not describe the control unit itself:
// the two-state sequence, the fetch-and-increment in one cycle, the
// treatment of unknown opcodes and the HALT state are this design's.
//
// Ports: clk, rst (sync, active high, returns to FETCH), ir (the instruction
// register), ctrl (all control signals, combinational from state and IR),
// halted (high in HALT), fetch (high in a fetch cycle).
module cpu2s_control
  import cpu2s_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  word_t ir,
  output ctrl_t ctrl,
  output logic  halted,
  output logic  fetch
);

  typedef enum logic [1:0] {S_FETCH, S_EXEC, S_HALT} state_e;

  state_e  state, state_next;
  opcode_e opcode;

  assign opcode = opcode_e'(ir[15:12]);

  always_ff @(posedge clk) begin
    if (rst) state <= S_FETCH;
    else     state <= state_next;
  end

  always_comb begin
    ctrl       = '0;
    ctrl.sel_alu_f = ALU_ZERO;
    state_next = state;
    unique case (state)
      S_FETCH: begin
        ctrl.sel_mux_a = 1'b0;      // abus = IP
        ctrl.mio       = 1'b1;      // read RAM[IP]
        ctrl.sel_mux_c = 1'b0;      // dbus1 = RAM
        ctrl.ld_ir     = 1'b1;
        ctrl.sel_mux_b = 1'b1;      // inB = abus
        ctrl.sel_alu_f = ALU_INC;   // IP + 1
        ctrl.ld_ip     = 1'b1;
        state_next     = S_EXEC;
      end
      S_EXEC: begin
        state_next     = S_FETCH;
        ctrl.sel_mux_a = 1'b1;      // abus = address field of IR
        case (opcode)
          OP_LDA, OP_ADD: begin
            ctrl.mio       = 1'b1;
            ctrl.sel_mux_c = 1'b0;
            ctrl.sel_mux_b = 1'b0;
            ctrl.sel_alu_f = (opcode == OP_ADD) ? ALU_ADD : ALU_PASS;
            ctrl.ld_acc    = 1'b1;
          end
          OP_STO: begin
            ctrl.mio = 1'b1;
            ctrl.mwe = 1'b1;
          end
          OP_IN: begin
            ctrl.oe_ip     = 1'b1;
            ctrl.sel_mux_c = 1'b1;
            ctrl.sel_mux_b = 1'b0;
            ctrl.sel_alu_f = ALU_PASS;
            ctrl.ld_acc    = 1'b1;
          end
          OP_OUT: ctrl.ie_op = 1'b1;
          OP_JMP: begin
            ctrl.sel_mux_b = 1'b1;
            ctrl.sel_alu_f = ALU_PASS;
            ctrl.ld_ip     = 1'b1;
          end
          OP_HLT:  state_next = S_HALT;
          default: ;
        endcase
      end
      S_HALT:  state_next = S_HALT;
      default: state_next = S_FETCH;
    endcase
  end

  assign halted = (state == S_HALT);
  assign fetch  = (state == S_FETCH);

  // A RAM write is only ever requested together with a memory access.
  a_write_needs_mio: assert property (@(posedge clk) disable iff (rst) ctrl.mwe |-> ctrl.mio);
  // The input port is only enabled when muxC passes it on to dbus1.
  a_inpt_selected: assert property (@(posedge clk) disable iff (rst) ctrl.oe_ip |-> ctrl.sel_mux_c);

endmodule
