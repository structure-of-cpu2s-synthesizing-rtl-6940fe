// cpu2s: the CPU2S, a 16-bit accumulator CPU with a 32-word RAM.
//
// Datapath (as in the CPU2S block diagram):
//   abus  = muxA(IP, address field of IR); low 5 bits address the RAM.
//   dbus1 = muxC(RAM read data, input port) and feeds IR and muxB.
//   dbus2 = ACC and feeds the RAM write data and the output port.
//   ALU   inA = ACC, inB = muxB(dbus1, abus); its result loads ACC or IP.
// The control unit runs each instruction in a fetch and an execute cycle
// (see cpu2s_control). The component set, the buses and the connections are
// the document's; the reset, the IR address field on abus and the two-cycle
// sequence are this design's.
//
// Ports: clk, rst (sync, active high: IP, ACC, IR, output port and control
// state cleared; RAM keeps its contents), in_data (input port pins),
// out_data (output port pins), halted (HLT reached), fetch (high in
// the fetch cycle of each instruction), zero (ALU zero flag,
// ACC == 0), and acc, ip, ir for observation.
// Parameter INIT: RAM image loaded at start, by default the first example
// program (IN; ADD 11; OUT; HLT).
module cpu2s
  import cpu2s_pkg::*;
#(
  parameter mem_image_t INIT = FIRST_PROGRAM
) (
  input  logic  clk,
  input  logic  rst,
  input  word_t in_data,
  output word_t out_data,
  output logic  halted,
  output logic  fetch,
  output logic  zero,
  output word_t acc,
  output word_t ip,
  output word_t ir
);

  ctrl_t ctrl;
  word_t abus, dbus1, dbus2;
  word_t ir_addr, mux_b_out, alu_out, ram_out, inpt_out;

  assign ir_addr = {8'h00, ir[7:0]};
  assign dbus2   = acc;

  cpu2s_control u_control (
    .clk, .rst, .ir, .ctrl, .halted, .fetch
  );

  cpu2s_mux2 #(.WIDTH(WORD_W)) u_mux_a (
    .sel(ctrl.sel_mux_a), .in0(ip), .in1(ir_addr), .y(abus)
  );

  cpu2s_mux2 #(.WIDTH(WORD_W)) u_mux_b (
    .sel(ctrl.sel_mux_b), .in0(dbus1), .in1(abus), .y(mux_b_out)
  );

  cpu2s_mux2 #(.WIDTH(WORD_W)) u_mux_c (
    .sel(ctrl.sel_mux_c), .in0(ram_out), .in1(inpt_out), .y(dbus1)
  );

  cpu2s_alu #(.WIDTH(WORD_W)) u_alu (
    .in_a(acc), .in_b(mux_b_out), .sel_alu_f(ctrl.sel_alu_f), .op(alu_out), .zero
  );

  cpu2s_reg #(.WIDTH(WORD_W)) u_acc (
    .clk, .rst, .ld(ctrl.ld_acc), .data_in(alu_out), .data_out(acc)
  );

  cpu2s_reg #(.WIDTH(WORD_W)) u_ip (
    .clk, .rst, .ld(ctrl.ld_ip), .data_in(alu_out), .data_out(ip)
  );

  cpu2s_reg #(.WIDTH(WORD_W)) u_ir (
    .clk, .rst, .ld(ctrl.ld_ir), .data_in(dbus1), .data_out(ir)
  );

  cpu2s_ram #(.INIT(INIT)) u_ram (
    .clk, .mio(ctrl.mio), .mwe(ctrl.mwe), .addr(abus[ADDR_W-1:0]),
    .data_in(dbus2), .data_out(ram_out)
  );

  cpu2s_in_port #(.WIDTH(WORD_W)) u_inpt (
    .oe_ip(ctrl.oe_ip), .data_in(in_data), .data_out(inpt_out)
  );

  cpu2s_out_port #(.WIDTH(WORD_W)) u_outpt (
    .clk, .rst, .ie_op(ctrl.ie_op), .data_in(dbus2), .data_out(out_data)
  );

endmodule
