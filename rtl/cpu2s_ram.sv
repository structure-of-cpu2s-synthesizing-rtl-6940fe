// cpu2s_ram: 32-word by 16-bit RAM of the CPU2S, holding code and data.
//
// Addresses 00h..0Fh are the code segment and 10h..1Fh the data segment. The
// word address is the low five bits of abus. The access rules follow the
// document's flow chart:
//   mio high, mwe low  : read. data_out = RAM[addr], combinationally
//                        (no clock, same cycle as the address).
//   mio high, mwe high : write. data_in (dbus2) is stored at RAM[addr] on the
//                        rising clock edge.
//   mio low            : no access.
// Outside a read data_out is zero, so it can share muxC with the input port;
// the flow chart leaves it unassigned there, and the zero is this design's
// choice. The chart's check for an undefined address has no counterpart in
// two-valued logic and is left out. The contents start as the INIT image
// (by default the first example program) and are not touched by reset.
//
// Ports: clk, mio, mwe, addr, data_in, data_out.
module cpu2s_ram
  import cpu2s_pkg::*;
#(
  parameter mem_image_t INIT = FIRST_PROGRAM
) (
  input  logic              clk,
  input  logic              mio,
  input  logic              mwe,
  input  logic [ADDR_W-1:0] addr,
  input  word_t             data_in,
  output word_t             data_out
);

  word_t mem [RAM_WORDS];

  initial mem = INIT;

  always_ff @(posedge clk) begin
    if (mio && mwe) mem[addr] <= data_in;
  end

  always_comb data_out = (mio && !mwe) ? mem[addr] : '0;

endmodule
