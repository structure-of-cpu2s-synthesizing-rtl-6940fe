// cpu2s_pkg: types and constants shared by the CPU2S blocks.
//
// CPU2S is a 16-bit accumulator machine: one data word is 16 bits, the RAM
// holds 32 words, and every instruction is one word whose top hex digit is
// the opcode and whose low two hex digits are a memory address ("aa").
// The opcode values, the ALU function codes, the RAM size and the default RAM
// image (the first example program and the example data segment) follow the
// document. The control word struct, the enum types and the instruction
// builder are this design's own way of writing them down.
package cpu2s_pkg;

  localparam int WORD_W    = 16;  // ACC, IR, IP, buses and ports
  localparam int RAM_WORDS = 32;  // RAM size in words
  localparam int ADDR_W    = 5;   // RAM address bits taken from abus

  typedef logic [WORD_W-1:0] word_t;
  typedef word_t mem_image_t [RAM_WORDS];

  // Function select of the ALU (selALUf). Any other code gives 0.
  typedef enum logic [2:0] {
    ALU_ZERO = 3'b000,
    ALU_PASS = 3'b001,   // op = inB
    ALU_INC  = 3'b010,   // op = inB + 1
    ALU_ADD  = 3'b011,   // op = inA + inB
    ALU_SUB  = 3'b100    // op = inA - inB
  } alu_fn_e;

  // Opcodes: bits 15:12 of the instruction word.
  typedef enum logic [3:0] {
    OP_LDA = 4'h0,  // ACC <= RAM[aa]
    OP_STO = 4'h1,  // RAM[aa] <= ACC
    OP_ADD = 4'h2,  // ACC <= ACC + RAM[aa]
    OP_JMP = 4'h4,  // IP <= aa
    OP_HLT = 4'h7,  // stop
    OP_IN  = 4'h8,  // ACC <= input port
    OP_OUT = 4'h9   // output port <= ACC
  } opcode_e;

  // Control word driven by the control unit, one field per red signal of the
  // CPU2S block diagram.
  typedef struct packed {
    logic    sel_mux_a;  // abus source: 0 = IP, 1 = IR address field
    logic    sel_mux_b;  // ALU inB source: 0 = dbus1, 1 = abus
    logic    sel_mux_c;  // dbus1 source: 0 = RAM, 1 = input port
    alu_fn_e sel_alu_f;  // ALU function
    logic    ld_acc;     // load accumulator from ALU
    logic    ld_ip;      // load instruction pointer from ALU
    logic    ld_ir;      // load instruction register from dbus1
    logic    mio;        // memory access
    logic    mwe;        // memory write (with mio)
    logic    oe_ip;      // input port drives its output
    logic    ie_op;      // output port captures dbus2
  } ctrl_t;

  // Instruction word builder: opcode in the top digit, address in the low byte.
  function automatic word_t instr(opcode_e op, logic [7:0] aa = 8'h00);
    return {op, 4'h0, aa};
  endfunction

  // The first program: IN; ADD 11; OUT; HLT (8000 2011 9000 7000),
  // code segment 00h..0Fh, data segment 10h..1Fh.
  localparam mem_image_t FIRST_PROGRAM = '{
    16'h8000, 16'h2011, 16'h9000, 16'h7000,
    16'h0000, 16'h0000, 16'h0000, 16'h0000,
    16'h0000, 16'h0000, 16'h0000, 16'h0000,
    16'h0000, 16'h0000, 16'h0000, 16'h0000,
    16'h0002, 16'h0003, 16'h0004, 16'h0005,
    16'h0001, 16'h0001, 16'h0002, 16'h0006,
    16'h0000, 16'h0000, 16'h0000, 16'h0000,
    16'h0000, 16'h0000, 16'h0000, 16'h0000
  };

endpackage
