# CPU2S: a 16-bit accumulator CPU

CPU2S is a teaching-sized CPU. It has one 16-bit accumulator (ACC), a 32-word
RAM that holds both the program and its data, one input port and one output
port. Each instruction is one 16-bit word. The CPU fetches it into the
instruction register (IR) and then carries it out by steering three
multiplexers and one ALU. A separate control unit drives every load, select
and memory signal. Seven instructions are enough to read a number from
switches, do arithmetic with values in memory, write results back and show
them on LEDs.

The RTL is plain synthesizable SystemVerilog with no vendor primitives.

## Datapath

```
            +-------------------- dbus1 (RAM or input port) ---------+
            |                                                        |
            v                                                        |
   abus -> muxB --inB--> ALU <--inA-- ACC --> dbus2 --> RAM write data
             ^            |            ^            \-> OutPt (output pins)
             |            +------------+  (ALU result loads ACC ...)
             |            +--> IP      (... or IP)
             |                 |
   abus <---muxA <-------------+
             ^
             +------ IR[7:0] (address field)     IR <-- dbus1
   abus[4:0] -> RAM address
   RAM read data --+
                   +--> muxC --> dbus1
   InPt (pins) ----+
```

There are three buses:

| bus   | width | driven by                                   | read by                          |
|-------|-------|---------------------------------------------|----------------------------------|
| abus  | 16    | muxA: IP, or the address field of IR        | RAM address (bits 4:0), muxB     |
| dbus1 | 16    | muxC: RAM read data, or the input port      | IR, muxB                         |
| dbus2 | 16    | ACC                                         | RAM write data, output port      |

The ALU adds nothing of its own to the data flow. It is the only path into
ACC and IP, so each move into those registers passes through it:

| selALUf | result      | used for                                   |
|---------|-------------|--------------------------------------------|
| 001     | inB         | LDA and IN (load ACC), JMP (load IP)       |
| 010     | inB + 1     | stepping IP during fetch (inB = abus = IP) |
| 011     | inA + inB   | ADD                                        |
| 100     | inA - inB   | not used by the instruction set            |
| other   | 0           |                                            |

inA is always ACC. The `zero` output of the ALU is high when ACC is zero.
No instruction uses it, so the top brings it out as a pin.

The two ports are deliberately different. The input port is not a register.
It is a row of AND gates that shows the pins only while `oe_ip` is high and
drives zero otherwise. The output port is a register. It captures dbus2 on
the rising clock edge of an OUT instruction and holds that value on the pins.

## Instruction set and encoding

Bits 15:12 of the word are the opcode. Bits 7:0 are the memory address `aa`.
Only the low five address bits reach the RAM, since the RAM holds 32 words.

| mnemonic | word   | effect                      |
|----------|--------|-----------------------------|
| LDA aa   | `00aa` | ACC <= RAM[aa]              |
| STO aa   | `10aa` | RAM[aa] <= ACC              |
| ADD aa   | `20aa` | ACC <= ACC + RAM[aa]        |
| JMP aa   | `40aa` | IP <= aa                    |
| HLT      | `7000` | stop until reset            |
| IN       | `8000` | ACC <= input port           |
| OUT      | `9000` | output port <= ACC          |

The other opcode values (3, 5, 6, A to F) do nothing, and execution moves on
to the next word. Arithmetic wraps modulo 2^16. There are no carry or
overflow flags.

## The instruction cycle

This is the part to understand before changing anything. Every instruction
takes exactly two clock cycles. `cpu2s_control` is a three-state machine
(FETCH, EXEC, HALT) that produces a `ctrl_t` control word combinationally
from its state and IR.

**Fetch.** muxA puts IP on abus. The RAM is read combinationally, and muxC
passes the word on dbus1 into IR. In the same cycle, muxB takes abus, the
ALU adds one, and the result is loaded into IP. At the rising edge, IR
receives the instruction and IP moves on. The two loads do not conflict.
IR's data arrives over dbus1, while IP's arrives over the abus, muxB and ALU
path.

**Execute.** muxA puts IR's address field on abus. Each opcode then raises
the signals below. All registers and the RAM update at the rising edge that
ends the cycle.

| opcode  | mio | mwe | selMuxC | selMuxB | selALUf | loads      |
|---------|-----|-----|---------|---------|---------|------------|
| LDA     | 1   | 0   | RAM     | dbus1   | pass    | ACC        |
| ADD     | 1   | 0   | RAM     | dbus1   | add     | ACC        |
| STO     | 1   | 1   | -       | -       | -       | RAM        |
| IN      | 0   | 0   | InPt    | dbus1   | pass    | ACC (oeIP) |
| OUT     | 0   | 0   | -       | -       | -       | OutPt (ieOP) |
| JMP     | 0   | 0   | -       | abus    | pass    | IP         |
| HLT     | 0   | 0   | -       | -       | -       | none; go to HALT |

In HALT every load is off, so ACC, IP, IR, the output port and the RAM
freeze. Only reset leaves HALT.

Timing of the first example program, from the clock edge that ends reset
(W is the word on the input pins):

| cycle | state | IP before | IR after | ACC after | out after |
|-------|-------|-----------|----------|-----------|-----------|
| 1     | fetch | 0         | 8000     | 0         | 0         |
| 2     | exec  | 1         | 8000     | W         | 0         |
| 3     | fetch | 1         | 2011     | W         | 0         |
| 4     | exec  | 2         | 2011     | W+3       | 0         |
| 5     | fetch | 2         | 9000     | W+3       | 0         |
| 6     | exec  | 3         | 9000     | W+3       | W+3       |
| 7     | fetch | 3         | 7000     | W+3       | W+3       |
| 8     | exec  | 4         | 7000     | W+3       | W+3, `halted` = 1 |

The RAM read is asynchronous, meaning that data follows the address within
the same cycle. This is what lets the machine fetch and execute in one cycle
each. A synchronous block RAM would need an extra cycle per access.

## Memory map and programs

| address  | use                                                      |
|----------|----------------------------------------------------------|
| 00h-0Fh  | code segment                                             |
| 10h-1Fh  | data segment: `0002 0003 0004 0005 0001 0001 0002 0006`, then zeros |

The RAM starts with the image given by the `INIT` parameter of `cpu2s`
(type `cpu2s_pkg::mem_image_t`, 32 words). The default is
`cpu2s_pkg::FIRST_PROGRAM`, which holds:

- the code `IN; ADD 11; OUT; HLT` (`8000 2011 9000 7000`);
- the data segment above.

This program outputs the input word plus 3. Reset does not reload the RAM.
Contents written by STO survive a reset.

Two other programs are used in the tests:

- `IN; ADD 19; JMP 1` loops forever. It adds RAM[19h] to ACC on every pass.
  RAM[19h] is zero in the default data segment.
- `LDA 10; ADD 11; STO 12; OUT; HLT` stores 5 at 12h, outputs 5 and halts
  after 10 cycles.

To run your own program, build a `mem_image_t` and pass it as
`cpu2s #(.INIT(my_image))`. `cpu2s_pkg::instr(OP_ADD, 8'h11)` forms an
instruction word.

## Files and interfaces

| file                  | content                                                         |
|-----------------------|-----------------------------------------------------------------|
| `rtl/cpu2s_pkg.sv`    | widths, `alu_fn_e`, `opcode_e`, the `ctrl_t` control word, `instr()`, the default RAM image |
| `rtl/cpu2s.sv`        | top: every block wired onto abus, dbus1, dbus2                  |
| `rtl/cpu2s_control.sv`| fetch/execute/halt sequencer and decoder                        |
| `rtl/cpu2s_alu.sv`    | ALU and zero flag                                               |
| `rtl/cpu2s_reg.sv`    | load-enabled register (ACC, IR, IP)                             |
| `rtl/cpu2s_mux2.sv`   | 2:1 multiplexer (muxA, muxB, muxC)                              |
| `rtl/cpu2s_ram.sv`    | 32x16 RAM: asynchronous read, synchronous write                 |
| `rtl/cpu2s_in_port.sv`| gated input port                                                |
| `rtl/cpu2s_out_port.sv`| output port register                                           |

Top-level ports of `cpu2s`:

| port       | dir | width | meaning                                                   |
|------------|-----|-------|-----------------------------------------------------------|
| `clk`      | in  | 1     | clock; everything is on the rising edge                   |
| `rst`      | in  | 1     | synchronous, active high; clears IP, ACC, IR, OutPt and the sequencer |
| `in_data`  | in  | 16    | input port pins                                           |
| `out_data` | out | 16    | output port pins                                          |
| `halted`   | out | 1     | HLT has been executed                                     |
| `fetch`    | out | 1     | current cycle is a fetch                                  |
| `zero`     | out | 1     | ALU zero flag (ACC == 0)                                  |
| `acc`, `ip`, `ir` | out | 16 | register contents, for observation                    |

Two properties in `cpu2s_control` guard the control word. A RAM write
(`mwe`) always comes with `mio`. The input port is enabled only when muxC
selects it.

## Design choices

The following come from the CPU2S description: the component set, the bus
structure, the ALU function table, the RAM size and its access rules, the
port behaviour, the opcode encodings and the example programs.

The following are choices made for this RTL:

- **Control unit.** Only the instruction set and the control signal names
  are specified, so the two-cycle sequencer is this design's own. This
  includes fetching and incrementing in one cycle, the HALT state, and
  unknown opcodes running as no-ops.
- **Instruction pointer.** IP is a register loaded from the ALU, as in the
  block diagram. It is not a free-running counter. It advances once per
  instruction, not once per clock.
- **IR onto abus.** Only IR's low byte is put on abus, zero-extended. A jump
  therefore sets IP to `aa`, not to the whole instruction word.
- **Mux polarity.** A select value of 1 picks the second input: IR for muxA,
  abus for muxB and the input port for muxC.
- **RAM outside a read.** The RAM output is zero when it is not being read,
  so it can share muxC with the input port. The RAM never produces an
  undefined value.
- **Reset.** The synchronous reset is an addition. The RAM contents are
  initialised from `INIT` at time zero and are not reset.
- **Zero flag.** Branch instructions are meant to use it, but none is
  defined, so the flag is only brought out as a pin.
- **Extra ports.** `acc`, `ip`, `ir` and `fetch` are observation ports.

## Verification

Each block has a self-checking testbench in `tb/`. Each one:

- compares the block against values worked out independently in the
  testbench;
- has a watchdog;
- ends with a `TB_RESULT checks=N failures=M` line.

| testbench            | what it shows                                               |
|----------------------|-------------------------------------------------------------|
| `cpu2s_tb`           | first program at default parameters, ten input words. Checks IP and IR at every step, ACC after IN and ADD, the output after OUT, halting after exactly 8 cycles, and the frozen state afterwards. Counts fetch, IN, ADD, OUT, HLT and both values of the zero flag. |
| `cpu2s_programs_tb`  | the looping program, run with the default data and with RAM[19h] = 7 (ACC grows by 7 per pass, IP cycles 1, 2, 1, 2). Also the load/add/store program, including the stored word and the 10-cycle run. |
| `cpu2s_control_tb`   | the control word for fetch and for every opcode value against a signal table, halting, and leaving HALT by reset |
| `cpu2s_alu_tb`       | all eight function codes with random and corner operands, plus the zero flag |
| `cpu2s_ram_tb`       | initial image, random reads and writes against a reference array, and zero output when idle |
| `cpu2s_reg_tb`, `cpu2s_out_port_tb`, `cpu2s_mux2_tb`, `cpu2s_in_port_tb` | random stimulus against a reference |

Run one with Verilator 5, for example the full CPU:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module cpu2s_tb \
          rtl/cpu2s_pkg.sv tb/cpu2s_tb.sv
./obj_dir/Vcpu2s_tb
```

For a block, replace the top module and testbench file, for example
`--top-module cpu2s_alu_tb rtl/cpu2s_pkg.sv rtl/cpu2s_alu.sv tb/cpu2s_alu_tb.sv`.
Every run finishes in well under a second.

Known limits:

- The design has only been simulated. It has not been run on an FPGA.
- The timing tables above are this design's own. No cycle counts are
  specified for CPU2S.
