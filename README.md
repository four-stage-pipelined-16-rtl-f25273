# A four-stage pipelined 16-bit RISC

This is a deliberately small teaching processor: a 16-bit load/store machine
with sixteen registers, sixteen instructions and no branches. It shows how a
pipeline overlaps instructions. Every instruction goes through four stages,
fetch, decode, execute and store, with a register between each pair of
stages. A new instruction starts every clock and one finishes every clock.
Instructions and data live in two separate preloaded memories (a Harvard
arrangement), so fetching never competes with loads and stores.

After reset the system needs nothing but a clock. It runs a built-in
demonstration program: 16 loads fill the registers from the data memory, 13
instructions exercise every ALU operation once, and 16 stores copy the
registers back. The program counter then wraps around and the program runs
again.

The design targets an FPGA. The caches are initialised memories, and the
resets are synchronous.

## Instruction set

All instructions are 16 bits. Registers are addressed with 4 bits, the data
memory with 5 bits.

| format | [15:12] | [11:8]    | [7:4]     | [3:0]            |
|--------|---------|-----------|-----------|------------------|
| ALU    | opcode  | operand A | operand B | destination      |
| LD     | `1110`  | `00` + address[4:3] | address[2:0] + `0` | destination |
| ST     | `1111`  | `000` + source[3] | source[2:0] + address[4] | address[3:0] |

In plain fields: LD takes the data address from bits [9:5] and the
destination register from [3:0]. ST takes the source register from bits [8:5]
and the data address from [4:0].

| opcode | name | result                        |
|--------|------|-------------------------------|
| `0000` | NOP  | nothing                       |
| `0001` | ADD  | A + B (mod 2^16)              |
| `0010` | SUB  | A - B                         |
| `0011` | AND  | A & B                         |
| `0100` | OR   | A \| B                        |
| `0101` | XOR  | A ^ B                         |
| `0110` | INC  | A + 1                         |
| `0111` | DEC  | A - 1                         |
| `1000` | NOT  | ~A                            |
| `1001` | NEG  | -A (two's complement)         |
| `1010` | SHR  | A >> 1, zero in at the top    |
| `1011` | SHL  | A << 1, zero in at the bottom |
| `1100` | ROR  | A rotated right by one        |
| `1101` | ROL  | A rotated left by one         |
| `1110` | LD   | rD <- dmem[addr]              |
| `1111` | ST   | dmem[addr] <- rS              |

There are no flags, no carry out and no branch or jump. The program counter
only counts up.

## The four stages

```
           fetch            decode            execute                 store
  pc --> icache --> [ir] --> split --> [opcode,  --> mux A/B, ALU, --> [rslt, dst,   --> regfile write
  (+1)                                  opnda,       control            dc_addr,          dcache read (LD)
                                        opndb,                          strobes]          dcache write (ST)
                                        dst,
                                        dcaddr]
```

* **Fetch** (`iunit`). The 6-bit `pc` addresses the instruction cache, which
  answers combinationally. At the clock edge the word goes into `ir` and `pc`
  advances by one.
* **Decode** (`decode`). The instruction is cut into fields according to its
  format and registered. Fields an instruction does not use are zero.
* **Execute** (`eunit`). Two 16-to-1 multiplexers select operand A and
  operand B from the sixteen register outputs. The ALU combines them, and a
  small control table derives the strobes. At the edge the unit registers the
  result, the destination, the data address and these strobes:

  | instruction | `rslt`     | `reg_wr_vld` | `load_op` | `dcenbl` | `rdwr` |
  |-------------|------------|--------------|-----------|----------|--------|
  | NOP         | 0          | 0            | 0         | 0        | 1      |
  | ALU op      | ALU output | 1            | 0         | 0        | 1      |
  | LD          | 0          | 1            | 1         | 1        | 1      |
  | ST          | register A | 0            | 0         | 1        | 0      |

* **Store** (`regfile`, `dcache`). The registered strobes act on the state.
  For an ALU op, the register file writes `rslt` into register `dst`. For LD,
  the data cache reads combinationally at `dc_addr`, and the register file
  writes that word into `dst` (`load_op` selects it). For ST, the data cache
  writes `rslt` at `dc_addr`. Each of these writes happens at the edge that
  ends the store stage.

### Timing

Let the first rising edge after reset be edge 1. The instruction at address
*n* then moves as follows:

| edge  | what happens to instruction *n*              |
|-------|----------------------------------------------|
| *n*   | `pc` becomes *n*; the cache shows the word   |
| *n*+1 | word captured in `ir`                        |
| *n*+2 | fields captured by decode                    |
| *n*+3 | result and strobes captured by the execution unit |
| *n*+4 | register file or data cache written          |

For example, `LD r1` at address 1 changes r1 right after edge 5. The
demonstration program's last store, at address 44, lands at edge 48.

## What an instruction sees: no forwarding

This is the part of the design that needs the most care when writing
programs. The pipeline has **no forwarding and no interlock**. An instruction
reads its operands straight from the register file while it is in execute.
At that moment the instruction just ahead of it is in the store stage: its
result has been computed but not yet written. So:

* instruction *k* sees the results of instructions *k*-2, *k*-3, ...;
* it does **not** see the result of instruction *k*-1, and reads that
  register's previous value instead;
* loads and stores to the data cache happen in program order, so memory
  has no such effect.

A program that wants a result from the instruction just before must put one
independent instruction (or a NOP) in between.

The demonstration program runs into this on purpose once. `OR r5 = r3 | r4`
is followed directly by `XOR r4 = r4 ^ r5`. The XOR therefore uses the old r5
(`4400`) and gives `00ff ^ 4400 = 44ff`. The next instruction, `INC r3 = r5 + 1`,
is two behind the OR and sees the new r5 (`00ff`).

Register contents after one pass of the demonstration program:

| reg | initial | after | reg | initial | after |
|-----|---------|-------|-----|---------|-------|
| r0  | 0000 | 0044 | r8  | 2200 | 0087 |
| r1  | 0044 | 0044 | r9  | 4400 | 0043 |
| r2  | 0088 | 0088 | r10 | 8800 | ffbc |
| r3  | 00bb | 0100 | r11 | aa00 | 0022 |
| r4  | 00ff | 44ff | r12 | bb00 | 0110 |
| r5  | 4400 | 00ff | r13 | cc00 | 0080 |
| r6  | 8800 | 0088 | r14 | dd00 | 89fe |
| r7  | bb00 | ffbc | r15 | ff00 | ff00 |

The stores then leave r0..r15 in data words 16..31.

The published description of this processor lists different final values for
r3, r8, r9, r10, r13 and r14 (`4401`, `87ff`, `44ff`, `0000`, `00ff`,
`01fe`). Except for r13, those are what each instruction gives when applied
to the *initial* register contents, which this pipeline does not do. Its r13 value
is not a one-bit rotate of anything r3 ever holds. Its other ten values,
including the XOR result above, agree with this design.

## Memories and the demonstration program

Both caches take their contents from parameters. The defaults are built by
functions in `risc_pkg`:

* `demo_program()` fills the 48-word instruction cache:
  * addresses 0..15: `LD ri <- dmem[i]`, encoded `e000 + 21h*i`;
  * addresses 16..28: the ALU instructions `1010 2127 3236 4345 5454 6563
    7678 8709 901a a12b b23c c34d d45e`, one per opcode from ADD to ROL;
  * addresses 29..44: `ST ri -> dmem[16+i]`, encoded `f010 + 21h*i`;
  * addresses 45..47: NOP.
* `demo_data()` fills the 32-word data cache. Words 0..15 hold `0000 0044
  0088 00bb 00ff 4400 8800 bb00 2200 4400 8800 aa00 bb00 cc00 dd00 ff00`;
  words 16..31 hold zero.

Addresses 48..63 of the instruction cache read as NOP. After `pc` wraps, the
program runs again with the same result, because the stores only write words
16..31. The data cache is not cleared by reset, just like an initialised FPGA
block RAM. While `rst` is high, the core holds the data cache enable low, so
the power-up state of the strobe register cannot disturb the preloaded data.

To run a different program, override `IC_INIT` and `DC_INIT` on
`risc_system_top` (types `icache_image_t` and `dcache_image_t`, packed arrays
of 16-bit words indexed by address).

## Modules

```
risc_system_top          clock and reset in, observation signals out
├── icache               48 x 16 ROM, combinational read
├── risc_cpu_top         the four pipeline units
│   ├── iunit            pc, +1, ir
│   ├── decode           field split, registered
│   ├── eunit            operand muxes, control, result registers
│   │   └── alu          13 operations
│   └── regfile          16 x 16, write decoder, all outputs visible
└── dcache               32 x 16 RAM, enable + read/write select
```

`risc_pkg` holds the sizes, the `opcode_t` enumeration, the instruction
encoders and the preload images. All resets are synchronous and active
high; hold `rst` for at least one rising edge. `risc_cpu_top` carries two
assertions on the store-stage strobes. A load must read the data cache and
write a register. A data cache write must never write a register. Build
with `--assert` to have them checked.

The top's outputs are there for observation only. They are the signals a
logic analyser on the board would watch: `pc`, `ir`, the decoded opcode, the
data cache strobes, address and write data (`rslt`), the register file write
strobes and destination, and all sixteen registers (`regs`, a packed
16 x 16 array with `regs[i]` being register i).

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
For example, to run the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/risc_pkg.sv tb/risc_ref_pkg.sv tb/risc_system_top_tb.sv \
  --top-module risc_system_top_tb -o sim
./obj_dir/sim
```

Swap in any other testbench name in the same way.

| testbench | what it establishes |
|-----------|---------------------|
| `risc_system_top_tb` | The full system at default size runs the demonstration program for 140 clocks (two passes and part of a third). It compares all registers with a reference model after every edge, which also pins the four-edge latency, and checks the final registers and data words against the hand-worked table above. It also checks that every opcode occurred, that loads, stores and ALU writes occurred, that an operand read missed the result just ahead, and that the pc wrapped. |
| `risc_cpu_top_tb` | The core with behavioural memories runs 20 random programs of random valid instructions on random data. Registers are compared every clock and the data memory after each run. |
| `eunit_tb` | Random opcodes, operands and register contents: result, strobes, address and destination. |
| `alu_tb` | Worked examples and random operands for every opcode. |
| `decode_tb` | Field extraction for all three formats, the demonstration program and random words. |
| `regfile_tb` | Random writes from both sources, write enable, reset. |
| `dcache_tb` | Preloaded words, writes and read-back, no write while disabled or reading, random traffic. |
| `iunit_tb` | Reset values, the increment, `ir` lagging `pc`, the wrap at 63, mid-run reset. |
| `icache_tb` | All 64 addresses against the program listing. |

`tb/risc_ref_pkg.sv` is the instruction-level reference model the
testbenches share. It keeps two register states, so it reproduces the
"misses the result just ahead" rule without modelling the pipeline
registers. Its ALU is written with integer arithmetic rather than bit
slicing, so it does not share the RTL's mistakes.

## Where this design departs from its source, or fills gaps

* **Timing of the first writes.** A published simulation of the original
  shows r1 already loaded while `pc` reads 4. Here that happens one clock
  later, while `pc` reads 5. This design keeps a register at the input of the
  store stage, as the pipeline description calls for. That register is also
  what produces the documented XOR result; without it, the XOR would see the
  new r5 and give `0000`.
* **Final register values.** See the table above. Six registers differ from
  the published list, for the reason given there.
* **Result width.** The result bus is 16 bits. One drawing of the original
  labels it 6 bits, which cannot carry the data.
* **Register write decoder.** It is a 4-to-16 decoder on `dst`.
* **Data cache port list.** The data cache gets a clock input for its
  synchronous write; the original lists no clock among its ports. Its read is
  combinational, and its output is zero when no read is enabled. The original
  test output suggests the last read value was held instead.
* **Undocumented details chosen here:**
  * the strobe table above;
  * ST sending operand A (its source register) as write data;
  * unused decode fields reading zero;
  * synchronous active-high reset clearing pc, ir, the pipeline registers and
    the register file;
  * the data cache enable being gated by reset;
  * the pc wrapping around, with addresses 48..63 reading as NOP;
  * one-bit shift and rotate distances, with no flags.
* **Memory initialisation.** The memories take their contents from
  parameters instead of reading a text file at elaboration.
* **Not included.** There is no prefetch buffer and no stall logic; the
  original design has neither. The embedded logic analyser and the board's
  switches, LEDs and pin assignments are not part of this RTL.

## Size

The pipeline and register state amount to 328 flip-flops: 256 in the
register file, 22 in fetch, 21 in decode and 29 in execute. Generic
synthesis of the whole system keeps 312 of them, because the unused fields
of the decode register are constant. The memories add 1,280 bits: a 48 x 16
ROM and a 32 x 16 RAM. The ALU is a few adders and multiplexers. No clock rate
has been measured for any particular device. The longest path runs from the
register file through a 16:1 operand multiplexer and the ALU into the result
register.
