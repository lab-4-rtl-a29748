# Micro6 register file

A small teaching processor, Micro6, keeps its ALU operands and
results in a register file that also supports two addressing modes: an
*index* mode, where a memory address is an index register plus a
general-purpose register, and a *stack* mode, where a stack pointer walks
a fixed stack segment at the top of memory. This RTL implements that
register file: 32 addressable registers of three different kinds behind
one write port and two read ports.

```
                 +-------------------------------+
  selA[4:0] ---->|                               |----> busA[31:0]
  selB[4:0] ---->|        register file          |----> busB[31:0]
  selC[4:0] ---->|                               |
  wr        ---->|  R00..R27  32-bit             |
  stkInc    ---->|  IX0..IX2   9-bit             |
  stkDec    ---->|  STP        9-bit up/down     |
  rst, clk  ---->|                               |
                 +-------------------------------+
                                ^
                            busC[31:0]
```

In the processor, busA and busB feed the two ALU inputs and busC is
written from the shared data bus.

## Register map

| selX  | name      | stored bits | value on busA/busB          |
|-------|-----------|-------------|-----------------------------|
| 0–27  | R00–R27   | 32          | the register                |
| 28–30 | IX0–IX2   | 9           | `{23'b0, ix[8:0]}`          |
| 31    | STP       | 9           | `{23'h7FFFFF, sp[8:0]}`     |

Only the general-purpose registers are full width. The three index
registers and the stack pointer store 9 bits each; a write to them keeps
`busC[8:0]` and drops the rest.

## The stack pointer

The stack lives in the fixed segment `0xE00`–`0xFFF` of a 12-bit address
space, 512 words. Every address in that segment has bits 11..9 set, so
only the 9 low bits need to be stored and counted; the register file
supplies the fixed upper bits as ones when STP is read (ones all the way
to bit 31). The counter therefore starts at 0 after reset, which reads
back as `0xFFFFFE00`, i.e. stack address `0xE00`.

At a rising clock edge the 9-bit counter:

1. loads `busC[8:0]` if `wr` is high and `selC` = 31, else
2. counts up by one if `stkInc` is high and `stkDec` low, else
3. counts down by one if `stkDec` is high and `stkInc` low, else
4. holds (neither, or both).

It counts modulo 512, so it wraps from `0xFFF` to `0xE00` and back; it
can never leave the stack segment. Which of a stack write and a count
wins, what both strobes together do, and the wrap-around are choices of
this design.

PUSH and POP themselves are instructions of the processor: the register
file only provides the pointer and the increment/decrement, not the
memory access or the order of "move pointer, then access".

## Timing

* **Reads are combinational.** busA shows the register named by selA in
  the same cycle, and likewise busB; both ports may name the same
  register.
* **Writes and counts take effect at the rising clock edge.** There is
  no write-to-read bypass: in the cycle a register is written, a read
  of it still returns the old value.
* **Reset** (`rst`, active high) is asynchronous and clears every
  register; STP then reads `0xFFFFFE00`.

## Structure

| file                     | contents |
|--------------------------|----------|
| `rtl/regfile_pkg.sv`     | default sizes (32-bit data, 28 general-purpose, 3 index, 9-bit index and stack) and word/select types |
| `rtl/regfile.sv`         | top: instantiates and wires everything below |
| `rtl/data_reg.sv`        | enable register, `WIDTH` parameter; 28 instances at 32 bits via a generate loop, 3 at 9 bits |
| `rtl/stack_pointer.sv`   | 9-bit up/down counter with load |
| `rtl/write_decoder.sv`   | `selC`, `wr` → one write enable per register; asserts at most one is high |
| `rtl/read_mux.sv`        | 32-to-1 word multiplexer; two instances for busA and busB |

The top's parameters (`DATA_W`, `NUM_GP`, `NUM_IX`, `IX_W`, `SP_W`,
`SEL_W`) default to the Micro6 sizes. The index registers always sit
directly after the general-purpose registers and STP is always the last
address, so changing `NUM_GP` or `NUM_IX` moves them. After synthesis the
default configuration is 932 flip-flops (28 × 32 + 3 × 9 + 9), one
9-bit incrementer/decrementer and two 32-bit 32-way multiplexers.

## Where the design goes beyond its source

The register set, the widths, the port names, the fixed-ones/zeros read
back of the narrow registers, the 0xE00 starting point of the stack
pointer and the generate-loop construction come from the Micro6
specification. Everything else was left open there and decided here:

* register numbering 0–27 / 28–30 / 31 (taken from the order in which
  the registers are listed, consistent with the stack pointer being
  register 31);
* 5-bit selects, combinational reads, no bypass;
* asynchronous active-high reset to zero;
* write-over-count priority, both strobes = hold, wrap-around;
* the internals of the register, decoder and multiplexers, which are
  the simplest circuits that do the job.

Not part of this RTL: the rest of the Micro6 datapath (ALU, accumulator,
condition flags, memory buffer and address registers, program counter,
instruction register, fetch and control units, the stack unit and the
bus multiplexers), and the adder that forms an indexed address from an index
register and a general-purpose register. The register file only makes
both operands available on busA and busB in one cycle.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and ends. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/regfile_pkg.sv rtl/data_reg.sv rtl/stack_pointer.sv \
    rtl/write_decoder.sv rtl/read_mux.sv rtl/regfile.sv tb/tb_regfile.sv \
    --top-module tb_regfile -o sim
./obj_dir/sim
```

`tb_regfile` runs the register file at its default sizes. It fills and
reads back every register, walks the stack pointer down through `0xE00`
and up through `0xFFF`, writes STP while a count is requested, reads a
register in the cycle it is written, and then applies 20,000 cycles of
random reads, writes and stack operations with a reset half way,
comparing both read buses with a reference model every cycle. It prints
how often each of these cases occurred and fails if any never did. The
unit testbenches (`tb_data_reg`, `tb_stack_pointer`, `tb_write_decoder`,
`tb_read_mux`) check their module exhaustively or against a reference
model.
