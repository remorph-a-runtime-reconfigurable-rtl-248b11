# reMORPH: a mesh of DSP-slice processors with runtime-rewired links

reMORPH is a coarse-grained reconfigurable array. Each tile ("grain") is a small
processor. It is built around one DSP48E1-style multiply/ALU slice, with its own
512-word instruction and data memories. Grains talk only to their four direct
neighbours. They do so by writing results straight into a neighbour's data
memory. Which neighbour is wired to which memory is a configuration. It changes
between the phases of an application ("epochs"), and so does the code in the
grains if needed. A context switch therefore costs a few link changes, not a
full reprogramming of the fabric. Inside an epoch, the links are fixed
point-to-point connections, so every transfer has a known latency.

This repository gives synthesizable SystemVerilog for the grain and all its
parts, the programmable link switch and the array. It also has self-checking
testbenches. They include the running example of the architecture, summing
1000 numbers on four grains in three different ways. They also run factorial,
matrix-product and FFT kernels.

## The array and its epochs

`remorph_top` is a `ROWS x COLS` mesh of grains. The default is 4 x 4. Grain
`i` sits at row `i / COLS`, column `i % COLS`, and row 0 is the north edge.

An application is cut into epochs. Each epoch has a fixed communication
pattern. The external host drives each epoch in four steps:

1. Download code (`PT_IMEM`) and data (`PT_DMEM`) into the grains that need it.
2. Set the link switch (`PT_LINK`): for each grain, choose which neighbour
   (none, north, east, south or west) may write its data memory.
3. Start a set of grains (`start`, `start_mask`, `start_pc`).
4. Wait until every started grain has dropped `busy`. Then read results back
   or go on to the next epoch.

Data produced in one epoch stays in the memory it was written to. The next
epoch picks it up there. The mapping of processes onto grains should make the
changes between epochs small. Choosing that mapping is an offline software
problem and is not part of this RTL.

Code can change between epochs in two ways. The host can download new code.
Or all epochs' code can be loaded up front at different addresses, and each
epoch is started at its own `start_pc`; then only the links change.

## The grain

```
            host prog/readback
                   |
   +---------------v----------------+
   |  instr_mem 512x72   data_mem 512x48  <---- nb_in  (from the selected neighbour)
   |        |             ^   |  ^     |
   |        v             |   v  | own write-back
   |     sequencer ----> compute_element (DSP48E1-style)
   |        |                          |
   +--------|--------------------------+
            +------------------------------> nb_out (to whoever selected this grain)
```

- **instr_mem**: 512 x 72 bits, written by the host, read synchronously with
  one cycle of latency.
- **data_mem**: 512 x 48 bits. It has two read ports, for the grain's two
  operands. It has two write ports: the grain's own write-back (shared with
  host downloads) and the incoming neighbour link. If both write the same
  address in the same cycle, the own write wins. A read of an address written
  in the same cycle returns the old value.
- **compute_element**: A (30 bits), B (18 bits), C (48 bits) and a 14-bit
  control word in; P (48 bits) and four flags out. It has two register stages:
  inputs are registered at the first edge, and P and the flags at the second.
- **sequencer**: runs the program, described below.

A grain reads operands only from its own memory. A result can go to its own
memory, to the neighbour memory its link is routed to, or to both. Data for
a grain that is not a neighbour must be copied step by step, or the links must
be changed.

## Instruction format

Every instruction is explicit. One 72-bit word says at once what to compute,
where the operands come from, where the result goes, and where execution
continues. The field widths (14 + 20 + 21 + 11 + enable) are those of the
architecture. The order of the bits and all encodings below are this
implementation's choice (see `rtl/remorph_pkg.sv`, `instr_t`).

| bits    | field      | meaning |
|---------|------------|---------|
| 71:68   | reserved   | write 0 |
| 67      | `nx_inv`   | invert the branch condition |
| 66      | `nx_en`    | 1: jump to `nx_addr` if the condition holds; 0: go to pc+1 |
| 65:64   | `nx_flag`  | 00 always, 01 zero, 10 negative, 11 equal |
| 63:55   | `nx_addr`  | jump target |
| 54      | `nb_we`    | send the result over the outgoing link |
| 53:45   | `nb_addr`  | address in the neighbour's memory |
| 44      | `own_we`   | write the result to the own memory |
| 43      | `own_ind`  | own address is the word stored at `own_addr` (indirect) |
| 42:34   | `own_addr` | own destination |
| 33      | `s2.ind`   | operand 2 indirect |
| 32:24   | `s2.addr`  | operand 2 address |
| 23      | `s1.ind`   | operand 1 indirect |
| 22:14   | `s1.addr`  | operand 1 address |
| 13:0    | `op`       | `{CARRYINSEL[2:0], ALUMODE[3:0], OPMODE[6:0]}` |

An indirect operand reads the word at its address first. The low 9 bits of
that word are then the real address. This is how loops walk through arrays.

**Feeding the slice.** C is always operand 2. If OPMODE routes the multiplier
to X (`OPMODE[1:0] = 01`), then A = operand 1 [29:0] and B = operand 2 [17:0].
The slice then multiplies the low 25 bits of operand 1 by the low 18 bits of
operand 2, both signed. Otherwise A:B = operand 1, so X = A:B and Z = C give
`operand1 + operand2`.

**Slice functions** (as in a DSP48E1 without cascading):

| field | values |
|-------|--------|
| X (`OPMODE[1:0]`) | 0, M (product), P, A:B |
| Y (`OPMODE[3:2]`) | 0, 0, all ones, C |
| Z (`OPMODE[6:4]`) | 0, 0 (PCIN), P, C, P, 0 (PCIN>>17), P>>>17, 0 |
| `ALUMODE` | 0000 Z+X+Y+cin, 0001 ~Z+X+Y+cin, 0010 ~(Z+X+Y+cin), 0011 Z-(X+Y+cin); 0100/0111 XOR, 0101/0110 XNOR, 1100 AND, 1101 AND-NOT, 1110 NAND, 1111 NOT-OR. With Y = all ones, the logic codes give the dual set (XNOR, XOR, OR, OR-NOT, NOR, AND-NOT). Other codes give 0. |
| `CARRYINSEL` | 000 0, 001 1, 010 0, 011 0, 100 previous carry out, 101 ~P[47], 110 A[24] XNOR B[17], 111 P[47] |

Because Z can be P, P works as an accumulator that survives from one
instruction to the next. Examples: `OPMODE 010_11_00` is P + C, and
`010_01_01` is P + A*B (multiply-accumulate).

**Flags** come from the comparator and always describe the newest P:
- zero: P = 0
- negative: P[47]
- equal: P equals the C operand of the same instruction
- carry: carry out of the adder (visible in the flag word, but not a branch
  condition)

A conditional jump tests the flags of its own instruction's result. So "count
down and loop while not zero" is a single instruction: a subtraction with
`nx_flag = zero, nx_inv = 1`.

**Special encodings.**
- **HALT** is an enabled, unconditional jump to the instruction's own address.
- **NOP** is an all-zero `op` field. The slice is not clocked, so P and the
  flags keep their values. A NOP with `own_we` set stores the current P.
- A **poll** is a conditional jump to the instruction's own address. It
  repeats until the condition holds. It is not a HALT.

## Timing

The sequencer is a five-stage pipeline, one cycle per stage:

| stage | what happens |
|-------|--------------|
| P  | the instruction arrives from the instruction memory; both source addresses go to the data memory |
| O  | for an indirect operand, the word just read becomes the address; a direct operand is read again |
| E1 | the slice registers A, B, C and the control word; an indirect write-back reads its pointer |
| E2 | the slice computes P and the flags |
| W  | the result goes to the own memory and/or the link; a conditional jump is decided |

The data memory has two read ports, and both P and O use them. So a new
instruction enters P only when O is empty: **at most one instruction every 2
cycles**. An instruction also waits in these cases:
- the instruction in E1 is reading its write-back pointer (the port is busy);
- an older instruction in E1 or E2 will write an address that this one reads.
  A write whose address is not known yet, or an indirect operand, counts as a
  match;
- an older conditional jump has not reached W. The instruction at the chosen
  address enters P one cycle after the jump's W.

Unconditional next addresses (the next instruction, a plain jump) are known in
P and cost nothing. The first instruction enters P one cycle after `start`.
`busy` drops after the HALT leaves W.

Rules of thumb:
- Independent straight-line code runs at 2 cycles per instruction.
- A loop closed by a conditional jump pays 5 cycles for that last
  instruction. The two-instruction summing loop below takes 7 cycles per pass.
- The hardware finds every hazard between instructions of one grain, so
  programs need no NOPs for correctness. Writes arriving from a neighbour are
  not ordered against the own program; use a ready word and poll it.

A link write goes through the link switch combinationally. It reaches the
neighbour memory at the same clock edge as an own write-back.

## The link switch

`link_switch` keeps one 3-bit register per grain (`in_sel_e`: none, north,
east, south, west). The register selects which neighbour's outgoing link
drives that grain's memory write port. Each memory therefore has at most one
link writer at any time. One grain's link may feed several neighbours at once.
A selection that points beyond the edge of the mesh reads as an idle link.
Reset leaves all links open. Rewiring one link is one host write and takes
effect at the next clock edge.

## Host interface of `remorph_top`

| port | width | meaning |
|------|-------|---------|
| `prog_we`, `prog_grain`, `prog_tgt`, `prog_addr`, `prog_data` | 1, log2 N, 2, 9, 72 | `PT_IMEM`: write an instruction. `PT_DMEM`: write `prog_data[47:0]`. `PT_LINK`: set the link selection of `prog_grain` to `prog_data[2:0]`. One write per cycle. |
| `rd_grain`, `rd_addr` -> `rd_data` | log2 N, 9 -> 48 | read a data word of an idle grain; the data appears one cycle later |
| `start`, `start_mask`, `start_pc` | 1, N, 9 | start the masked grains at `start_pc` |
| `busy`, `halt_pulse` | N, N | running; one-cycle pulse after HALT |

The host should write to a grain's memories only while that grain is idle. A
host data write takes the own write port and overrides a write-back in the
same cycle.

## Worked example: the sum of 1000 numbers

`tb/tb_remorph_top.sv` runs the example at the default 4 x 4 size. Grains 0..3
(P1..P4, the north row) each hold 250 numbers. The loop on every grain has two
instructions:

```
0: SUM  <- SUM + mem[mem[PTR]]                (operand 2 indirect)
1: PTR  <- PTR - 1 ; if not zero goto 0
```

On its own the loop runs 250 passes of 7 cycles. With the HALT after it, a grain is busy
for 1757 cycles. The testbench runs the reduction in
the three ways the architecture compares:

| configuration | what changes | run time here |
|---------------|--------------|---------------|
| One   | nothing: links P1->P2->P3->P4 set once. Each grain polls a ready word from its west neighbour, adds and passes on. | 1802 cycles |
| Two   | three epochs. Epoch 1: P1 writes into P2, P4 into P3. Then the link into P3 is rewired to come from P2 and new code is downloaded. Epoch 2: P2, P3 add two numbers. Epoch 3: P3 adds two. | 1757 + 7 + 7 = 1771 cycles |
| Three | as Two, but all code is loaded first and only the link changes | same as Two |

The data download takes 1021 cycles: 1000 numbers and 20 control words at one
write per cycle. The original architecture reports 1910 cycles of run time for
configuration One and 1056 for the data download. The run time here is close
to it. In configurations Two and Three each of the two short epochs takes 7
cycles (the original lists 8).

## More kernels: factorial, matrix product, FFT

`tb/tb_remorph_kernels.sv` runs three small kernels with loops and fixed-point
arithmetic on the default 4 x 4 array. Each grain has its own program. The
factorials and the matrix product run side by side in one epoch.

- **Factorial** (grains 4..7). `ACC <- ACC * K; K <- K - 1, loop while not
  zero`. It works up to 10!, because operand A of the multiplier is 25 bits
  signed. A grain is busy for 7n + 5 cycles.
- **4 x 4 matrix product** (grains 0..3). Grain g holds row g of A and all
  of B. The inner loop multiplies `mem[mem[PA]] * mem[mem[PB]]` through two
  indirect operands and accumulates in memory. The outer loop stores each dot
  product through an indirect write-back pointer (`mem[mem[PO]] <- S`) and
  moves the B pointer to the next column. It is 13 instructions and takes 322
  cycles. Because the inner loop reads through pointers, it stalls often: an
  indirect operand waits for every older write.
- **8-point complex FFT** (grains 8..11). This is radix-2 decimation in time,
  generated as 64 instructions of straight-line code. Twiddles are Q17
  numbers. A product is scaled back in the same instruction that adds it,
  using the slice's `P >>> 17` Z input: `P <- (P >>> 17) + C`. Only W^1 and
  W^3 need the multiplier. It takes 134 cycles. Results are checked bit for
  bit against an integer model of the same steps. They are also checked
  against the exact transform, to within 4.

The FFT code generator in the testbench (`fft_gen`) shows how to build
straight-line programs from SystemVerilog. The instruction memory holds 512
words, so an unrolled FFT of 64 or more points does not fit one grain. It
needs loops or several grains.

## Simulating

Every testbench prints one `TB_RESULT checks=N failures=M` line and stops
itself. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/remorph_pkg.sv tb/remorph_asm_pkg.sv tb/tb_remorph_top.sv \
    --top-module tb_remorph_top
./obj_dir/Vtb_remorph_top
```

Replace `tb_remorph_top` with `tb_compute_element`, `tb_instr_mem`,
`tb_data_mem`, `tb_sequencer`, `tb_grain` or `tb_link_switch` to test one
block, or with `tb_remorph_kernels` for the kernels. `tb/remorph_asm_pkg.sv` has the helpers that build instructions
(`mk(...)`, `op_add()`, `op_sub()`, `op_mul()`, `op_pass()`, `halt(addr)`).
Use them to write new grain programs. All testbenches run in well under a
second.

What the testbenches cover:
- `tb_compute_element`: 600 random operations over 14 control words, checked
  against a 64-bit integer model, including the two-cycle latency.
- `tb_sequencer` and `tb_grain`:
  - loops with indirect operands
  - indirect write-back
  - multiply
  - branches on the zero, negative and equal flags
  - NOP
  - link output
  - neighbour writes that arrive while the grain runs
  - exact busy-cycle counts
- `tb_link_switch`: random configurations, including edge selections, on a
  3 x 4 mesh.
- `tb_remorph_kernels`: the kernels above, checked against models in the
  testbench.
- `tb_remorph_top`: the workload above. It counts the following mechanisms and
  requires each to occur: link writes, link reconfigurations, taken
  conditional branches, indirect reads, HALTs, code downloads between epochs,
  polling waits, multi-grain epochs, pipeline stalls on a read-after-write
  and overlapped issue (a new instruction entering P while an older one is
  still in E1 or later).

## Departures from the original architecture, and how far to trust this RTL

- **Pipeline.** The architecture names a five-stage pipeline but does not
  describe the stages or how it handles hazards. The stage contents and the
  interlocks here are this implementation's own. Issue is limited to one
  instruction every 2 cycles by the two data-memory read ports. Cycle counts
  are within about 10% of those the architecture reports for the example.
- **Encodings.** The instruction word's field widths match the original. The
  bit positions, the HALT and NOP encodings, the flag set and the branch
  conditions are this implementation's own. Programs written for the original
  encoding will not run unchanged.
- **Slice control word.** It is read as DSP48E1 OPMODE + ALUMODE + CARRYINSEL.
  The function table follows that slice, not a listing from the original
  design. The pre-adder and D input of the DSP48E1 are not used.
- **Link reconfiguration.** On the FPGA, links are rewired by partial
  reconfiguration through the device's configuration port. The reported cost
  is about 10 cycles per context switch. Here a link change is a register
  write (one cycle per link). A link carries the full 48-bit word plus a
  9-bit address and an enable. The original places links about 20 wires wide.
- **Not built.**
  - The FPGA configuration port.
  - The host that sequences epochs (its interface is the top's ports).
  - The stacked 3D memory plane, which was proposed only as future work.
- **Sizes.** The memory sizes (512 x 72 instructions, 512 x 48 data) and the
  slice widths are the original ones. The 4 x 4 array size is a parameter
  default chosen here; about 40 grains would fit the FPGA the original
  targets (e.g. `ROWS=5, COLS=8`). The original grain takes 41 registers
  and 196 LUTs besides its block RAMs and DSP slice. The grain here has about
  400 flip-flops, most of them the instruction registers of the pipeline
  stages. Its cost has not been measured on an FPGA.
- **Reset.** There is an asynchronous active-low reset of control state,
  registers and link selections. Memories are not reset.

## Files

| file | content |
|------|---------|
| `rtl/remorph_pkg.sv` | widths, `instr_t`, `ctrl_t`, `flags_t`, `link_t`, enums |
| `rtl/compute_element.sv` | DSP48E1-style slice with flags |
| `rtl/instr_mem.sv`, `rtl/data_mem.sv` | grain memories |
| `rtl/sequencer.sv` | five-stage pipelined micro-sequencer |
| `rtl/grain.sv` | one tile |
| `rtl/link_switch.sv` | programmable near-neighbour links |
| `rtl/remorph_top.sv` | the array |
| `tb/remorph_asm_pkg.sv` | instruction-building helpers |
| `tb/tb_*.sv` | one self-checking testbench per block, plus the end-to-end test |
| `tb/tb_remorph_kernels.sv` | factorial, matrix product and FFT on the array |
