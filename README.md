# Convolution co-processor for a stereo-navigation Harris detector

A stereo visual-navigation program running on an embedded PowerPC spends most
of its time in three convolutions inside its Harris corner detector. Every
camera image is cut into 96x96-pixel tiles, and each tile passes through this
chain:

```
            tile U (8-bit pixels)
           /                     \
   ConvConst (mask 1)       ConvConst (mask 2)        3x3 integer gradients
        Y1                        Y2
   Y1^2        Y1*Y2        Y2^2                       done by the processor
     |            |            |
  ConvRepl1   ConvRepl1    ConvRepl1                   11-tap float filter along rows
  ConvRepl2   ConvRepl2    ConvRepl2                   11-tap float filter along columns
```

This RTL is a bus peripheral that takes these three kernels off the
processor. It holds one hardware engine for each kernel, and each engine owns
a pair of dual-port RAMs. The processor fills the RAMs over its bus, starts
an engine through a register, polls a done bit and reads the result back. The
engines work on whole 96x96 matrices held in their RAMs, so a call costs one
start and one wait instead of 9216 function-level operations.

The design targets an FPGA with block RAM (the original ran on a Virtex-5
beside its PowerPC 440). It is written in plain synthesizable SystemVerilog
with no vendor primitives.

## The three kernels

All matrices are 96x96 and stored row-major: element (column `i`, row `j`) is
word `96*j + i` of its RAM. Every word is 32 bits wide.

**ConvConst** (`rtl/conv_const.sv`) computes 32-bit integer gradients:

    y[i,j] = sum over a,b in {-1,0,1} of  u[i+a, j+b] * h[1-a, 1-b]

Here `h` is a 3x3 kernel given row-major as nine integers. The application
uses the two masks `[-1 -1 -1; 0 0 0; 1 1 1]` and `[-1 0 1; -1 0 1; -1 0 1]`.
The kernel is flipped, as in a true convolution, so the first tap
(`a = b = -1`) multiplies by kernel word 8 and the last tap by word 0. The
pixels are 0..255, so integer arithmetic is exact: the engine multiplies and
accumulates in 32 bits.

**ConvRepl1 / ConvRepl2** (`rtl/conv_repl.sv`, parameter `VERTICAL`) run an
11-tap filter in IEEE-754 single precision. ConvRepl1 filters along each row
and ConvRepl2 along each column:

    y[i,j] = sum over k = 0..10 of  u[clamp(i+k-5), j] * h[10-k]     (rows)
    y[i,j] = sum over k = 0..10 of  u[i, clamp(j+k-5)] * h[10-k]     (columns)

`clamp` pins an index to the range 0..95, so the edge element is repeated.
The order of operations matters in floating point, and the engine keeps the
software's order:
- the accumulator starts at +0;
- the taps are taken for k = 0, 1, ..., 10;
- each product is rounded, then added to the accumulator with rounding.

The result therefore matches a strict single-precision evaluation of the
same loop, bit for bit.

## Floating point

`fp32_mul` and `fp32_add` are combinational single-precision units. They
round to nearest-even only and handle no exceptions, like the cut-down
software float library they replace.
- Subnormal inputs count as zero, and results that underflow flush to zero.
- Results that overflow become infinity.
- An exponent field of 255 is not recognised as Inf/NaN on input.

None of these cases can arise in this application: the largest magnitude the
filter sees is about 6e5. If you reuse the units elsewhere, keep these limits
in mind.

The adder orders its operands by magnitude and aligns the smaller one with
guard, round and sticky bits. It then adds or subtracts, normalises (a
leading-zero count after cancellation) and rounds. In an engine, a product and
a sum are evaluated in the same clock cycle, so the multiply-add chain is the
critical path of the core. Registering the product is the first thing to do
for a faster clock. It would add one cycle per output word.

## Engine interface and timing

All three engines have the same port list. It is built from three single-port
RAM interfaces named `u_rsc_singleport_*`, `h_rsc_singleport_*` and
`y_rsc_singleport_*` (addr, data_in, data_out, re, we), plus `clk`, `rst`,
`start` and `done`. The write side of `u` and `h`, and the read side of `y`,
exist but are held at 0.

- After reset, `done` is 1.
- `start` is sampled while the engine is idle. `done` drops on the next
  cycle and returns to 1 on the clock edge that writes the last Y word.
- If `start` is still high at that point, a new run begins. Software
  therefore clears `start` once it has seen `done` fall.
- RAM reads have one cycle of latency. `re` and the address are presented in
  one cycle, and the data is used in the next.

Each output word is produced by a fixed schedule with no stalls:

| engine      | read cycles (u and h together) | add | write | cycles per word | cycles per 96x96 run |
|-------------|-------------------------------|-----|-------|-----------------|----------------------|
| ConvConst   | 9                             | 1   | 1     | 11              | 101 376              |
| ConvRepl1/2 | 11                            | 1   | 1     | 13              | 119 808              |

H and Y share one RAM port (see below). The schedule never reads H in a cycle
that writes Y, and both engines assert this.

## Inside the core (`rtl/user_logic.sv`)

```
 bus (IPIF) ── plb_slave_if ── start[2:0] / done[2:0] ── engines
                    │
          port 1 of every RAM
                    │
   RAM1 U  ─ port 2 ─┐                   RAM2 Y/H ─ port 2 ─ hy_port_mux ─┐
                     └── conv_const ──────────────────────────────────────┘
   RAM3 U  ── conv_repl (rows)    ── hy_port_mux ── RAM4 Y/H
   RAM5 U  ── conv_repl (columns) ── hy_port_mux ── RAM6 Y/H
   six control RAMs (16,16,16,16,8,8 words), port 2 brought out as bs_*
```

**One RAM for Y and H.** Each engine's second RAM holds its result Y at
words 0..9215 and its coefficient vector H from word 14336
(`11100000000000b`). The engine issues H indices of only four bits, starting
at 0. `hy_port_mux` widens an H index with the fixed upper bits `1110000000`
and puts it on the RAM address while `h_re` is high. Otherwise the Y address
goes through. The port is enabled by `h_re | y_we` and writes on `y_we`.

**Dual-port RAMs.** Port 1 of every RAM is on the bus and port 2 on the
engine, so neither side has to arbitrate. The engines are independent: two or
all three may run at once on different data. The processor should not touch a
running engine's RAMs, but nothing prevents it.

`dpram` has these semantics:
- a write also returns the old word on its port (read-first);
- if both ports write the same word in one cycle, port 2 wins;
- `DOUT` holds its value while `EN` is low.

## Bus view (`rtl/plb_slave_if.sv`)

The ports are the Xilinx IPIF slave signals of a PLB peripheral, with bit 0
as the MSB (`Bus2IP_Addr[0:31]` and so on). The low 17 bits of `Bus2IP_Addr`
form a **word** address.

Memory accesses are qualified by `Bus2IP_CS`. Address bits 16..14 select one
of the six large RAMs, and bits 13..0 select the word:

| word address | bits 16..14 | RAM  | contents                                   |
|--------------|-------------|------|--------------------------------------------|
| 0            | 000         | RAM1 | U of ConvConst                             |
| 16384        | 001         | RAM2 | Y of ConvConst, H at 16384+14336 = 30720   |
| 32768        | 010         | RAM3 | U of ConvRepl1                             |
| 49152        | 011         | RAM4 | Y of ConvRepl1, H at 63488                 |
| 65536        | 100         | RAM5 | U of ConvRepl2                             |
| 81920        | 101         | RAM6 | Y of ConvRepl2, H at 96256                 |

Six small RAMs hold the ConvConst control arrays. They overlay RAM2 and are
selected by bits 16..10:
- `0011001` bSStart (25600)
- `0011010` bSEnd (26624)
- `0011011` bSPreEdges (27648)
- `0011100` bSPostEdges (28672)
- `0011101` bSNumPreEdges (29696)
- `0011111` bSNumPostEdges (31744)

A write there also lands in RAM2, which is harmless. A read returns the small
RAM's word.

Registers are selected one-hot by `Bus2IP_WrCE` and `Bus2IP_RdCE`:
- Registers 0, 1 and 2 are write-only. Their LSB drives `start` of ConvConst,
  ConvRepl1 and ConvRepl2. Register 3 is unused.
- Registers 4, 5 and 6 are read-only and return `done` of the same engines in
  the LSB. Register 7 reads 0.

Acknowledge timing:
- Writes are acknowledged in the cycle they are presented.
- Register reads return data with `IP2Bus_RdAck` in the same cycle.
- A memory read is acknowledged one cycle after `Bus2IP_CS` rises, when the
  RAM output is valid.
- `Bus2IP_BE` is ignored and `IP2Bus_Error` is always 0.

A call from software looks like this (ConvRepl1 shown):

```
write U to 32768..42, H (11 words) to 63488..
write 1 to register 1          // start
poll register 5 until 0        // engine has taken the start
write 0 to register 1
poll register 5 until 1        // finished
read Y from 49152..
```

## What differs from the original design, and what is missing

- **Margin control of ConvConst.** The original ConvConst reads six small
  control arrays (bSStart, bSEnd, bSPreEdges, bSPostEdges, bSNumPreEdges,
  bSNumPostEdges) to treat the outer margins of the tile. What they mean is
  not known. This ConvConst clamps indices at the tile edge instead, so
  border outputs may differ from the original. Away from the border the
  result is the plain 3x3 convolution. The control RAMs are present and bus-accessible, and
  their engine-side port is brought out of the top (`bs_re`, `bs_addr`,
  `bs_dout`) for that logic.
- **Engine schedules.** The original engines were generated by a C-to-RTL
  tool. Per tile, ConvConst took 97 938 to about 196 600 cycles, depending on
  its target clock. The 100 MHz versions of the ConvRepl engines took about
  1.45 million cycles each. Their float units were multi-cycle. Here, each
  tap takes one cycle, giving 101 376 and 119 808 cycles. Results and
  interfaces are the same, but cycle-level waveforms are not. In the original,
  ConvConst also read H one cycle ahead of U; here they are read together.
- **Core variants not built.** The original work also tried these variants:
  - sharing one RAM between ConvRepl1's Y and ConvRepl2's U (five RAMs);
  - engines with the H constants built in;
  - a version whose RAM ports are multiplexed between engines in five fixed
    phases, so that independent kernel calls overlap.
  Only the base core is implemented. It already lets different engines run
  at once, because each has its own RAMs.
- **The squaring step** between ConvConst and ConvRepl1 (Y1^2, Y2^2, Y1*Y2)
  is done by the processor, as in the original. It is not in the core.
- **Choices of this implementation:**
  - synchronous active-high reset;
  - one clock for everything;
  - word (not byte) addressing on the bus;
  - the acknowledge timing above;
  - read-first RAMs;
  - flush-to-zero float units.

## Sizes

One 96x96 matrix is 9216 words, and a large RAM has 16384. Y (0..9215) and H
(14336..14346) fit with room to spare. A full camera frame of 24 tiles is
processed one tile at a time by software, so tile size is the only limit. The
core holds 6 x 16384 + 4 x 16 + 2 x 8 words of 32 bits, which is 3.0 Mbit of
RAM.

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog.

| testbench          | what it covers |
|--------------------|----------------|
| `tb_fp32_mul`, `tb_fp32_add` | 50 000 operand pairs each: random, zeros, opposite signs, round-up carries. They are compared with a double-precision reference rounded to single by hand (`tb/fp_ref_pkg.sv`). Rounding twice is exact for one product or sum of two singles. |
| `tb_dpram`         | full 16K depth, random traffic on both ports, same-word clashes, read-back |
| `tb_hy_port_mux`   | H offset, Y pass-through, enables |
| `tb_plb_slave_if`  | every RAM and control-RAM decode, read data and acknowledge timing, start and done registers |
| `tb_conv_const`    | full tile with both gradient masks and a random kernel; exact cycle count 11*9216 |
| `tb_conv_repl`     | both directions at once on a full tile with the application's 11-tap vectors; bit-exact against a tap-by-tap reference; cycle count 13*9216 |
| `tb_user_logic`    | the whole core at its default size, driven over the bus as the software would (below) |
| `tb_harris_tile`   | the per-tile workload: all eight engine calls of one tile, overlapped (below) |

`tb_user_logic` plays the processor's part through one complete chain:
1. load the control arrays and read them back over the bus and through `bs_*`;
2. run ConvConst with mask 1;
3. square the result in the testbench and run ConvRepl1 on it, while
   ConvConst runs again with mask 2;
4. run ConvRepl2 on ConvRepl1's output.

Every word is checked. The testbench also counts the H reads and Y writes on
each shared port, the overlapping engine cycles, the control-RAM accesses and
the start/done handshakes.

`tb_harris_tile` runs the whole smoothing step of one tile:
- ConvConst with both masks;
- the three products Y1\*Y1, Y1\*Y2 and Y2\*Y2;
- ConvRepl1 and then ConvRepl2 on each product.

Calls that do not depend on each other run at the same time, in five phases:
1. ConvConst (mask 1);
2. ConvConst (mask 2) with ConvRepl1 on Y1\*Y1;
3. ConvRepl1 on Y1\*Y2 with ConvRepl2 on the first row result;
4. ConvRepl1 on Y2\*Y2 with ConvRepl2 on the second row result;
5. ConvRepl2 on the third row result.

All 73 728 result words match the reference. With the bus transfers, the
step takes about 857 000 clock cycles. The engines are busy for 202 752
cycles (ConvConst) and 359 424 cycles (each ConvRepl).

To run one with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/conv_pkg.sv tb/fp_ref_pkg.sv tb/tb_user_logic.sv --top-module tb_user_logic
./obj_dir/Vtb_user_logic
```

Replace the last file and the top module to run another testbench. Each one
finishes in well under a second.

## Files

- `rtl/conv_pkg.sv`: sizes, the H offset, the RAM select codes and the control-RAM map
- `rtl/user_logic.sv`: the top level
- `rtl/plb_slave_if.sv`: bus decoding, registers and read mux
- `rtl/conv_const.sv`, `rtl/conv_repl.sv`: the engines
- `rtl/fp32_mul.sv`, `rtl/fp32_add.sv`: single-precision arithmetic
- `rtl/hy_port_mux.sv`: the shared H/Y RAM port
- `rtl/dpram.sv`: the dual-port RAM
- `tb/`: testbenches and the float reference package
