# A cFA-based embedded FPGA fabric

Cryptographic kernels are dominated by XOR, AND, shifts and additions, and rarely by random
multi-input functions. A regular FPGA spends most of its area on look-up tables (LUTs) that can
compute any function. This fabric uses a much smaller logic element instead: the *configurable
full adder* (cFA). Four configuration bits turn one cell into a full adder or into one of a
handful of simple gates. An FPGA made of these cells is smaller per logic element. It also suits
bit-serial and bit-sliced cipher datapaths, because their basic steps are exactly these
operations.

This repository holds synthesizable SystemVerilog for the whole fabric: the logic cell, the slice
and the CLB, the routing (connection blocks, switch blocks and IO sites), and a serial
configuration memory. Two alternative cells are included as stand-alone modules, for
experiments.

## The cFA cell (`cfa_cell`)

A full adder has two halves: a sum half, `S = A ^ B ^ C`, and a carry (majority) half,
`Cout = maj(D, E, F)`. In the cFA the two halves have separate inputs, so one cell can compute two
independent functions. Each half has two configuration bits:

* `f0` ANDs the first input of the half with the configuration bit. With `f0 = 0`, that input
  is forced to 0.
* `f1` ORs the third input with the configuration bit. With `f1 = 1`, that input is forced
  to 1.

| half | f0 f1 | function |
|------|-------|----------|
| sum   | 1 0 | `A ^ B ^ C` (XOR3, the full-adder sum) |
| sum   | 0 0 | `B ^ C` (XOR2) |
| sum   | 0 1 | `~B` (NOT) |
| sum   | 1 1 | `~(A ^ B)` (XNOR) |
| carry | 1 0 | `maj(D, E, F)` (full-adder carry) |
| carry | 0 0 | `E & F` (AND) |
| carry | 0 1 | `E` (buffer) |
| carry | 1 1 | `D | E` (OR) |

With both halves set to the adder setting, the cell is a full adder: feed the same three
signals to A/B/C and to D/E/F.

## Slice and CLB (`cfa_slice`, `clb`)

A slice is one cFA cell with 6 inputs `{F,E,D,C,B,A}` and 2 outputs `{Cout,S}`. Behind each
output there is a D flip-flop and a bypass multiplexer. A bypass bit of 1 makes that output
combinational; a bypass bit of 0 makes it registered. A slice has 6 configuration bits.

A CLB holds 4 independent slices: 24 inputs, 8 outputs and 24 configuration bits. The slices are
not chained inside the CLB. A carry chain, such as a bit-serial adder whose carry loops back
through a flip-flop, is built through the routing. The flip-flops have a synchronous active-low
reset, `rst_n`, shared by the whole fabric.

## Routing fabric (`efpga_top`)

The fabric is island-style. It has a `W x H` grid of CLBs, with routing channels of `CW` wires
around every CLB and a switch block (SB) at every channel crossing.

**Coordinates.** CLB(i,j) has 1 ≤ i ≤ W and 1 ≤ j ≤ H. SB(x,y) sits at the upper-right corner
of CLB(x,y), with 0 ≤ x ≤ W and 0 ≤ y ≤ H. The horizontal segment `chanx(x,y)` joins SB(x-1,y)
and SB(x,y). The vertical segment `chany(x,y)` joins SB(x,y-1) and SB(x,y).

**Unidirectional wires.** Each segment has CW wires. Wires 0..CW/2-1 run east or north; wires
CW/2..CW-1 run west or south. Only a multiplexer at the wire's start drives it, so there are no
tri-states and no bidirectional switches.

**Segments.** A wire spans `SEG_LEN` CLBs. On the outgoing side of an SB, track `t` starts a new
wire when `(pos + t) % SEG_LEN == 0`, where `pos` is x for east/west sides and y for north/south
sides. A track also starts when there is no opposite side for it to come from. Otherwise the
incoming wire on the opposite side passes straight through. The start points are staggered by
track, so every SB starts some wires and passes others.

**Switch-block multiplexer.** Sides are numbered N=0, E=1, S=2, W=3. The multiplexer for
starting track `t` on side `s` has these inputs, in this order:

1. From each other existing side `s'`: the `SEG_LEN` incoming tracks `(t + i + rot) % (CW/2)`,
   for `i = 0..SEG_LEN-1`.
   * `rot = 0` for the straight-through side.
   * `rot = SEG_LEN` for `s' = s+1`.
   * `rot = CW/2 - SEG_LEN` for `s' = s+3`.

   The rotation spreads turns over different tracks.
2. Two outputs of the CLB at this corner: outputs `o` and `o+1`, with `o = 2*((t/SEG_LEN + s) % 4)`.
   SBs in row 0 or column 0 use the nearest CLB.
3. The input pads of the IO sites that enter the fabric at this SB.

**Connection block.** The 6 inputs of slice q come from the channel on side q of the CLB:
* slice 0 from N, `chanx(i,j)`;
* slice 1 from E, `chany(i,j)`;
* slice 2 from S, `chanx(i,j-1)`;
* slice 3 from W, `chany(i-1,j)`.

Each input pin has a multiplexer over all CW wires of that segment.

**IO sites** (`io_block`). There is one IO site per perimeter segment, so `2W+2H` in total,
numbered:
* bottom `chanx(x,0)`: 0..W-1;
* top `chanx(x,H)`: W..2W-1;
* left `chany(0,y)`: 2W..2W+H-1;
* right `chany(W,y)`: 2W+H..2W+2H-1.

A site's output pad is a multiplexer over the CW wires of its segment. Its input pad enters the
fabric through the SB at the segment's outer end: bottom and top sites at SB(x,·), left and right
sites at SB(·,y).

**Multiplexer encoding.** Every configurable multiplexer uses the same encoding (`cfg_mux`).
Select value 0 drives 0; select value k drives input k-1. A multiplexer over n inputs has
`$clog2(n+1)` select bits.

**Combinational loops.** Any routing fabric can be programmed into a loop. Verilator therefore
reports `UNOPTFLAT` on the channel arrays. This is inherent to the design and not a bug.

## Configuration memory (`config_memory`)

All configuration bits form one long shift register, `cfg_in` → `cfg_out`. While `cfg_en` is
high, one bit is shifted in per clock, bit 0 first. The layout, from bit 0:

1. CLBs, row by row (j outer, i inner), 24 bits each.
2. Connection blocks, in the same order, `24*$clog2(CW+1)` bits each.
3. Switch blocks, row by row (y = 0..H, x = 0..W). Each SB has a varying number of bits, which
   depends on its starting tracks and inputs.
4. IO sites, in the IO numbering above, `$clog2(CW+1)` bits each.

`efpga_pkg` computes every offset (`clb_cfg_offset`, `sb_cfg_offset`, `total_cfg_bits`, ...).
At the default size of 8×8, with CW = 16 and SEG_LEN = 4, the bitstream is 12,496 bits long. At
4×4 it is 3,456 bits long.

While the power-on reset `por_n` is low, or while `cfg_en` is high, the configuration word seen
by the fabric is forced to all zeros: every multiplexer off, every cell constant. A partly loaded
bitstream therefore cannot build an oscillating loop. `por_n` also clears the stored bits.

## Alternative cells (`cfa3_slice`, `newcell_slice`)

* **`cfa3_slice`** (merged cFA). Both halves of the cell share the three inputs A, B and C. A
  2:1 multiplexer, controlled by configuration bit `sel_side2`, picks the sum half (0) or the
  carry half (1). One flip-flop and bypass follow. It saves input routing but loses the ability
  to compute two functions at once.
* **`newcell_slice`**. A two-output cell built from plain gates:
  * side 1 computes OR, AND, XOR or passes A1;
  * side 2 computes OR, AND, XOR or a 2:1 multiplexer `b1 ? b2 : a2`, steered by the B1 input
    of side 1;
  * each output has an optional inverter and a bypassable flip-flop.

  `fn` encoding: 0 = OR, 1 = AND, 2 = XOR, 3 = pass/mux.

Both are complete, tested slices. The fabric top does not use them; `efpga_top` is built from
the two-output cFA slice.

## Parameters and assumed sizes

| parameter | default | notes |
|-----------|---------|-------|
| `W`, `H` | 8, 8 | CLB array size |
| `CW` | 16 | channel width, even |
| `SEG_LEN` | 4 | wire length in CLBs. SEG_LEN ≤ CW/2 keeps the turn rotation meaningful |
| slice / CLB | 6 in, 2 out, 4 slices | fixed, in `efpga_pkg` |

The logic cell, slice and CLB organisation are those of the original design. Array size,
channel width and segment length are chosen here. The routing pattern is also this design's
own: segment staggering, turn rotation, which CLB outputs reach which SB tracks, the connection
block's one-side-per-slice rule, the IO model and the multiplexer encoding. The original design
counted multiplexer configuration bits differently. It also evaluated the fabric with an
external place-and-route flow, which is not part of this RTL.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/efpga_pkg.sv tb/cfa_cell_tb.sv --top-module cfa_cell_tb
./obj_dir/Vcfa_cell_tb
```

* **`efpga_top_tb`** runs the fabric end to end at 4×4 with SEG_LEN = 2. It contains a small
  maze router written in SystemVerilog. This router places and routes these circuits:
  * a bit-serial adder, whose carry loops through a registered Cout;
  * the eight cell functions, each to its own output pad;
  * a three-CLB shift register;
  * a pad-to-pad connection.

  The router emits the bitstream and shifts it in through `cfg_in`. The testbench then drives
  random inputs and compares every output pad with a reference model. It counts each mechanism:
  * all eight cell modes;
  * registered and bypassed outputs;
  * wires driven from pads and from CLBs;
  * straight, turning and pass-through switch-block hops;
  * multiplexers in edge switch blocks, which have fewer than four sides.

  A mechanism that never occurs counts as a failure.
* **`efpga_full_tb`** runs the same flow on the top at its default parameters. It takes a few
  minutes to build and about 3–4 minutes to run.

Verilator prints `UNOPTFLAT` warnings for the routing loops, as noted above, so build with
`-Wno-fatal`.

## How far it can be trusted

* Each leaf block was checked against an independent reference model. Each testbench was also
  shown to fail on a deliberately broken copy of its block.
* The cell truth tables match the full adder and the gate functions listed above.
* The fabric has only been exercised with the testbench router's circuits. No timing or area
  numbers come from this RTL.
* Cipher-sized workloads do not fit the default 8×8 array: it has 256 cFA cells, which is 512
  halves. To run such a workload, scale `W` and `H` up. The bitstream size grows roughly with W·H.
