# FFT on unfolded swapped networks

A radix-2 FFT is usually drawn as a butterfly network: log2 N columns of
nodes, where column c joins rows that differ in bit c. Built literally, that
network needs long wires. The late columns join rows that are N/2 apart, and
a network cut into chips needs many chip-to-chip links.

An **unfolded swapped network (USN)** computes the same FFT from small
butterfly networks that stay local. A nucleus B_n is an n-dimensional
butterfly with 2^n rows and n+1 columns. Copies of it are placed in a chain
of blocks. Between two blocks sits one column of **swap links**, which
exchange the lowest row digit with a higher one. Each nucleus only ever works
on the lowest n row bits. The swaps bring every other group of row bits down
to that position in turn. All butterfly wiring stays inside a nucleus. The
only long wires are the swap links, and a network of depth r has one level
of swap links per depth.

This repository gives synthesizable SystemVerilog for two such networks:

* `usn_fft`: the family URHSN(l_r, ..., l_1, B_n). Its default is
  URSN(1, B_2) = UHSN(2, B_2), a 16-point FFT on 16 rows and 6 columns. It is
  fully pipelined: one frame per clock, results 5 clocks later.
* `usn_mixed_fft`: a non-uniform member of the family, built from modules of
  two sizes. Its default is a 32-point FFT from four 8-input and eight 4-input
  butterfly modules, with results 6 clocks later.

`usn_top` holds both networks side by side with separate ports.

## Network structure

Rows are numbered with M bits, written as digits. Digit 1 is the lowest.

**UHSN(l, B_n)**, for one level of unfolding (`DEPTH = 1`, `LEVELS = l`), is
built as follows:

* Rows have l digits of n bits each, so M = l*n.
* Along the column axis there are l blocks. Each block is a column of
  2^(M-n) copies of B_n. Each copy owns 2^n consecutive rows and works on
  digit 1.
* The links after block i (i = 1 .. l-1) exchange digit 1 with digit i+1.
  Row q of the next block receives from the row whose digits 1 and i+1 are
  swapped.

**URHSN(l_r, ..., l_1, B_n)**, the recursive form (`DEPTH = r`), uses the
whole depth-(r-1) network as the nucleus of a UHSN with l_r levels. At
depth d a digit is n*l_1*...*l_(d-1) bits wide. The network has
l_1*...*l_r blocks. To find the boundary after block k, write k+1 in the
mixed radix (l_1, l_2, ...). The boundary belongs to the shallowest depth d
whose digit is non-zero. That digit, i, selects which row digit is exchanged
with digit 1.

Every l_d equals `LEVELS` unless `LEVELS_VEC` gives depth d its own factor
in bits [4d-1:4d-4]. For example, `LEVELS_VEC = 'h32` with `DEPTH = 2`
builds URHSN(3, 2, B_n). With all l_d = 2 the network is
**URSN(r, B_n)**: 2^(n*2^r) rows and (n+1)*2^r columns.

Some examples (all of them are tested):

| network | N | columns | swap boundaries |
|---|---|---|---|
| URSN(1,B_2) = UHSN(2,B_2) (default) | 16 | 6 | bits [1:0] <-> [3:2] |
| UHSN(3,B_1) | 8 | 6 | bit 0 <-> 1, then bit 0 <-> 2 |
| URSN(2,B_1) | 16 | 8 | 0<->1, [1:0]<->[3:2], 0<->1 |
| URSN(2,B_2) | 256 | 12 | [1:0]<->[3:2], [3:0]<->[7:4], [1:0]<->[3:2] |
| URHSN(3,2,B_1) | 64 | 12 | 0<->1, [1:0]<->[3:2], 0<->1, [1:0]<->[5:4], 0<->1 |

Inside a nucleus, a node in row p of column c (c = 1..n) reads row
p & ~(1<<(c-1)) as `u` and row p | (1<<(c-1)) as `v` from column c-1. It
computes `u + w*v`. Column 0 of every block computes nothing: it is the
network input, or the column of nodes that the swap links feed.

## How the FFT maps onto the network

This is the part that takes the most care. The network *emulates* an
M-stage decimation-in-time butterfly FFT.

1. **Inputs** enter in bit-reversed order: row p of column 0 holds
   x_bitrev(p). The ports take natural order, and `usn_fft` wires the
   reversal.
2. **Stages.** Nucleus column c of block k performs FFT stage s = k*n + c.
   The swaps make sure that the row bit the nucleus works on is always the
   next bit of the emulated butterfly. Block k works on the emulated
   digit k+1.
3. **Emulated row.** The data in physical row p of block k belongs to
   emulated butterfly row E. To find E, follow the data backwards through the
   swap boundaries k-1, ..., 0 (`usn_pkg::emu_row`). In the 8-point
   UHSN(3,B_1), the first columns of blocks 1 and 2 emulate these rows:
   `0 2 1 3 4 6 5 7` and `0 4 1 5 2 6 3 7`.
4. **Twiddles.** The node that performs stage s for emulated row E uses
   w_{2^s}^(E mod 2^s) = w_N^((E mod 2^s) * 2^(M-s)), where w_N = e^(-j2pi/N).
   Every twiddle is a constant worked out at elaboration (`usn_pkg::tw_exp`,
   `tw_re`, `tw_im`, using `$cos`/`$sin` on constants). There is no twiddle
   ROM.
5. **Outputs** leave the last column in the network's own order. Physical
   row p carries z_E, where E is that row's emulated row. In the 8-point case
   the order is z0 z4 z1 z5 z2 z6 z3 z7. `usn_fft` undoes this with wiring,
   so `z_re[k]`/`z_im[k]` is z_k.

So `z_k = sum_i x_i * exp(-j*2*pi*i*k/N)`, with no 1/N scaling, in the
network's fixed-point arithmetic.

## The mixed-module network

`usn_mixed_fft` has 2^(A+B) rows. Block 0 is 2^B modules B_A. Block 1 is
2^A modules B_B. The link column sends output j of first-stage module i to
input i of second-stage module j. In row-bit terms, the low A bits and the
high B bits change places. This is the swap rule with digits of unequal
width. The modules do FFT stages 1..A and then A+1..A+B, with twiddles
chosen by the same emulated-row rule. Port order is natural, as in
`usn_fft`.

## Arithmetic and number format

The architecture fixes only the operation of a node, y = u + w*v. The
number format is this design's choice:

* Every value is complex. The real and imaginary parts are `DATA_W`-bit
  two's complement (default 16).
* Twiddles are `TW_W`-bit (default 16) with 14 fraction bits, so 1.0 = 16384.
* `w*v` is rounded to nearest (ties up) back to `DATA_W` bits. The sum is
  **not scaled** and wraps on overflow.

Because nothing is scaled, an N-point transform can grow by about
N*sqrt(2). Keep log2(N)+1 bits of headroom. For example, the testbenches
limit samples to ±2^(DATA_W-1)/(2N). In the tests, rounding error stays
within a few LSBs of the exact DFT.

## Timing

* Every column after column 0 is one register stage. This is the "unit time
  per column" of the architecture. Latency = columns - 1:
  * `usn_fft`: l_1*...*l_r*(n+1) - 1 cycles. This equals (1 + 1/n)*log2 N - 1 for
    URSN. The default is 5.
  * `usn_mixed_fft`: A + B + 1 cycles. The default is 6.
* A new frame can enter every clock. A `valid` bit travels with the data.
  There is no stall and no back-pressure.
* `rst_n` is synchronous and active low. It clears only the valid pipeline.
  The data registers are not reset.

## Files

| file | contents |
|---|---|
| `rtl/usn_pkg.sv` | swap rule, emulated-row and twiddle functions (elaboration-time) |
| `rtl/bfly_node.sv` | one node: registered u + w*v with a constant twiddle |
| `rtl/bn_nucleus.sv` | one B_n copy: n columns of nodes with position-dependent twiddles |
| `rtl/swap_stage.sv` | one column of swap links and the nodes they feed (uniform or unequal digits) |
| `rtl/usn_fft.sv` | URHSN FFT network, parameters `N_BF` (n), `LEVELS`, `DEPTH` (r), `LEVELS_VEC`, `DATA_W`, `TW_W` |
| `rtl/usn_mixed_fft.sv` | two-stage network of unequal modules, parameters `A`, `B`, `DATA_W`, `TW_W` |
| `rtl/usn_top.sv` | both networks at their defaults |
| `tb/usn_fft_checker.sv` | frame generator and DFT scoreboard shared by the network tests |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_usn_fft_configs` |

The testbenches are:

* `tb_bfly_node` checks the node against a double-precision model.
* `tb_bn_nucleus` uses a lone B_3 as an 8-point FFT.
* `tb_swap_stage` checks four boundaries against permutations built by bit
  slicing.
* `tb_usn_fft` runs the default network.
* `tb_usn_fft_configs` runs UHSN(3,B_1), URSN(2,B_1), URSN(2,B_2),
  UHSN(2,B_3), URHSN(3,2,B_1) and URHSN(2,3,B_1). For UHSN(3,B_1) it also checks the emulated-row labels, the
  twiddle powers and the scrambled output order of the reference 8-point
  example.
* `tb_usn_mixed_fft` runs the 8x4 and 4x8 module networks.
* `tb_usn_top` runs both networks at full default size.

Every testbench prints `TB_RESULT checks=N failures=F`. The network tests
check every output bin and the exact latency. They also count back-to-back
frames, idle gaps and link-column crossings, and fail if any of these never
happened.

## Simulating

With Verilator 5 (from the repository root):

```sh
verilator --binary --timing -Irtl -Itb rtl/usn_pkg.sv rtl/bfly_node.sv \
  rtl/bn_nucleus.sv rtl/swap_stage.sv rtl/usn_fft.sv rtl/usn_mixed_fft.sv \
  rtl/usn_top.sv tb/usn_fft_checker.sv tb/tb_usn_top.sv --top-module tb_usn_top
./obj_dir/Vtb_usn_top
```

To run another test, replace `tb_usn_top` with its name. Each test runs in
well under a second.

To build another network, override the parameters of `usn_fft`, for
example `#(.N_BF(1), .LEVELS(3), .DEPTH(1))` for the 8-point UHSN(3,B_1).
Widen `DATA_W` for larger N.

## Limits and departures

* The network is fully unrolled: N*log2(N) computing nodes, each with a constant
  complex multiplier. Large N is limited by area and tool memory, not by the
  RTL. The largest size simulated is 256 points.
* A depth's unfolding factor is at most 15, and there are at most 8 depths.
  These limits come from the 4-bit packing of `LEVELS_VEC`.
* The mixed-module network has exactly two module sizes. Its link wiring
  (output j of module i to input i of module j) is this design's choice of
  a complete module-to-module connection.
* The nodes compute only the FFT step u + w*v. Other ascend/descend
  algorithms (sorting, for example) map onto the same network but would need
  different node logic. That logic is not provided.
* Input bit reversal and output reordering are done in wiring. The internal
  last column keeps the network's own order.
* Layout and packaging are not represented in the RTL. This covers the
  grid-model placement of the central swap column and the split of a large
  URSN into chips of URSN(r-1, B_n). In the RTL hierarchy, each
  `bn_nucleus` is such a sub-network for r = 1.
