# Transpose memory for the HEVC 2-D inverse DCT

An HEVC decoder reconstructs each residual block with a 2-D inverse transform
over a transform unit (TU) of 4x4, 8x8, 16x16 or 32x32 samples. Hardware does
this by row-column decomposition: a 1-D IDCT runs over one axis of the
coefficient block, the 16-bit intermediate result is transposed, and a
second 1-D IDCT runs over the other axis. The transpose memory between the
two passes is the hard part once TU sizes vary. It must hold up to
32 x 32 x 16 bits, accept TUs of any size in any order, and still give the
second 1-D unit a steady stream.

This RTL provides that transpose stage in two forms, side by side under one
top module, so that they can be compared under the same traffic:

* **register form** (`reg_tm`): a 32x32 array of registers. The shift
  direction of the array swaps at every TU, so it needs no second buffer and
  moves one full vector in and one out per clock.
* **RAM form** (`ram_tm`): four single-port RAM banks holding the TU in a
  diagonal (skewed) layout, driven by an address generator (`agm`). It moves
  four samples per clock: it writes a whole TU, then reads it back column by
  column.

The register form is much faster. The RAM form needs a small fraction of the
flip-flops. Which to use is a trade of area against throughput. The two
forms follow a published design study of both kinds of memory for the HEVC
2-D IDCT. The details listed under *Choices made in this RTL* are this
design's own.

## Where it sits

```
 coefficients      first 1-D IDCT      transpose memory      second 1-D IDCT     residual
 (column by   --> (shift 7, clip 16) --> reg_tm or ram_tm --> (shift 12)       --> rows
  column)           row vectors          column vectors
```

The 1-D IDCT units are not part of this RTL. The design is meant to sit
between two existing pipelined units that handle every TU size. The top
module `idct2d_tm_top` brings out, for each form, the port that takes the
first unit's output (`reg_in_*`, `ram_in_*`) and the port that feeds the
second unit (`reg_out_*`, `ram_out_*`). `tb/idct1d_model.sv` is a
behavioural model of such a unit, used by the testbenches. It computes the
HEVC integer inverse core transform with no latency.

### Vector interface (both forms)

| signal | dir | meaning |
|---|---|---|
| `in_valid` / `in_ready` | in / out | one row vector offered / taken |
| `in_size` | in | TU size code `tu_size_e`: 0 = 4x4, 1 = 8x8, 2 = 16x16, 3 = 32x32. It must stay constant for all N vectors of one TU. |
| `in_data[32]` | in | 16-bit samples. Lanes 0..N-1 are used and the rest are ignored. |
| `out_valid` / `out_ready` | out / in | one column vector offered / taken |
| `out_size` | out | size code of the TU being read out |
| `out_last` | out | last column of that TU |
| `out_data[32]` | out | column vector. Lanes at or above N are zero. |

A TU of N x N is N input vectors. Vector r carries sample (r, c) on lane c.
Output vector c carries sample (r, c) on lane r. Both sides use ordinary
valid/ready: a transfer happens in a cycle where both are high. Valid never
waits for ready. `in_ready` and `out_valid` of the register form depend
combinationally on `in_valid` and `out_ready`, as explained below. Reset,
`rst_n`, is active-low and asynchronous. It clears control state only. Sample
storage is not reset, because nothing is read before it has been written.

Because the second 1-D unit only gets data once a whole TU has passed the
first unit, `out_valid` is low for a while after every TU boundary. That is
the control path the second unit has to follow. With this handshake, the
second unit simply waits for `out_valid`.

## The register form: swapping the shift direction

The array holds cells `q[i][j]`, i = row and j = column, 0..31. Each cell
(`tm_cell`) is a 16-bit register with a three-way multiplexer. It can take
the cell to its right, the cell below it, or one lane of the input vector.
Which one it takes depends on two signals. `dir` gives the direction of the
current pass. `load_ext` is high if the cell is on the entry edge.

| `dir` | the array shifts | input lane k enters at | output lane k is |
|---|---|---|---|
| 0 | up (each cell takes the one below) | cell (E, k), the bottom row of the TU | `q[0][k]` (row 0) |
| 1 | left (each cell takes the one to its right) | cell (k, E), the right column of the TU | `q[k][0]` (column 0) |

Consider TU A written with `dir = 0`. After N shifts, the vector that arrived
r-th sits in row r, so `q[r][c]` = A(r, c). The next TU, B, is written with
`dir = 1`. At its t-th shift, column 0 holds what was column t of A, so the
output vector is column t of A: A(0, t), A(1, t), .... At the same time B's
vectors enter at column E and march left. After N shifts, B's vector r sits
in column r, and the next TU with `dir = 0` pushes B out row by row. Row r
then holds B(·, r), which is again a column of B. Every TU is therefore
written along one axis and read along the other, and the direction
alternates with each TU. The array never holds more than one TU plus the
part of the next one that has already entered.

### Mixed sizes: phases

A *phase* is the passage of one TU boundary. It lasts L = max(N_in, N_out)
shifts. N_in is the size of the TU coming in, and N_out is the size of the
stored TU going out (0 if there is none). The entry edge is E = L - 1.

* A vector is taken on each of the first N_in shifts. The vector taken at
  shift s ends up in row or column s, because it still moves L - 1 - s
  places after it entered at L - 1.
* A column leaves on each of the first N_out shifts. Column s of the old TU
  reaches row or column 0 after s shifts, because it only moves toward 0 and
  never passes the entry edge.
* If N_out > N_in, the remaining shifts only drain the old TU. If
  N_in > N_out, the remaining shifts only take input.
* Only cells inside the L x L corner are enabled. A 4x4 stream therefore
  toggles 16 registers, not 1024.

A shift happens in a cycle when every side the phase still needs is ready:
the input if s < N_in, and the output if s < N_out. This is why `in_ready`
depends on `out_ready` and `out_valid` depends on `in_valid`. The array
cannot take a vector without also giving one, as long as both are due.

When the array is idle, a new phase starts with the next shift. If a TU is
offered, that TU starts the phase, with the stored TU (if any) as N_out.
Otherwise, if a TU is stored, a *drain phase* with N_in = 0 starts, so the
last TU of a stream never stays stuck inside. A new TU that arrives during a
drain waits for the drain to end.

Timing:

* For a steady stream of N x N TUs, one vector goes in and one comes out
  every clock. T TUs take (T + 1)·N cycles, counting the final drain.
* The first column of a TU is offered in the cycle after its last row was
  taken, as long as the next TU is ready or the array drains.

## The RAM form: diagonal layout in four banks

Sample (r, c) of a TU is stored in

```
bank = (r + c) mod 4          word = r * 8 + c / 4
```

A row r is written in chunks of four lanes c = 4k .. 4k+3. All four banks
receive the same word address r·8 + k, and bank b stores lane
4k + ((b − r) mod 4). A column c is read in chunks of four rows
r = 4k .. 4k+3. Bank b is read at ((4k + m)·8 + c/4), where
m = (b − c) mod 4, and output lane 4k + m comes from bank (m + c) mod 4.
Either way, each bank serves exactly one sample per chunk, so there are
never bank conflicts. The data path only needs a 4-lane rotation by r mod 4
on writes and by c mod 4 on reads. `agm` computes the four addresses and the
rotation, and `sram_bank` is a plain synchronous single-port RAM of 256 x 16
with one cycle of read latency.

Example for a 4x4 TU. Each entry gives the bank of sample (r, c):

```
        c=0 c=1 c=2 c=3
 r=0     0   1   2   3
 r=1     1   2   3   0
 r=2     2   3   0   1
 r=3     3   0   1   2
```

Every row and every column uses all four banks once.

Sequencing (`ram_tm` state machine):

1. **write**: each row takes N/4 cycles. `in_ready` is high in the cycle that
   writes its last chunk, so the row is consumed then.
2. **read**: each column takes N/4 chunk reads on consecutive cycles. Each
   chunk is captured, un-rotated, into an output register one cycle later.
3. **out**: the finished column is offered. When it is taken, the memory
   reads the next column, or after the last column returns to *write*.

A single-port bank cannot be read and written in the same cycle, so TUs do
not overlap. An N x N TU costs N²/4 write cycles plus N·(N/4 + 2) read
cycles if the output is taken at once. For 32x32 that is 256 + 320 = 576
cycles.

## How the two compare

Measured by `tb_tm_throughput`, with 8 TUs of one size and no stalls:

| TU | register form: cycles (samples/clock) | RAM form: cycles (samples/clock) |
|---|---|---|
| 4x4   | 36 (3.56)   | 128 (1.00)  |
| 8x8   | 72 (7.11)   | 384 (1.33)  |
| 16x16 | 144 (14.22) | 1280 (1.60) |
| 32x32 | 288 (28.44) | 4608 (1.78) |

After generic synthesis (yosys, coarse):

* The register form has 16,415 flip-flop bits and about 6,300 word-level
  cells, which are mostly the 1024 cell multiplexers.
* The RAM form has 19 flip-flop bits of control, 4 x 256 x 16 bits of RAM,
  a 512-bit output register (inferred as memory), and about 250 cells.

The original study measured complete 2-D IDCTs on an FPGA, 1-D units
included. It reported about 2.2 times the throughput and about a third less
energy for the register form, at about 30 times the resources of the RAM
form. Those figures are not reproduced here.

These numbers describe the transpose stage alone. In a complete 2-D IDCT,
the throughput of the 1-D units caps the register form. A 1-D unit that
takes fewer than N samples per clock narrows the gap between the two forms
a great deal.

## Choices made in this RTL

The original work gives the overall structure: the two memory kinds, the
alternating row/column direction, four banks with a matrix-to-bank mapping,
an address generator, support for all four TU sizes, and 16-bit samples. It
does not fix the following, which are this design's own:

* **Full-vector interface.** One row or column of up to 32 samples moves per
  transfer, with valid/ready handshakes and a 2-bit size code.
* **Register form.** Entry at the bottom or right edge, output at row 0 or
  column 0, the phase rule for mixed sizes, the drain phase, and the enable
  gating.
* **RAM form.** The exact mapping formula, the fixed stride of 8 words per
  row for every TU size, the strict write-then-read sequencing, and the
  output register with its two extra cycles per column.
* **Bank size.** Bank depth is 256 words, one quarter of a 32x32 TU.
* **Reset.** Reset is asynchronous and active-low, and it resets control
  state only.

The 1-D IDCT units are left outside, since the transpose stage is designed
to work with existing ones. Power and FPGA resource figures are not
reproduced here.

## Files

`rtl/`

* `idct_tm_pkg.sv`: the `tu_size_e` size code and `tu_len()`.
* `tm_cell.sv`: one cell of the register array.
* `reg_tm.sv`: the register form (array plus phase control).
* `sram_bank.sv`: a single-port RAM bank.
* `agm.sv`: the address generator for the diagonal layout.
* `ram_tm.sv`: the RAM form (four banks, rotation, and state machine).
* `idct2d_tm_top.sv`: both forms side by side (top module).

`tb/` (self-checking; each ends with a `TB_RESULT checks=… failures=…` line)

* `tb_tm_cell`, `tb_sram_bank`, `tb_agm`: unit tests. `tb_agm` proves that
  every sample has one place and that column reads find what row writes put
  there.
* `tb_reg_tm`, `tb_ram_tm`: random TU streams of all sizes with random
  stalls on both sides. They also check the full-rate cycle count and the
  latency from the last row to the first column.
* `tb_idct2d_tm_top`: end-to-end test at default parameters. Random
  coefficient blocks go through model IDCT → transpose → model IDCT on both
  forms, and the result is compared with a directly computed 2-D inverse
  transform. It counts every mechanism (all sizes, size steps up and down,
  both array directions, drain phases, input and output stalls, the second
  unit waiting, the RAM write-to-read switch, and all four bank rotations)
  and fails if any of them never happened.
* `tb_tm_throughput`: the cycle counts in the table above, checked against
  the formulas.
* `hevc_dct_pkg.sv`, `idct1d_model.sv`: the HEVC core transform for the
  testbenches. The 32-point matrix entry (k, n) is the standard's rounded
  64·√2·cos(π·m/64) for m = (2n+1)·k mod 128, with the sign folded into
  0..32 and 64 for the DC row. The N-point matrices are rows k·32/N of it.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/idct_tm_pkg.sv tb/hevc_dct_pkg.sv \
  tb/tb_idct2d_tm_top.sv --top-module tb_idct2d_tm_top
./obj_dir/Vtb_idct2d_tm_top
```

To run another testbench, replace `tb_idct2d_tm_top` with its name. The
end-to-end test runs in about a second at full size.

To change the design:

* `MAX_N` must be a power of two from 4 to 32. A smaller value builds a
  memory for the smaller TUs only, and TUs larger than `MAX_N` are rejected
  by an assertion. The testbenches run at 32; smaller values have only been
  linted.
* `BANKS` (in `ram_tm`) must be a power of two that divides `MAX_N`.
* The size code must stay constant within a TU. An assertion checks this on
  both memories.
