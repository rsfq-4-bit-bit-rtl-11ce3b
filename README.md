# 4-bit bit-slice integer multiplier

A 4n x 4n-bit multiplier that never handles more than four bits of an operand
at a time. Both operands enter as n 4-bit slices, least significant first, one
pair per clock; the 8n-bit product leaves as 2n 4-bit slices, least
significant first, one per clock. Between them sits a chain of n identical
systolic cells and one final addition cell. Each cell holds 16 AND gates and
16 full adders, so the hardware grows linearly with the operand width, where
a parallel array multiplier grows with its square. The same hardware does
unsigned and two's-complement signed multiplication, selected per operation.

The organisation follows a published design for superconducting RSFQ
(rapid single-flux-quantum) logic, where every gate is clocked and small
circuits matter. This RTL is the algorithm and block structure of that design
as ordinary synchronous logic: one clock per step of the systolic schedule.
The default size is n = 2, an 8 x 8-bit multiplier.

## The slice schedule

Write X = X_{n-1} .. X_1 X_0 and Y = Y_{n-1} .. Y_0 in 4-bit slices, and call
the product's 4-bit column groups slices 0 .. 2n-1. For an operation started in
cycle 0:

* `start` is high in cycle 0 and moves one cell per clock, so it reaches cell i
  in cycle i. There it loads multiplier slice Y_i, which is on the shared `y`
  bus in exactly that cycle. Cell i keeps Y_i for the whole operation.
* Multiplicand slice X_j enters cell 0 in cycle j and moves one cell per *two*
  clocks, so it meets cell i in cycle 2i + j.
* The carry-save sum moves one cell per clock. Cell i works on product slice
  s in cycle i + s. In cycle 2i + j it is at slice i + j, which is exactly where
  the products of Y_i with X_j and X_{j-1} land.

So in cycle 2i + j (j = 0 .. n) cell i forms four partial-product rows for
product slice i + j. Row r (r = 0..3) is y_{4i+r} times the four multiplicand
bits x_{4j-r} .. x_{4j+3-r}. For r > 0 the row needs the top bits of X_{j-1},
which is why the cell keeps the previous X slice as well as the current one:

    row 0:  x_{4j+3}y_{4i}    x_{4j+2}y_{4i}    x_{4j+1}y_{4i}    x_{4j}y_{4i}
    row 1:  x_{4j+2}y_{4i+1}  x_{4j+1}y_{4i+1}  x_{4j}y_{4i+1}    x_{4j-1}y_{4i+1}
    row 2:  x_{4j+1}y_{4i+2}  x_{4j}y_{4i+2}    x_{4j-1}y_{4i+2}  x_{4j-2}y_{4i+2}
    row 3:  x_{4j}y_{4i+3}    x_{4j-1}y_{4i+3}  x_{4j-2}y_{4i+3}  x_{4j-3}y_{4i+3}

Cell i has partial products only in cycles 2i .. 2i + n. Before that (cycles
i .. 2i-1) it only passes the lower product slices on. These sixteen bits and
the three carry-save slices from cell i-1 go through the cell's 4-4
accumulator and leave as three carry-save slices for cell i+1. The final
addition cell turns the three slices from cell n-1 into one product slice per
clock. Product slice s appears on `z` in cycle n + 1 + s, so the product
occupies cycles n+1 .. 3n and an operation spans 3n + 1 cycles. Cell i is busy
with one operation from cycle i to cycle i + 2n - 1, so a new operation can
start every 2n clocks.

### Carries between slices

Each carry-save adder is a row of four full adders working on one slice per
clock. The carry out of its top bit belongs to the next, more significant
slice, which comes one clock later. A flip-flop holds it for that clock and
feeds it in as bit 0 of the next carry slice. The final Sklansky adder does
the same with its carry out. These held carries are cleared when `start`
passes, so nothing leaks from one operation into the next. This matters in
signed mode, where the sum can carry out of the top product slice.

## Signed multiplication

Signed operands use the Baugh-Wooley form of the product (N = 4n):

    Z = -2^{2N-1} + x_{N-1}y_{N-1}2^{2N-2}
        + sum_{k<N-1} ~(x_{N-1}y_k) 2^{N-1+k} + sum_{l<N-1} ~(y_{N-1}x_l) 2^{N-1+l}
        + sum_{l,k<N-1} x_l y_k 2^{l+k} + 2^N

Every partial-product bit that has exactly one sign bit as a factor is
complemented, and two constants are added. -2^{2N-1} is the same as +2^{2N-1}
modulo 2^{2N}. In the cells:

* `sign` is given with the last operand slices (cycle n-1) and is split. One
  copy travels with X_{n-1} as a tag bit, so every cell knows when bit 3 of a
  slice is x_{N-1}. The other copy goes straight to cell n-1, the only cell
  holding y_{N-1}, which latches it with `start`. Cell n-1 therefore has a
  slightly different PPG (`MSB_CELL`).
* Complementing row 3 of cell n-1 must not touch bits of X slices that do not
  exist (x_{-1} .. x_{-3} at j = 0, and x_{N}.. at j = n). Each X slice
  therefore also carries a `valid` tag. The top level sets it for the n
  operand cycles after `start`.
* The constants go into partial-product positions that are always empty in
  the cell's last step (j = n, where X_j does not exist). 2^N is row 0, bit 0
  of cell 0 at product slice n. 2^{2N-1} is row 3, bit 3 of cell n-1 at product
  slice 2n-1. So cell 0 also has a PPG variant (`LSB_CELL`). For n = 1 both
  variants are in the same cell.

## Blocks

| module | what it is |
|---|---|
| `bitslice_mult` | top: operand tagging counter, n `main_cell`s, `final_add_cell`, `z_valid` |
| `main_cell` | Y register (loaded by Start), two X registers plus forwarding, Start and Sign flip-flops, Sign register in cell n-1, PPG, 4-4 accumulator, registered carry-save outputs |
| `ppg` | 16 AND gates plus sign complementing and correction constants |
| `acc44` | four chained 4-bit carry-save adders: (pp0+pp1+pp2), (+pp3), (+S_in0, carry slice out as S_out0), (+S_in1+S_in2, out as S_out1/S_out2) |
| `csa_slice` | row of four full adders with the held top carry; also the 3-to-2 compressor of the final cell |
| `full_adder` | a ^ b ^ c, and a&b or (a^b)&c for the carry |
| `final_add_cell` | 3-to-2 compressor, then the bit-slice adder |
| `bitslice_adder` | 4-bit Sklansky adder with the carry fed back to the next slice, registered output |
| `sklansky_add4` | 4-bit parallel-prefix adder (two prefix levels), carry in and out |
| `bsm_pkg` | slice width, `slice_t`, the tagged X slice `xslice_t`, the carry-save triple `csa3_t` |

Size at n = 2 after generic synthesis: about 300 word-level cells and 70
flip-flops. Each additional cell adds 33 flip-flops.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous reset, active high |
| `start` | in | 1 | first cycle of an operation (cycle 0) |
| `x`, `y` | in | 4 | operand slices X_j, Y_j in cycle j = 0 .. n-1 |
| `sign` | in | 1 | in cycle n-1: 1 = two's complement, 0 = unsigned |
| `z` | out | 4 | product slice Z_s in cycle n+1+s, s = 0 .. 2n-1 |
| `z_valid` | out | 1 | `z` carries a product slice |

Parameter `N_SLICES` (n, default 2) sets the operand width to 4n bits. `x`,
`y` and `sign` are ignored outside their cycles. `start` may come at most
every 2n clocks; an assertion reports a violation. Starting sooner would mix
two operations in the cells.

## How it departs from the RSFQ original

* **Clocking.** The original is a gate-level pipeline with concurrent-flow
  clocking: every RSFQ gate is a pipeline stage, a full adder takes two stages,
  a main cell nine, the final cell eight, and neighbouring cells overlap by
  seven stages. A 4n x 4n multiplier has 2n + 17 stages (21 for 8 x 8). There
  the first product slice leaves 2n + 17 clocks after the first operand pair,
  and the latency to the last slice is 4n + 17 clocks. This RTL performs each
  step of the systolic schedule in one clock instead: first slice n + 1 clocks
  after `start`, last slice after 3n clocks, same rate of one operation per 2n
  clocks. The stage-level timing was not modelled. Its exact per-cell delays
  are not fully specified, and stretching the X path to match them would no
  longer allow a new operation every 2n clocks with a shared Y bus.
* **Y_0 timing.** Cell 0 needs Y_0 in the cycle `start` loads it, so Y and Sign
  bypass their registers in the loading cycle. The original spends two extra
  stages on setting Y_0.
* **Own additions:** the X `valid` tag and the counter that drives it, which
  also accepts `sign` only in cycle n-1. The clearing of held carries by
  `start`. The `z_valid` output, the synchronous reset and the start-spacing
  assertion. The placement of the two signed-correction constants, and the
  matching PPG variant in cell 0.
* **Gate-level forms.** The RSFQ gate netlists of the cells (including the
  original's technique for a short carry feedback loop in the final adder)
  are not copied. Each block is written at the level of its function and
  structure.
* **Slice width.** The structure generalises to k-bit slices, with m/k cells of
  k^2 AND gates each. This RTL fixes k = 4 in `bsm_pkg`.
* The superconducting interface converters (DC-to-SFQ and SFQ-to-DC) and the
  RSFQ wiring and clock-distribution elements have no counterpart here.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

* `tb_bitslice_mult`: the top at its default size with no parameter override.
  It runs 300 operations: 0xA5 x 0x5A = 0x3A02 first, then extreme signed and
  unsigned values, then random ones. Starts are back to back (2n apart) or
  have random gaps, and `x`/`y`/`sign` carry random values outside their
  cycles. Each product is compared with a 64-bit reference. The testbench
  checks that the first slice comes n + 1 clocks after `start` and that the
  slices are consecutive. It also counts signed and unsigned operations,
  back-to-back and gapped starts, carries passed between result slices, and
  carries dropped at a new start, and fails if any never occurred.
* `tb_bitslice_mult_sizes`: the same at n = 1, 3, 4 and 8 (4 x 4 up to
  32 x 32 bits).
* Block testbenches:
  * `tb_full_adder` and `tb_sklansky_add4`: exhaustive.
  * `tb_ppg`: all four PPG variants against a bit-window reference.
  * `tb_csa_slice`, `tb_acc44`, `tb_bitslice_adder`, `tb_final_add_cell`:
    multi-slice streams checked as numbers.
  * `tb_main_cell`: an n = 1 cell, and a middle cell of an n = 2 chain in
    signed and unsigned mode.
* All of them pass. Each block testbench was also shown to fail on a copy of
  its block with one deliberate fault.

The testbenches are two-state clean: all state is reset.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/bsm_pkg.sv tb/tb_bitslice_mult.sv --top-module tb_bitslice_mult
    ./obj_dir/Vtb_bitslice_mult

Replace the testbench name to run any other; each finishes in well under a
second. To change the operand width, set `N_SLICES` on `bitslice_mult`. To
test a new width, add a `tb_mult_env #(.N(...))` instance to
`tb_bitslice_mult_sizes`. The reference model in `tb_mult_env` uses 64-bit
arithmetic, which covers n up to 8.
