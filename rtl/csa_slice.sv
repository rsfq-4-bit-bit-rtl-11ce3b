// 4-bit bit-slice carry-save adder: a row of four full adders that reduces
// three 4-bit slices to two, for a stream of slices presented least
// significant first, one slice per clock.
//
// Bit k of the sum slice has the weight of input bit k. The carry of bit k has
// the weight of bit k+1, so the carry slice is the row's carries shifted up by
// one. The carry out of the most significant full adder belongs to the next,
// more significant slice: it is held in a D flip-flop for one clock and
// becomes bit 0 of the next carry slice. `clr` (asserted with slice 0 of an
// operation) drops the held carry, so no carry leaks from one operation into
// the next. The held-carry flip-flop follows the original design; the clearing by
// the operation's start is this design's choice.
//
// Timing: a, b, c -> sum, carry are combinational except for carry[0], which
// comes from the flip-flop.
module csa_slice
  import bsm_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   clr,      // this clock carries slice 0: ignore the held carry
  input  slice_t a,
  input  slice_t b,
  input  slice_t c,
  output slice_t sum,
  output slice_t carry
);
  slice_t co;
  logic   held_q;

  for (genvar k = 0; k < SLICE_W; k++) begin : g_fa
    full_adder u_fa (.a(a[k]), .b(b[k]), .c(c[k]), .sum(sum[k]), .cout(co[k]));
  end

  always_comb begin
    carry = {co[SLICE_W-2:0], held_q & ~clr};
  end

  always_ff @(posedge clk) begin
    if (rst) held_q <= 1'b0;
    else     held_q <= co[SLICE_W-1];
  end
endmodule
