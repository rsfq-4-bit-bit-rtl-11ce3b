// 4-bit bit-slice adder: adds two streams of 4-bit slices, least significant
// slice first, one slice per clock, into one stream of result slices.
//
// A 4-bit Sklansky adder adds the two slices and the carry held from the
// previous slice; its carry out is held in a flip-flop for the next slice.
// `clr` marks slice 0 of an operation, whose carry in is zero. The result
// slice is registered, so slice s presented in cycle t appears on `sum` in
// cycle t+1. The original RSFQ design spreads this adder over six pipeline stages
// and a shortened carry feedback loop; here the whole slice addition is one
// clock, which keeps the one-slice-per-clock rate of the algorithm.
module bitslice_adder
  import bsm_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   clr,
  input  slice_t a,
  input  slice_t b,
  output slice_t sum
);
  logic   carry_q, cin, cout;
  slice_t s;

  assign cin = carry_q & ~clr;

  sklansky_add4 u_add (.a, .b, .cin, .sum(s), .cout);

  always_ff @(posedge clk) begin
    if (rst) begin
      carry_q <= 1'b0;
      sum     <= '0;
    end else begin
      carry_q <= cout;
      sum     <= s;
    end
  end
endmodule
