// 4-4 accumulator of a main cell: adds the four partial-product slices of the
// cell's PPG to the three carry-save slices coming from the preceding cell
// and hands three carry-save slices on to the next cell.
//
// Seven 4-bit slices are reduced to three by a chain of four 4-bit bit-slice
// carry-save adders (rows of four full adders), as in the original RSFQ design:
//   CSA0: pp0 + pp1 + pp2
//   CSA1: CSA0 sum + CSA0 carry + pp3
//   CSA2: CSA1 sum + CSA1 carry + s_in0        -> its carry slice is s_out0
//   CSA3: CSA2 sum + s_in1 + s_in2             -> s_out1 (sum), s_out2 (carry)
// Each CSA keeps the carry out of its most significant bit in a flip-flop
// and adds it to the least significant bit of the next slice (see
// csa_slice). Which of CSA2's two outputs leaves the cell directly and which
// goes on to CSA3 is not fixed by the original design; the choice does not change
// the sum.
//
// Timing: combinational from pp and s_in to s_out, plus one held carry per
// CSA. `clr` marks slice 0 of an operation and clears the held carries.
module acc44
  import bsm_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   clr,
  input  slice_t pp [SLICE_W],
  input  csa3_t  s_in,
  output csa3_t  s_out
);
  slice_t s0, c0, s1, c1, s2, c2;

  csa_slice u_csa0 (.clk, .rst, .clr, .a(pp[0]), .b(pp[1]), .c(pp[2]),
                    .sum(s0), .carry(c0));
  csa_slice u_csa1 (.clk, .rst, .clr, .a(s0), .b(c0), .c(pp[3]),
                    .sum(s1), .carry(c1));
  csa_slice u_csa2 (.clk, .rst, .clr, .a(s1), .b(c1), .c(s_in.s0),
                    .sum(s2), .carry(c2));
  csa_slice u_csa3 (.clk, .rst, .clr, .a(s2), .b(s_in.s1), .c(s_in.s2),
                    .sum(s_out.s1), .carry(s_out.s2));

  assign s_out.s0 = c2;
endmodule
