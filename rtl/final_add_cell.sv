// Final addition cell: turns the three carry-save slices leaving the last
// main cell into one product slice per clock.
//
// A 4-bit bit-slice 3-to-2 compressor (a carry-save adder, i.e. a row of four
// full adders with a held carry) reduces the three slices to two, and the
// 4-bit bit-slice Sklansky adder adds those two with the carry held from the
// previous slice. Both follow the original design. `start_in` arrives with product
// slice 0 and clears the held carries (this design's choice). Slice s
// presented in cycle t leaves on `z_out` in cycle t+1.
module final_add_cell
  import bsm_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start_in,
  input  csa3_t  s_in,
  output slice_t z_out
);
  slice_t cs_sum, cs_carry;

  csa_slice u_comp (
    .clk, .rst, .clr(start_in),
    .a(s_in.s0), .b(s_in.s1), .c(s_in.s2),
    .sum(cs_sum), .carry(cs_carry)
  );

  bitslice_adder u_add (
    .clk, .rst, .clr(start_in), .a(cs_sum), .b(cs_carry), .sum(z_out)
  );
endmodule
