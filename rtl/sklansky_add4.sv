// 4-bit Sklansky (parallel-prefix) adder with carry in and carry out.
//
// Generate g = a & b and propagate p = a ^ b per bit; the prefix tree forms
// the group terms (1:0) and (3:2) in the first level and (2:0), (3:0) in the
// second, each from one lower-half group, which is the Sklansky pattern. The
// carry into bit k is G(k-1:0) | P(k-1:0) & cin and the sum is p ^ carry.
// The Sklansky structure follows the original design; the gate-level form here is the
// textbook one. Purely combinational.
module sklansky_add4
  import bsm_pkg::*;
(
  input  slice_t a,
  input  slice_t b,
  input  logic   cin,
  output slice_t sum,
  output logic   cout
);
  slice_t g, p;
  logic g10, p10, g32, p32, g20, p20, g30, p30;
  slice_t c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    // level 1
    g10 = g[1] | (p[1] & g[0]);  p10 = p[1] & p[0];
    g32 = g[3] | (p[3] & g[2]);  p32 = p[3] & p[2];
    // level 2
    g20 = g[2] | (p[2] & g10);   p20 = p[2] & p10;
    g30 = g32 | (p32 & g10);     p30 = p32 & p10;
    // carries, with the carry in folded in last
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g10 | (p10 & cin);
    c[3] = g20 | (p20 & cin);
    cout = g30 | (p30 & cin);
    sum  = p ^ c;
  end
endmodule
