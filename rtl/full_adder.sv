// One-bit full adder, the basic element of every carry-save adder in the
// multiplier.
//
// sum = a ^ b ^ c and cout = majority(a, b, c). The RSFQ cell the design is
// modelled on builds it from two AND gates, two XOR gates and a confluence
// buffer (cout = a&b | (a^b)&c); the same structure is written here. Purely
// combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic cout
);
  logic p;
  always_comb begin
    p    = a ^ b;
    sum  = p ^ c;
    cout = (a & b) | (p & c);
  end
endmodule
