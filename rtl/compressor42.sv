// compressor42: one-bit 4-2 compressor built from two full adders.
//
// Five bits of equal weight (a, b, c, d and the lateral carry cin from the
// next lower bit position) are reduced to one bit of the same weight (sum)
// and two bits of double weight (carry and cout):
//     a + b + c + d + cin = sum + 2*(carry + cout)
// The first full adder adds a, b and c; its carry leaves as cout towards the
// next higher bit position. The second full adder adds the first one's sum,
// d and cin. Because cout does not depend on cin, a row of these cells has
// no ripple path: each cin comes from the neighbour's first adder only.
// Purely combinational. The structure (two full adders, ports A, B, C, D,
// Cin, Sum, Carry, Cout) follows the source figures.
module compressor42 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic s1;

  full_adder u_fa1 (.a(a),  .b(b), .cin(c),   .sum(s1),  .cout(cout));
  full_adder u_fa2 (.a(s1), .b(d), .cin(cin), .sum(sum), .cout(carry));

endmodule
