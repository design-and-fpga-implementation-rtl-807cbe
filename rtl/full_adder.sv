// full_adder: one-bit full adder in the XOR-XNOR / multiplexer style.
//
// The propagate signal p = a XOR b selects between the two candidate sums:
// the XNOR of p and cin is never formed as a gate, instead a 2:1 multiplexer
// picks ~cin when p is 1 and cin when p is 0. The carry out is a second
// multiplexer: when p is 1 the carry passes on from cin, otherwise both
// inputs are equal and a itself is the carry. Purely combinational.
//   inputs  a, b, cin
//   outputs sum  = a ^ b ^ cin
//           cout = majority(a, b, cin)
// Building the full adder from XOR-XNOR gates and multiplexers follows the
// source description; the exact gate netlist is this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;

  always_comb begin
    p    = a ^ b;
    sum  = p ? ~cin : cin;
    cout = p ? cin : a;
  end

endmodule
