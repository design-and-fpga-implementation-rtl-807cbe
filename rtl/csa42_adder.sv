// csa42_adder: word-level 4-2 adder compressor, four operands added modulo
// 2^WIDTH.
//
// A row of WIDTH compressor42 cells reduces the four operands a, b, c, d to a
// redundant pair: the sum vector and the carry vector (weights 2^i and
// 2^(i+1)). Each cell's cout feeds the cin of the cell above it; bit 0 has
// cin = 0 and the cout and carry of the top bit are dropped because the
// result is taken modulo 2^WIDTH. One carry-propagate addition,
// sum_vec + (carry_vec << 1), then gives the result. So four operands cost
// the delay of one compressor row plus one adder instead of three adders in
// series. Purely combinational.
//   a, b, c, d   operands
//   sum          (a + b + c + d) mod 2^WIDTH
//   sum_vec      redundant sum vector
//   carry_vec    redundant carry vector, already shifted to its weight
// The use of a 4-2 compressor per adder and the names sum and carry follow
// the source; the final carry-propagate adder is this design's choice, since
// the registers take a plain binary word.
module csa42_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] sum_vec,
  output logic [WIDTH-1:0] carry_vec
);

  logic [WIDTH:0]   lat;     // lateral carries, lat[i] enters bit i
  logic [WIDTH-1:0] cy;      // carry of each cell, weight 2^(i+1)

  assign lat[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_row
    compressor42 u_c42 (
      .a(a[i]), .b(b[i]), .c(c[i]), .d(d[i]), .cin(lat[i]),
      .sum(sum_vec[i]), .carry(cy[i]), .cout(lat[i+1])
    );
  end

  // Top-bit cout (lat[WIDTH]) and cy[WIDTH-1] have weight 2^WIDTH: dropped.
  assign carry_vec = {cy[WIDTH-2:0], 1'b0};
  assign sum       = sum_vec + carry_vec;

endmodule
