// Accurate multiplier reduction circuit: W x W unsigned partial-product array
// reduced to two vectors by a chain of 3:2 carry-save rows.
//
// Row i is a & {W{b[i]}} shifted left by i. The first two rows start the sum
// and carry vectors; each further row is absorbed by one row of full adders
// (sum = x ^ y ^ r, carry = majority shifted left by one). The outputs obey
// vs + vc = a * b exactly, both 2W bits wide; no carry-propagate adder is
// included, which is what the recursive multipliers expect from an accurate
// sub-multiplier ("two vectors" per product). The published design names this
// circuit; the carry-save array structure is this design's choice.
// Combinational.
module pp_csa #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] vs,
  output logic [2*W-1:0] vc
);
  initial assert (W >= 2) else $error("pp_csa: W must be at least 2");

  logic [2*W-1:0] row [W];
  logic [2*W-1:0] x, y, sum_v, car_v;

  always_comb begin
    for (int unsigned i = 0; i < W; i++)
      row[i] = (2*W)'({W{b[i]}} & a) << i;
    x = row[0];
    y = row[1];
    for (int unsigned i = 2; i < W; i++) begin
      sum_v = x ^ y ^ row[i];
      car_v = ((x & y) | (x & row[i]) | (y & row[i])) << 1;
      x = sum_v;
      y = car_v;
    end
    vs = x;
    vc = y;
  end
endmodule
