// AXM1 Type-1: 4-bit approximate multiplier with constant-zero carries.
//
// The 16 partial-product bits P[i][j] = a[i] & b[j] fall into columns i+j.
// Every column is reduced by a compressor whose carry outputs are taken as the
// constant 0 ("Type-1"), so nothing propagates between columns and the whole
// multiplier is one gate level deep. The single output vector z is
//   z[0] = P00, z[6] = P33,
//   z[1], z[5] = XOR of the two bits of the column (its exact sum bit),
//   z[2], z[3], z[4] = OR of the bits of the column,
//   z[7] = P33 & P22.
// z[7] estimates the carry into bit 7, which is 1 exactly when a and b both
// have their two upper bits set (a*b >= 144).
// From the published design: the column grouping, which partial products
// feed each output bit, including P33 and P22 for z[7], and the constant-0
// carry. This design's choice: the Boolean function at each column. XOR in
// the two-bit columns and OR in the taller ones is the assignment that
// reproduces the published mean error distances of the 8-bit recursive
// multiplier built from this one (6.9 with only R1 approximate, 1919.9 with
// all four approximate, exhaustive over 8-bit operands; the published figures are
// 7 and 1919).
// Combinational. Result is exact for many operand pairs (all products with
// at most one bit per column) and never exceeds 8 bits.
module axm1_4b (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] z
);
  logic [3:0][3:0] pp;  // pp[i][j] = a[i] & b[j]

  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        pp[i][j] = a[i] & b[j];
    z[0] = pp[0][0];
    z[1] = pp[0][1] ^ pp[1][0];
    z[2] = pp[0][2] | pp[1][1] | pp[2][0];
    z[3] = pp[0][3] | pp[1][2] | pp[2][1] | pp[3][0];
    z[4] = pp[1][3] | pp[2][2] | pp[3][1];
    z[5] = pp[2][3] ^ pp[3][2];
    z[6] = pp[3][3];
    z[7] = pp[3][3] & pp[2][2];
  end
endmodule
