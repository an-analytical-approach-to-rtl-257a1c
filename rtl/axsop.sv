// AXSOP: approximate sum of products, y ~= a*b + c*d, 8-bit unsigned inputs.
//
// Two modified recursive multipliers (rec_mult, approximation level AX_L)
// feed one 16-bit approximate hierarchical adder (axha, K approximate LSBs)
// whose carry out is the 17th result bit. The published variants are
// parameter settings:
//   AXSOP1: AX_L = 0, K > 0  (accurate multipliers, approximate adder)
//   AXSOP2: AX_L > 0, K = 0  (approximate multipliers, accurate adder)
//   AXSOP3: AX_L > 0, K > 0  (both approximate; default K = 8, AX_L = 2)
// Combinational.
module axsop #(
  parameter int unsigned K    = 8,
  parameter int unsigned AX_L = 2
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  input  logic [7:0]  c,
  input  logic [7:0]  d,
  output logic [16:0] y
);
  logic [15:0] ab, cd;

  rec_mult #(.AX_L(AX_L)) u_m0 (.a(a), .b(b), .p(ab));
  rec_mult #(.AX_L(AX_L)) u_m1 (.a(c), .b(d), .p(cd));
  axha #(.N(16), .K(K)) u_add (.a(ab), .b(cd), .s(y));
endmodule
