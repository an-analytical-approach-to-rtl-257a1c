// AXPOS: approximate product of sums, y ~= (a+b)*(c+d), 8-bit unsigned inputs.
//
// Two 8-bit approximate hierarchical adders (axha, K approximate LSBs) form
// the 9-bit sums u = a+b and v = c+d. Their low bytes are multiplied by a
// modified recursive multiplier (rec_mult, approximation level AX_L), and the
// two sum carries are folded in exactly:
//   y = rec_mult(u[7:0], v[7:0]) + 2^8*(u[8]*v[7:0] + v[8]*u[7:0]) + 2^16*u[8]*v[8]
// which equals u*v when the multiplier is exact. The published design describes POS
// as one multiplication after two additions but not how the 9-bit sums enter
// an 8-bit recursive multiplier; the carry fold-in is this design's choice.
// Variants: AXPOS1 (AX_L = 0), AXPOS2 (K = 0), AXPOS3 (both > 0; default
// K = 4, AX_L = 2). Combinational, 18-bit result.
module axpos #(
  parameter int unsigned K    = 4,
  parameter int unsigned AX_L = 2
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  input  logic [7:0]  c,
  input  logic [7:0]  d,
  output logic [17:0] y
);
  logic [8:0]  u, v;
  logic [15:0] uv;

  axha #(.N(8), .K(K)) u_add0 (.a(a), .b(b), .s(u));
  axha #(.N(8), .K(K)) u_add1 (.a(c), .b(d), .s(v));
  rec_mult #(.AX_L(AX_L)) u_mul (.a(u[7:0]), .b(v[7:0]), .p(uv));

  always_comb begin
    y = 18'(uv);
    if (u[8]) y = y + (18'(v[7:0]) << 8);
    if (v[8]) y = y + (18'(u[7:0]) << 8);
    if (u[8] && v[8]) y = y + 18'h10000;
  end
endmodule
