// Modified recursive multiplier, exact or approximate (AX_L).
//
// p ~= a * b for 8-bit unsigned operands (n = 8, half width n' = 4). Four
// sub-products R1 = aL*bL, R2 = aL*bH, R3 = aH*bL, R4 = aH*bH come from
// accurate reduction circuits (pp_csa, two vectors) or, for the first AX_L of
// them, from the approximate multiplier axm1_4b (one vector). They are merged
// in two stages:
//   stage 1: r1 = vectors of R1 added (2-op adder, or wired through when R1
//            is approximate); r2 = all vectors of R2 and R3 added (4-op, 3-op
//            or 2-op adder), n+1 bits; r3 = vectors of R4, like r1.
//   stage 2: p[n'-1:0]     = r1[n'-1:0]
//            {c, p[n+n':n']} = {r3[n':0], r1[n-1:n']} + r2      (n+1 bits)
//            p[2n-1:n+n'+1] = r3[n-1:n'+1] + c                  (conditional +1)
// so only one n+1-bit adder and an n'-1-bit incrementer follow stage 1,
// instead of the two chained adders of the conventional scheme. AX_L = 0 is
// the accurate modified recursive multiplier.
//
// The approximate 4-bit products never exceed their exact values by enough to
// overflow 16 bits (checked over all operand pairs for every AX_L), so the
// carry out of the conditional +1 is always 0 and is left unused.
// From the published design: the sub-product split and naming, the
// stage-1 adders and how AX_L removes them, the bit slicing and widths of
// stage 2. Combinational.
module rec_mult
  import approx_pkg::*;
#(
  parameter int unsigned AX_L = 4
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  localparam int unsigned N  = 8;
  localparam int unsigned NH = N / 2;

  initial assert (AX_L <= 4) else $error("rec_mult: AX_L must be 0..4");

  logic [NH-1:0] op_a [4];
  logic [NH-1:0] op_b [4];
  logic [N-1:0]  va   [4];
  logic [N-1:0]  vb   [4];

  assign op_a[0] = a[NH-1:0]; assign op_b[0] = b[NH-1:0];  // R1
  assign op_a[1] = a[NH-1:0]; assign op_b[1] = b[N-1:NH];  // R2
  assign op_a[2] = a[N-1:NH]; assign op_b[2] = b[NH-1:0];  // R3
  assign op_a[3] = a[N-1:NH]; assign op_b[3] = b[N-1:NH];  // R4

  for (genvar r = 0; r < 4; r++) begin : g_sub
    if (sub_is_approx(AX_L, r)) begin : g_ax
      axm1_4b u_m (.a(op_a[r]), .b(op_b[r]), .z(va[r]));
      assign vb[r] = '0;
    end else begin : g_acc
      pp_csa #(.W(NH)) u_m (.a(op_a[r]), .b(op_b[r]), .vs(va[r]), .vc(vb[r]));
    end
  end

  // Stage 1: an approximate sub-product has no second vector, so its adder
  // input disappears at elaboration.
  logic [N-1:0] r1, r3;
  logic [N:0]   r2;

  always_comb begin
    if (sub_is_approx(AX_L, 0)) r1 = va[0];
    else                        r1 = va[0] + vb[0];
    if (sub_is_approx(AX_L, 3)) r3 = va[3];
    else                        r3 = va[3] + vb[3];
    r2 = (N+1)'(va[1]) + (N+1)'(va[2]);
    if (!sub_is_approx(AX_L, 1)) r2 = r2 + (N+1)'(vb[1]);
    if (!sub_is_approx(AX_L, 2)) r2 = r2 + (N+1)'(vb[2]);
  end

  // Stage 2
  logic [N:0]      mid_op;
  logic [N+1:0]    mid_sum;
  logic [NH-2:0]   top;
  logic            unused_co;

  assign mid_op  = {r3[NH:0], r1[N-1:NH]};
  assign mid_sum = (N+2)'(mid_op) + (N+2)'(r2);

  cond_inc #(.W(NH-1)) u_inc (.a(r3[N-1:NH+1]), .inc(mid_sum[N+1]), .y(top), .cout(unused_co));

  assign p = {top, mid_sum[N:0], r1[NH-1:0]};
endmodule
