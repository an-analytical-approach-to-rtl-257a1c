// AXM1 8-bit recursive approximate multiplier, carry-save merged.
//
// p ~= a * b for 8-bit unsigned operands. The operands are split into 4-bit
// halves and four sub-products are formed:
//   R1 = aL*bL (weight 1), R2 = aL*bH and R3 = aH*bL (weight 16),
//   R4 = aH*bH (weight 256).
// The first AX_L of R1, R2, R3, R4 (in that order) use the approximate 4-bit
// multiplier axm1_4b, which yields one vector; the others use the accurate
// reduction circuit pp_csa, which yields two. All vectors, shifted to their
// weights, are reduced by a carry-save chain to two rows and added by a
// 16-bit prefix adder. AX_L = 0 gives an exact multiplier.
//
// From the published design: the four sub-multipliers, which of them are
// approximate for AX_L = 2 (R1, R2) and that R3, R4 stay accurate, one vector
// per approximate and two per accurate product, carry-save reduction and a
// recursive-doubling (prefix) final adder. This design's choice: the order of
// the carry-save rows and a full 16-bit final adder.
// Combinational. The result is taken modulo 2^16.
module axm1_8b
  import approx_pkg::*;
#(
  parameter int unsigned AX_L = 2
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  initial assert (AX_L <= 4) else $error("axm1_8b: AX_L must be 0..4");

  logic [3:0] op_a [4];
  logic [3:0] op_b [4];
  logic [7:0] va   [4];  // first vector of each sub-product
  logic [7:0] vb   [4];  // second vector (zero for approximate ones)

  assign op_a[0] = a[3:0]; assign op_b[0] = b[3:0];  // R1
  assign op_a[1] = a[3:0]; assign op_b[1] = b[7:4];  // R2
  assign op_a[2] = a[7:4]; assign op_b[2] = b[3:0];  // R3
  assign op_a[3] = a[7:4]; assign op_b[3] = b[7:4];  // R4

  for (genvar r = 0; r < 4; r++) begin : g_sub
    if (sub_is_approx(AX_L, r)) begin : g_ax
      axm1_4b u_m (.a(op_a[r]), .b(op_b[r]), .z(va[r]));
      assign vb[r] = '0;
    end else begin : g_acc
      pp_csa #(.W(4)) u_m (.a(op_a[r]), .b(op_b[r]), .vs(va[r]), .vc(vb[r]));
    end
  end

  localparam int unsigned SHIFT [4] = '{0, 4, 4, 8};

  logic [15:0] rows [8];
  logic [15:0] x, y, sum_v, car_v;

  always_comb begin
    for (int unsigned r = 0; r < 4; r++) begin
      rows[2*r]   = 16'(va[r]) << SHIFT[r];
      rows[2*r+1] = 16'(vb[r]) << SHIFT[r];
    end
    x = rows[0];
    y = rows[1];
    for (int unsigned i = 2; i < 8; i++) begin
      sum_v = x ^ y ^ rows[i];
      car_v = ((x & y) | (x & rows[i]) | (y & rows[i])) << 1;
      x = sum_v;
      y = car_v;
    end
  end

  logic unused_cout;
  prefix_adder #(.W(16)) u_cpa (.a(x), .b(y), .cin(1'b0), .sum(p), .cout(unused_cout));
endmodule
