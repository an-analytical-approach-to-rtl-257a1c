// AXPA: accuracy configurable prefix adder.
//
// A prefix tree of N bits is two symmetric N/2-bit trees joined by a last
// level. Dropping that level gives two independent N/2-bit prefix adders; the
// same hardware then serves two modes, chosen by `mode`:
//   AXPA_HALF_EXACT  (0): s = a[H-1:0] + b[H-1:0] + cin, exact, H = N/2
//                         (upper operands are forced to zero, s[N:H+1] = 0).
//   AXPA_FULL_APPROX (1): N-bit approximate addition. The low half adds with
//                         carry-in 0; the carry into the high half is guessed
//                         as a[H-1] | b[H-1], so the upper half never waits
//                         for the lower one.
// The guess is never below the true carry, so the result is exact or too
// large by 2^H; this gives a mean error of 2^((N-4)/2) in magnitude for
// uniform inputs.
//
// From the published design: the operand multiplexer between the low
// halves {A_L, B_L} (mode 0) and the full operands {A, B} (mode 1), the
// carry-in multiplexer between cin (mode 0) and a function of A_{k-1},B_{k-1}
// (mode 1), and the mean error formula. This design's choice: the OR function
// of the guessed carry (it is the one that matches the mean error formula),
// carry-in 0 of the low half in mode 1, and Kogge-Stone halves.
// Combinational.
module axpa
  import approx_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  axpa_mode_e   mode,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N:0]   s
);
  localparam int unsigned H = N / 2;

  initial assert (N % 2 == 0 && N >= 2) else $error("axpa: N must be even");

  logic [N-1:0] p, q;      // operands after the mode multiplexer
  logic         c_sel;     // carry-in multiplexer output
  logic         c_lo, c_hi;
  logic [H-1:0] s_lo, s_hi;
  logic         co_lo, co_hi;

  always_comb begin
    if (mode == AXPA_FULL_APPROX) begin
      p     = a;
      q     = b;
      c_sel = a[H-1] | b[H-1];
      c_lo  = 1'b0;
      c_hi  = c_sel;
    end else begin
      p     = {{H{1'b0}}, a[H-1:0]};
      q     = {{H{1'b0}}, b[H-1:0]};
      c_sel = cin;
      c_lo  = c_sel;
      c_hi  = 1'b0;
    end
  end

  prefix_adder #(.W(H)) u_lo (.a(p[H-1:0]), .b(q[H-1:0]), .cin(c_lo), .sum(s_lo), .cout(co_lo));
  prefix_adder #(.W(H)) u_hi (.a(p[N-1:H]), .b(q[N-1:H]), .cin(c_hi), .sum(s_hi), .cout(co_hi));

  always_comb begin
    if (mode == AXPA_FULL_APPROX) s = {co_hi, s_hi, s_lo};
    else                          s = {{(N-H){1'b0}}, co_lo, s_lo};
  end
endmodule
