// Kogge-Stone parallel-prefix ("recursive doubling") binary adder.
//
// sum + {cout} = a + b + cin, exact. Generate/propagate pairs are combined in
// log2(W) levels; each level i combines a position with the one 2^i below it.
// Purely combinational. Used as the final carry-propagate adder of the
// multipliers and as the accurate halves of the prefix adder axpa. The prefix
// style follows the published use of recursive-doubling adders; Kogge-Stone
// is this design's choice of prefix graph.
module prefix_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned LEVELS = $clog2(W + 1);

  logic [W-1:0] p0;
  logic [W:0]   g [LEVELS+1];
  logic [W:0]   p [LEVELS+1];

  always_comb begin
    p0 = a ^ b;
    // position 0 of the extended vectors carries cin
    g[0] = {a & b, cin};
    p[0] = {p0, 1'b0};
    for (int unsigned l = 0; l < LEVELS; l++) begin
      for (int unsigned i = 0; i <= W; i++) begin
        if (i >= (1 << l)) begin
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-(1<<l)]);
          p[l+1][i] = p[l][i] & p[l][i-(1<<l)];
        end else begin
          g[l+1][i] = g[l][i];
          p[l+1][i] = p[l][i];
        end
      end
    end
    // g[LEVELS][i] is the carry into bit i of a/b (index shifted by one)
    sum  = p0 ^ g[LEVELS][W-1:0];
    cout = g[LEVELS][W];
  end
endmodule
