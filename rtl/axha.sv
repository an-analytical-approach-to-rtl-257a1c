// AXHA: approximate hierarchical adder.
//
// s = a + b, computed exactly on the upper N-K bits and approximately on the
// lower K bits, with no carry chain in the approximate part:
//   s[0]              = a[0] ^ b[0]                        (exact)
//   s[i], 1 <= i < L  = (a[i] ^ b[i]) ^ (a[i-1] & b[i-1])  (carry into bit i
//                       is guessed as the generate of bit i-1 only)
//   s[i], L <= i < K  = a[i] | b[i]                        (no carry at all)
//   carry into bit K  = a[K-1] & b[K-1]
// Every approximate sum bit depends on at most two bit pairs, so the delay of
// the approximate part does not depend on K. The exact upper part is a
// ripple-carry adder. Output s has N+1 bits (bit N is the carry out).
//
// From the published design: the split into an approximate lower part of K
// bits and an accurate upper part; sum bits of the approximate part formed
// from one or two neighbouring bit pairs, a carry into the upper part taken
// from bit pair K-1, bit 0 from pair 0; constant delay; errors of both signs.
// This design's choice: the Boolean function of each bit and the boundary L
// between the two-pair and one-pair regions. The approximate part uses L carry
// signals, each the generate of one bit pair (pairs 0..L-2 and K-1), so the
// all-zero carry vector occurs with probability (3/4)^L. Bits 1..L-1 make the
// mean of (approximate - exact) -(2^L - 2)/4 for uniform inputs; the rest of
// the approximate part has mean error 0. The default L = K/3 gives 0.316 and
// -3.5 for N = 32, K = 12, against the published 0.316 and -3.2; for K = 4
// (L = 1) it keeps the adder's mean error at 0, which keeps the mean error of
// the POS unit built on it near the published value.
// Combinational. K = N makes the whole adder approximate; K = 0 makes it an
// exact ripple-carry adder (the accurate adder of the SOP/POS/MAC variants).
module axha #(
  parameter int unsigned N = 32,
  parameter int unsigned K = 12,
  parameter int unsigned L = (K / 3 > 0) ? K / 3 : 1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   s
);
  initial begin
    assert (K <= N) else $error("axha: K must be in 0..N");
    assert (K == 0 || (L >= 1 && L <= K)) else $error("axha: L must be in 1..K");
  end

  logic [N:0] c;  // carries of the exact part, c[K] = guessed carry

  always_comb begin
    s = '0;
    c = '0;
    if (K > 0) begin
      s[0] = a[0] ^ b[0];
      for (int unsigned i = 1; i < L; i++)
        s[i] = (a[i] ^ b[i]) ^ (a[i-1] & b[i-1]);
      for (int unsigned i = L; i < K; i++)
        s[i] = a[i] | b[i];
      c[K] = a[K-1] & b[K-1];
    end
    for (int unsigned i = K; i < N; i++) begin
      s[i]   = a[i] ^ b[i] ^ c[i];
      c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
    end
    s[N] = c[N];
  end
endmodule
