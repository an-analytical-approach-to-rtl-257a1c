// Reference models for the testbenches, written arithmetically (integer
// operations on whole operands and column counts) rather than as gate
// netlists, so that they are independent of the RTL structure.
package approx_ref_pkg;

  // 4-bit constant-zero-carry multiplier: output bit j from the number of
  // ones in partial-product column j.
  function automatic int unsigned ref_axm4(int unsigned a, int unsigned b);
    int unsigned z = 0;
    for (int j = 0; j < 7; j++) begin
      int unsigned cnt = 0, bitv;
      for (int i = 0; i < 4; i++)
        if (j - i >= 0 && j - i < 4) cnt += ((a >> i) & 1) * ((b >> (j - i)) & 1);
      case (j)
        0, 6:    bitv = cnt;
        1, 5:    bitv = cnt % 2;
        default: bitv = (cnt > 0) ? 1 : 0;
      endcase
      z += bitv << j;
    end
    if (a >= 12 && b >= 12) z += 128;
    return z;
  endfunction

  // Sum of the four 4-bit sub-products of an 8x8 product, the first ax_l of
  // R1 (aL*bL), R2 (aL*bH), R3 (aH*bL), R4 (aH*bH) approximate.
  function automatic int unsigned ref_rec_sum(int unsigned a, int unsigned b, int unsigned ax_l);
    int unsigned x[4], y[4], sh[4], s = 0;
    x = '{a % 16, a % 16, a / 16, a / 16};
    y = '{b % 16, b / 16, b % 16, b / 16};
    sh = '{0, 4, 4, 8};
    for (int k = 0; k < 4; k++)
      s += ((k < ax_l) ? ref_axm4(x[k], y[k]) : x[k] * y[k]) << sh[k];
    return s;
  endfunction

  function automatic int unsigned ref_rec_mult(int unsigned a, int unsigned b, int unsigned ax_l);
    int unsigned s = ref_rec_sum(a, b, ax_l);
    return (s > 65535) ? 65535 : s;
  endfunction

  // Approximate hierarchical adder: exact on bits >= k with carry-in
  // a[k-1]&b[k-1]; bit 0 exact sum bit; bits 1..l-1 sum bit plus generate of
  // the bit below; bits l..k-1 OR.
  function automatic longint unsigned ref_axha(longint unsigned a, longint unsigned b,
                                               int n, int k, int l);
    longint unsigned lo = 0, hi, cin = 0, ai, bi, gi;
    if (k == 0) return a + b;
    for (int i = 0; i < k; i++) begin
      ai = (a >> i) & 1; bi = (b >> i) & 1;
      gi = (i > 0) ? (((a >> (i - 1)) & 1) & ((b >> (i - 1)) & 1)) : 0;
      if (i == 0)     lo += (ai + bi) % 2;
      else if (i < l) lo += ((ai + bi + gi) % 2) << i;
      else            lo += ((ai + bi > 0) ? 1 : 0) << i;
    end
    cin = ((a >> (k - 1)) & 1) & ((b >> (k - 1)) & 1);
    hi = (a >> k) + (b >> k) + cin;
    return (hi << k) + lo;
  endfunction

endpackage
