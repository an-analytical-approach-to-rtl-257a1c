// AXCA: approximate constant-carry adder.
//
// The carry vector of an addition is replaced by a constant, CARRY, so no
// carry logic exists at all: s[i] = a[i] ^ b[i] ^ CARRY[i] for i < N. Bit
// N, the carry out, is s[N] = a[N-1] ^ b[N-1] ^ CARRY[N]. Delay is one XOR
// level for any N.
//
// From the published design: a constant carry vector in place of carry computation;
// the all-zero carry vector is the most frequent one; its error figures for
// the chosen vector (mean error -1/2 for every N, minimum -2^N, maximum
// 2^(N+1)-2, error taken as exact minus approximate). This design's choice:
// the default vector CARRY = 0 and the carry-out function, picked because
// together they give exactly those three figures. CARRY[0] = 1 stands for a
// constant carry-in of 1.
// Combinational.
module axca #(
  parameter int unsigned N = 32,
  parameter logic [N:0]  CARRY = '0
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   s
);
  always_comb begin
    s[N-1:0] = a ^ b ^ CARRY[N-1:0];
    s[N]     = a[N-1] ^ b[N-1] ^ CARRY[N];
  end
endmodule
