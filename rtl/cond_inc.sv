// Conditional +1 incrementor.
//
// y + {cout} = a + inc: a buffer when inc is 0 and an incrementer when inc is
// 1. Built as a half-adder chain whose carries are the AND-prefix of inc and
// the bits of a. Combinational. The published design uses it to fold the carry of a
// narrow adder into the upper bits of a wider operand (recursive multiplier
// and MAC).
module cond_inc #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,
  input  logic         inc,
  output logic [W-1:0] y,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = inc;
  for (genvar i = 0; i < W; i++) begin : g_bit
    assign c[i+1] = a[i] & c[i];
  end
  assign y    = a ^ c[W-1:0];
  assign cout = c[W];
endmodule
