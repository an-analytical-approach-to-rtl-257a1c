// Self-checking testbench for axca.
// N = 32 (default): random operands against the bitwise model
//   s = (a ^ b) with s[32] = a[31] ^ b[31].
// N = 8: exhaustive; the error exact - approximate must have mean exactly
// -1/2, minimum -2^8 and maximum 2^9 - 2, the figures quoted for this adder.
// A second N = 8 instance with constant carry vector 9'b0_0000_0001 (carry-in
// 1) is checked against its own model.
module tb_axca;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] a32, b32; logic [32:0] s32;
  logic [7:0]  a8, b8;   logic [8:0]  s8, s8c;
  axca dut32 (.a(a32), .b(b32), .s(s32));
  axca #(.N(8)) dut8 (.a(a8), .b(b8), .s(s8));
  axca #(.N(8), .CARRY(9'h001)) dut8c (.a(a8), .b(b8), .s(s8c));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    automatic longint sum_ed = 0;
    automatic int min_ed = 1 << 30, max_ed = -(1 << 30), ed;
    for (int i = 0; i < 3000; i++) begin
      automatic logic [32:0] m;
      a32 = $urandom; b32 = $urandom;
      #1;
      m = {a32[31] ^ b32[31], a32 ^ b32};
      chk(s32 === m, $sformatf("N=32 %h %h -> %h exp %h", a32, b32, s32, m));
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        chk(s8 === {a8[7] ^ b8[7], a8 ^ b8}, $sformatf("N=8 %0d %0d", x, y));
        chk(s8c === {a8[7] ^ b8[7], a8 ^ b8 ^ 8'h01}, $sformatf("N=8 carry-in %0d %0d", x, y));
        ed = (x + y) - int'(s8);
        sum_ed += ed;
        if (ed < min_ed) min_ed = ed;
        if (ed > max_ed) max_ed = ed;
      end
    // mean = sum / 65536 = -1/2  <=>  sum = -32768
    chk(sum_ed == -32768, $sformatf("mean error sum %0d, expected -32768", sum_ed));
    chk(min_ed == -256, $sformatf("min error %0d, expected -256", min_ed));
    chk(max_ed == 510, $sformatf("max error %0d, expected 510", max_ed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
