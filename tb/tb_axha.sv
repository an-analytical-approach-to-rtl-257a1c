// Self-checking testbench for axha.
//   N = 32, K = 12 (default, L = 4): random operands against the model.
//   N = 8,  K = 8 (L = 4): exhaustive against the model; the mean of
//          (approximate - exact) must be -(2^L - 2)/4 = -7/2, errors of both
//          signs must occur, and the four carry signals (generates of pairs
//          0, 1, 2 and 7) must all be zero for (3/4)^4 of the inputs.
//   N = 16, K = 0: must be an exact adder.
module tb_axha;
  import approx_ref_pkg::*;
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
  logic [7:0]  a8, b8;   logic [8:0]  s8;
  logic [15:0] a16, b16; logic [16:0] s16;
  axha dut32 (.a(a32), .b(b32), .s(s32));
  axha #(.N(8), .K(8), .L(4)) dut8 (.a(a8), .b(b8), .s(s8));
  axha #(.N(16), .K(0)) dut16 (.a(a16), .b(b16), .s(s16));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    automatic longint sum_ed = 0;
    automatic int n_pos = 0, n_neg = 0, n_zero = 0, ed;
    for (int i = 0; i < 4000; i++) begin
      a32 = $urandom; b32 = $urandom;
      if (i < 4) begin a32 = (i[0]) ? '1 : '0; b32 = (i[1]) ? '1 : '0; end
      a16 = $urandom; b16 = $urandom;
      #1;
      chk(longint'(s32) == ref_axha(a32, b32, 32, 12, 4),
          $sformatf("N=32 %h+%h -> %h exp %h", a32, b32, s32, ref_axha(a32, b32, 32, 12, 4)));
      chk(s16 == 17'(a16) + 17'(b16), $sformatf("K=0 %h+%h -> %h", a16, b16, s16));
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        chk(longint'(s8) == ref_axha(x, y, 8, 8, 4), $sformatf("N=8 %0d+%0d -> %0d", x, y, s8));
        ed = int'(s8) - (x + y);
        if ((x & y & 8'h87) == 0) n_zero++;
        sum_ed += ed;
        if (ed > 0) n_pos++;
        if (ed < 0) n_neg++;
      end
    chk(sum_ed == -229376, $sformatf("N=8 error sum %0d, expected -229376", sum_ed));
    // (3/4)^4 * 65536 = 20736
    chk(n_zero == 20736, $sformatf("all-zero carry count %0d, expected 20736", n_zero));
    chk(n_pos > 0 && n_neg > 0, $sformatf("error signs: %0d positive, %0d negative", n_pos, n_neg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
