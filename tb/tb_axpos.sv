// Self-checking testbench for axpos: the default AXPOS3 (K = 4, AX_L = 2)
// against the model, and an accurate instance (K = 0, AX_L = 0) that must
// equal (a+b)*(c+d), including the sum-carry paths (a+b >= 256).
module tb_axpos;
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

  logic [7:0]  a, b, c, d;
  logic [17:0] y3, y0;
  axpos                    dut3 (.a(a), .b(b), .c(c), .d(d), .y(y3));
  axpos #(.K(0), .AX_L(0)) dut0 (.a(a), .b(b), .c(c), .d(d), .y(y0));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    automatic longint unsigned u, v, e;
    automatic int n_carry = 0;
    for (int i = 0; i < 20000; i++) begin
      if (i == 0) {a, b, c, d} = '1;
      else {a, b, c, d} = $urandom;
      #1;
      u = ref_axha(a, b, 8, 4, 1);
      v = ref_axha(c, d, 8, 4, 1);
      e = ref_rec_mult(u % 256, v % 256, 2) + (u / 256) * (v % 256) * 256 +
          (v / 256) * (u % 256) * 256 + (u / 256) * (v / 256) * 65536;
      if (u >= 256 && v >= 256) n_carry++;
      chk(longint'(y3) == e, $sformatf("POS3 %0d %0d %0d %0d -> %0d exp %0d", a, b, c, d, y3, e));
      chk(int'(y0) == (int'(a) + int'(b)) * (int'(c) + int'(d)), $sformatf("exact POS %0d", y0));
    end
    chk(n_carry > 0, "both sum carries never set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
