// Self-checking testbench for axsop: the default AXSOP3 (K = 8, AX_L = 2)
// and the two single-approximation variants AXSOP1 (AX_L = 0, K = 8) and
// AXSOP2 (K = 0, AX_L = 2), plus an accurate instance (K = 0, AX_L = 0)
// that must equal a*b + c*d. Random operands and the corner a=b=c=d=255.
module tb_axsop;
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
  logic [16:0] y3, y1, y2, y0;
  axsop                           dut3 (.a(a), .b(b), .c(c), .d(d), .y(y3));
  axsop #(.K(8), .AX_L(0))        dut1 (.a(a), .b(b), .c(c), .d(d), .y(y1));
  axsop #(.K(0), .AX_L(2))        dut2 (.a(a), .b(b), .c(c), .d(d), .y(y2));
  axsop #(.K(0), .AX_L(0))        dut0 (.a(a), .b(b), .c(c), .d(d), .y(y0));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    automatic longint unsigned e3, e1, e2;
    for (int i = 0; i < 20000; i++) begin
      if (i == 0) {a, b, c, d} = '1;
      else {a, b, c, d} = $urandom;
      #1;
      e3 = ref_axha(ref_rec_mult(a, b, 2), ref_rec_mult(c, d, 2), 16, 8, 2);
      e1 = ref_axha(a * b, c * d, 16, 8, 2);
      e2 = ref_rec_mult(a, b, 2) + ref_rec_mult(c, d, 2);
      chk(longint'(y3) == e3, $sformatf("SOP3 %0d %0d %0d %0d -> %0d exp %0d", a, b, c, d, y3, e3));
      chk(longint'(y1) == e1, $sformatf("SOP1 %0d %0d %0d %0d -> %0d exp %0d", a, b, c, d, y1, e1));
      chk(longint'(y2) == e2, $sformatf("SOP2 %0d %0d %0d %0d -> %0d exp %0d", a, b, c, d, y2, e2));
      chk(int'(y0) == int'(a) * int'(b) + int'(c) * int'(d), $sformatf("exact SOP %0d", y0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
