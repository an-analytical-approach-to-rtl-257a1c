// Self-checking testbench for axm1_8b (carry-save merged recursive AXM1) at
// every approximation level. All 65536 operand pairs are applied to five
// instances (AX_L = 0..4; the default is 2, used for AX_L = 2) and compared
// with the sub-product model. The sum of
// |exact - approximate| is also checked: AX_L = 0 must be exact, and AX_L = 1
// and 4 must give mean error distances 6.9375 and 1919.89 (sums 454656 and
// 125822008), the values quoted as about 7 and 1919.
module tb_axm1_8b;
  import approx_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  a, b;
  logic [15:0] p [5];
  axm1_8b #(.AX_L(0)) dut0 (.a(a), .b(b), .p(p[0]));
  axm1_8b #(.AX_L(1)) dut1 (.a(a), .b(b), .p(p[1]));
  axm1_8b             dut2 (.a(a), .b(b), .p(p[2]));
  axm1_8b #(.AX_L(3)) dut3 (.a(a), .b(b), .p(p[3]));
  axm1_8b #(.AX_L(4)) dut4 (.a(a), .b(b), .p(p[4]));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    automatic longint sum_abs [5] = '{0, 0, 0, 0, 0};
    automatic int e;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        for (int l = 0; l < 5; l++) begin
          if (int'(p[l]) != ref_rec_mult(x, y, l)) begin
            checks++; failures++;
            if (failures < 10)
              $display("FAIL AX_L=%0d %0d*%0d -> %0d exp %0d", l, x, y, p[l], ref_rec_mult(x, y, l));
          end else checks++;
          e = x * y - int'(p[l]);
          sum_abs[l] += (e < 0) ? -e : e;
        end
      end
    chk(sum_abs[0] == 0, $sformatf("AX_L=0 error sum %0d", sum_abs[0]));
    chk(sum_abs[1] == 454656, $sformatf("AX_L=1 error sum %0d", sum_abs[1]));
    chk(sum_abs[4] == 125822008, $sformatf("AX_L=4 error sum %0d", sum_abs[4]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
