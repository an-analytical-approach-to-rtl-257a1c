// Self-checking testbench for axmac (AXMAC3, MC = 8, K = 8, AX_L = 4) and an
// accurate instance (K = 0, AX_L = 0). Runs accumulations of MC = 8 random
// products between resets, checks the register against a cycle-by-cycle
// model every cycle (one update per enabled clock edge, none when en = 0),
// checks that the accurate MAC reaches exactly the maximum 8*255*255 =
// 520200 for all-ones inputs, and that the guard-bit incrementor is used.
module tb_axmac;
  import approx_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        rst, en;
  logic [7:0]  a, b;
  logic [18:0] acc3, acc0;
  axmac                    dut3 (.clk(clk), .rst(rst), .en(en), .a(a), .b(b), .acc(acc3));
  axmac #(.K(0), .AX_L(0)) dut0 (.clk(clk), .rst(rst), .en(en), .a(a), .b(b), .acc(acc0));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  longint unsigned m3, m0, s;
  int n_guard = 0, n_hold = 0;

  initial begin
    rst = 1; en = 0; a = 0; b = 0;
    @(posedge clk); #1;
    chk(acc3 == 0 && acc0 == 0, "reset");
    for (int blk = 0; blk < 600; blk++) begin
      rst = 1; en = 0;
      @(posedge clk); #1;
      rst = 0; m3 = 0; m0 = 0;
      for (int i = 0; i < 8; i++) begin
        if (blk == 0) begin a = 8'hFF; b = 8'hFF; end
        else begin a = 8'($urandom); b = 8'($urandom); end
        en = (blk % 7 == 3 && i == 4) ? 1'b0 : 1'b1;
        @(posedge clk); #1;
        if (en) begin
          s  = ref_axha(ref_rec_mult(a, b, 4), m3 % 65536, 16, 8, 2);
          if (s >= 65536) n_guard++;
          m3 = (((m3 / 65536 + s / 65536) % 8) * 65536) + s % 65536;
          m0 = m0 + a * b;
        end else n_hold++;
        chk(longint'(acc3) == m3, $sformatf("AXMAC3 blk %0d step %0d: %0d exp %0d", blk, i, acc3, m3));
        chk(longint'(acc0) == m0, $sformatf("exact MAC blk %0d step %0d: %0d exp %0d", blk, i, acc0, m0));
      end
      if (blk == 0) chk(acc0 == 520200, $sformatf("max value %0d", acc0));
    end
    chk(n_guard > 0, "guard-bit increment never happened");
    chk(n_hold > 0, "enable low never tested");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
