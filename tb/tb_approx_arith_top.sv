// End-to-end testbench of approx_arith_top at its default configuration.
//
// Every unit is driven with random operands each clock cycle and compared
// with its reference model; the MAC runs accumulations of 8 products between
// resets. The mechanisms of the design are counted and each must occur at
// least once:
//   axpa mode switch (both modes used), axpa carry guess wrong (result too
//   large by 2^16), axha errors of both signs, axca carry-out bit set, an
//   approximate sub-product that differs from the exact one, a POS sum carry,
//   a MAC guard-bit increment, a MAC hold (en = 0) and a MAC reset.
module tb_approx_arith_top;
  import approx_pkg::*;
  import approx_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned CYCLES = 20000;

  initial begin : watchdog
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        rst;
  logic        axpa_mode, axpa_cin;
  logic [31:0] axpa_a, axpa_b, axca_a, axca_b, axha_a, axha_b;
  logic [32:0] axpa_s, axca_s, axha_s;
  logic [7:0]  axm_a, axm_b, sop_a, sop_b, sop_c, sop_d, pos_a, pos_b, pos_c, pos_d;
  logic [7:0]  mac_a, mac_b;
  logic        mac_en;
  logic [15:0] axm_p;
  logic [16:0] sop_y;
  logic [17:0] pos_y;
  logic [18:0] mac_acc;

  approx_arith_top dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  function automatic longint unsigned ref_axpa(logic mode, longint unsigned a, longint unsigned b,
                                               logic cin);
    longint unsigned lo = (a % 65536) + (b % 65536);
    if (!mode) return lo + cin;
    return (((a >> 16) + (b >> 16) + (((a >> 15) | (b >> 15)) & 1)) << 16) + lo % 65536;
  endfunction

  int n_mode[2], n_axpa_err, n_axha_pos, n_axha_neg, n_axca_co, n_axm_apx, n_pos_carry;
  int n_mac_guard, n_mac_hold, n_mac_reset;
  longint unsigned mac_m, s, u, v, e;
  int step;

  initial begin
    n_mode = '{0, 0}; n_axpa_err = 0; n_axha_pos = 0; n_axha_neg = 0; n_axca_co = 0;
    n_axm_apx = 0; n_pos_carry = 0; n_mac_guard = 0; n_mac_hold = 0; n_mac_reset = 0;
    rst = 1; mac_en = 0; {mac_a, mac_b} = '0;
    @(posedge clk); #1;
    rst = 0; mac_m = 0; step = 0;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      axpa_mode = 1'($urandom); axpa_cin = 1'($urandom);
      axpa_a = $urandom; axpa_b = $urandom;
      axca_a = $urandom; axca_b = $urandom;
      axha_a = $urandom; axha_b = $urandom;
      {axm_a, axm_b} = 16'($urandom);
      {sop_a, sop_b, sop_c, sop_d} = $urandom;
      {pos_a, pos_b, pos_c, pos_d} = $urandom;
      {mac_a, mac_b} = 16'($urandom);
      mac_en = ($urandom % 10) != 0;
      rst = (step == 8);
      #1;
      // combinational units
      e = ref_axpa(axpa_mode, axpa_a, axpa_b, axpa_cin);
      chk(longint'(axpa_s) == e, $sformatf("axpa %h %h -> %h exp %h", axpa_a, axpa_b, axpa_s, e));
      n_mode[axpa_mode]++;
      if (axpa_mode && longint'(axpa_s) != longint'(axpa_a) + longint'(axpa_b)) n_axpa_err++;
      chk(axca_s == {axca_a[31] ^ axca_b[31], axca_a ^ axca_b}, "axca");
      if (axca_s[32]) n_axca_co++;
      e = ref_axha(axha_a, axha_b, 32, 12, 4);
      chk(longint'(axha_s) == e, $sformatf("axha %h %h -> %h exp %h", axha_a, axha_b, axha_s, e));
      if (longint'(axha_s) > longint'(axha_a) + longint'(axha_b)) n_axha_pos++;
      if (longint'(axha_s) < longint'(axha_a) + longint'(axha_b)) n_axha_neg++;
      e = ref_rec_mult(axm_a, axm_b, 2);
      chk(longint'(axm_p) == e, $sformatf("axm %0d*%0d -> %0d exp %0d", axm_a, axm_b, axm_p, e));
      if (int'(axm_p) != int'(axm_a) * int'(axm_b)) n_axm_apx++;
      e = ref_axha(ref_rec_mult(sop_a, sop_b, 2), ref_rec_mult(sop_c, sop_d, 2), 16, 8, 2);
      chk(longint'(sop_y) == e, $sformatf("sop -> %0d exp %0d", sop_y, e));
      u = ref_axha(pos_a, pos_b, 8, 4, 1);
      v = ref_axha(pos_c, pos_d, 8, 4, 1);
      e = ref_rec_mult(u % 256, v % 256, 2) + (u / 256) * (v % 256) * 256 +
          (v / 256) * (u % 256) * 256 + (u / 256) * (v / 256) * 65536;
      chk(longint'(pos_y) == e, $sformatf("pos -> %0d exp %0d", pos_y, e));
      if (u >= 256 || v >= 256) n_pos_carry++;
      // MAC: model the register update at this edge
      @(posedge clk); #1;
      if (rst) begin
        mac_m = 0; step = 0; n_mac_reset++;
      end else if (mac_en) begin
        s = ref_axha(ref_rec_mult(mac_a, mac_b, 4), mac_m % 65536, 16, 8, 2);
        if (s >= 65536) n_mac_guard++;
        mac_m = (((mac_m / 65536 + s / 65536) % 8) * 65536) + s % 65536;
        step++;
      end else n_mac_hold++;
      chk(longint'(mac_acc) == mac_m, $sformatf("mac %0d exp %0d", mac_acc, mac_m));
    end
    $display("events: axpa mode0=%0d mode1=%0d carry-guess errors=%0d; axha +err=%0d -err=%0d;",
             n_mode[0], n_mode[1], n_axpa_err, n_axha_pos, n_axha_neg);
    $display("events: axca carry-out=%0d; axm inexact=%0d; pos carry=%0d; mac guard=%0d hold=%0d reset=%0d",
             n_axca_co, n_axm_apx, n_pos_carry, n_mac_guard, n_mac_hold, n_mac_reset);
    chk(n_mode[0] > 0 && n_mode[1] > 0, "axpa mode switch never happened");
    chk(n_axpa_err > 0, "axpa carry guess never wrong");
    chk(n_axha_pos > 0 && n_axha_neg > 0, "axha error signs");
    chk(n_axca_co > 0, "axca carry-out never set");
    chk(n_axm_apx > 0, "approximate multiplier never inexact");
    chk(n_pos_carry > 0, "pos sum carry never set");
    chk(n_mac_guard > 0, "mac guard increment never happened");
    chk(n_mac_hold > 0, "mac hold never happened");
    chk(n_mac_reset > 0, "mac reset never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
