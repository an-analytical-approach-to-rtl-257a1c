// Workload: one million random 8-bit operand pairs through the default
// AXMAC3 (MC = 8, K = 8, AX_L = 4), accumulated in groups of MC = 8 between
// resets (125000 accumulations), next to an exact accumulator.
// Every result is checked against the reference model of the MAC; the error
// statistics against exact accumulation are printed: mean error distance
// (exact - approximate, signed and absolute), its share of the maximum
// output 8*255*255 = 520200, and the mean relative error distance.
// Throughput is checked too: one product is accepted every clock cycle, so
// each group of 8 takes 8 enabled cycles plus one reset cycle.
module tb_wl_mac_random;
  import approx_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned GROUPS = 125000;
  localparam int unsigned MC     = 8;

  initial begin : watchdog
    repeat (GROUPS * (MC + 1) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        rst, en;
  logic [7:0]  a, b;
  logic [18:0] acc;
  axmac dut (.clk(clk), .rst(rst), .en(en), .a(a), .b(b), .acc(acc));

  longint unsigned m, s, exact;
  longint          sum_ed = 0, sum_abs = 0;
  real             sum_red = 0.0;
  longint          cyc = 0, cyc0;

  always @(posedge clk) cyc++;

  initial begin
    rst = 1; en = 0; a = 0; b = 0;
    @(posedge clk); #1;
    cyc0 = cyc;
    for (int g = 0; g < GROUPS; g++) begin
      rst = 1; en = 0;
      @(posedge clk); #1;
      rst = 0; en = 1; m = 0; exact = 0;
      for (int i = 0; i < MC; i++) begin
        a = 8'($urandom); b = 8'($urandom);
        @(posedge clk); #1;
        s = ref_axha(ref_rec_mult(a, b, 4), m % 65536, 16, 8, 2);
        m = (((m / 65536 + s / 65536) % 8) * 65536) + s % 65536;
        exact += a * b;
      end
      checks++;
      if (longint'(acc) != m) begin
        failures++;
        if (failures < 10) $display("FAIL group %0d: %0d, model %0d", g, acc, m);
      end
      sum_ed  += longint'(exact) - longint'(acc);
      sum_abs += (exact >= acc) ? longint'(exact - acc) : longint'(acc - exact);
      if (exact != 0) sum_red += ((exact >= acc) ? real'(exact - acc) : real'(acc - exact)) / real'(exact);
    end
    checks++;
    if (cyc - cyc0 != longint'(GROUPS) * (MC + 1)) begin
      failures++;
      $display("FAIL cycle count %0d, expected %0d", cyc - cyc0, GROUPS * (MC + 1));
    end
    $display("AXMAC3 K=8 AX_L=4, %0d products: MED %0.1f (signed), %0.1f (absolute) = %0.2f%% of 520200, MRED %0.4f",
             GROUPS * MC, real'(sum_ed) / GROUPS, real'(sum_abs) / GROUPS,
             100.0 * real'(sum_abs) / GROUPS / 520200.0, sum_red / GROUPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
