// Workload: error evaluation of the default AXSOP3 (K = 8, AX_L = 2) and
// AXPOS3 (K = 4, AX_L = 2) over 1,000,000 random 8-bit operand sets.
// Every output is checked against the reference models; the mean error
// distance (exact - approximate, signed and absolute) of each unit is printed.
module tb_wl_sop_pos;
  import approx_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned SAMPLES = 1000000;

  initial begin : watchdog
    repeat (SAMPLES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  a, b, c, d;
  logic [16:0] y_sop;
  logic [17:0] y_pos;
  axsop u_sop (.a(a), .b(b), .c(c), .d(d), .y(y_sop));
  axpos u_pos (.a(a), .b(b), .c(c), .d(d), .y(y_pos));

  longint          sed_sop = 0, sad_sop = 0, sed_pos = 0, sad_pos = 0, ed;
  longint unsigned u, v, e;

  initial begin
    for (int i = 0; i < SAMPLES; i++) begin
      {a, b, c, d} = $urandom;
      @(posedge clk); #1;
      e = ref_axha(ref_rec_mult(a, b, 2), ref_rec_mult(c, d, 2), 16, 8, 2);
      checks++;
      if (longint'(y_sop) != e) begin
        failures++;
        if (failures < 10) $display("FAIL SOP %0d %0d %0d %0d -> %0d exp %0d", a, b, c, d, y_sop, e);
      end
      ed = longint'(int'(a) * int'(b) + int'(c) * int'(d)) - longint'(y_sop);
      sed_sop += ed; sad_sop += (ed < 0) ? -ed : ed;
      u = ref_axha(a, b, 8, 4, 1);
      v = ref_axha(c, d, 8, 4, 1);
      e = ref_rec_mult(u % 256, v % 256, 2) + (u / 256) * (v % 256) * 256 +
          (v / 256) * (u % 256) * 256 + (u / 256) * (v / 256) * 65536;
      checks++;
      if (longint'(y_pos) != e) begin
        failures++;
        if (failures < 10) $display("FAIL POS %0d %0d %0d %0d -> %0d exp %0d", a, b, c, d, y_pos, e);
      end
      ed = longint'((int'(a) + int'(b)) * (int'(c) + int'(d))) - longint'(y_pos);
      sed_pos += ed; sad_pos += (ed < 0) ? -ed : ed;
    end
    $display("AXSOP3 K=8 AX_L=2: MED %0.1f (signed), %0.1f (absolute)",
             real'(sed_sop) / SAMPLES, real'(sad_sop) / SAMPLES);
    $display("AXPOS3 K=4 AX_L=2: MED %0.1f (signed), %0.1f (absolute)",
             real'(sed_pos) / SAMPLES, real'(sad_pos) / SAMPLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
