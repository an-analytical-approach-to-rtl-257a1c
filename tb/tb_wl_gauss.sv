// Workload: 5x5 Gaussian smoothing of a noisy 64x64 8-bit image with the
// default AXMAC3 (K = 8, AX_L = 4), next to an exact MAC (K = 0, AX_L = 0).
//
// The clean image is a smooth gradient with a bright disc and a dark square;
// zero-mean noise (sum of four uniform variables, standard deviation about
// 9) is added and clipped to 0..255. Each output pixel is the 25-tap
// accumulation pixel * coefficient with the integer kernel
//   1  4  7  4  1 / 4 16 26 16  4 / 7 26 41 26  7 / 4 16 26 16  4 / 1  4  7  4  1
// (sum 273), one tap per clock cycle, followed by division by 273 in the
// testbench. Borders are replicated. The sum is at most 255*273 = 69615, so
// the 19-bit accumulator holds it although 25 > MC. PSNR against the clean
// image is printed for the exact and the approximate filter; checks: every
// exact output is the true filter value, every approximate accumulation
// matches the MAC model, and the approximate filter loses less than 3 dB.
module tb_wl_gauss;
  import approx_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int S = 64;

  initial begin : watchdog
    repeat (S * S * 27 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        rst, en;
  logic [7:0]  a, b;
  logic [18:0] acc_ax, acc_ex;
  axmac                    dut_ax (.clk(clk), .rst(rst), .en(en), .a(a), .b(b), .acc(acc_ax));
  axmac #(.K(0), .AX_L(0)) dut_ex (.clk(clk), .rst(rst), .en(en), .a(a), .b(b), .acc(acc_ex));

  int kern [5][5] = '{'{1, 4, 7, 4, 1}, '{4, 16, 26, 16, 4}, '{7, 26, 41, 26, 7},
                      '{4, 16, 26, 16, 4}, '{1, 4, 7, 4, 1}};
  int clean [S][S];
  int noisy [S][S];

  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  real se_ax, se_ex, se_n, psnr_ax, psnr_ex, psnr_n;
  longint unsigned m, s;
  int exact, px, v;

  initial begin
    se_ax = 0.0; se_ex = 0.0; se_n = 0.0;
    for (int y = 0; y < S; y++)
      for (int x = 0; x < S; x++) begin
        v = 40 + 2 * x + y;
        if ((x - 40) * (x - 40) + (y - 20) * (y - 20) < 150) v = 220;
        if (x > 8 && x < 24 && y > 36 && y < 56) v = 20;
        clean[y][x] = v;
        noisy[y][x] = clip(v + int'($urandom % 32) + int'($urandom % 32) +
                           int'($urandom % 32) + int'($urandom % 32) - 62, 0, 255);
      end
    rst = 1; en = 0; a = 0; b = 0;
    @(posedge clk); #1;
    for (int y = 0; y < S; y++)
      for (int x = 0; x < S; x++) begin
        rst = 1; en = 0;
        @(posedge clk); #1;
        rst = 0; en = 1; m = 0; exact = 0;
        for (int i = 0; i < 5; i++)
          for (int j = 0; j < 5; j++) begin
            px = noisy[clip(y + i - 2, 0, S - 1)][clip(x + j - 2, 0, S - 1)];
            a = 8'(px); b = 8'(kern[i][j]);
            @(posedge clk); #1;
            s = ref_axha(ref_rec_mult(px, kern[i][j], 4), m % 65536, 16, 8, 2);
            m = (((m / 65536 + s / 65536) % 8) * 65536) + s % 65536;
            exact += px * kern[i][j];
          end
        checks += 2;
        if (int'(acc_ex) != exact) begin
          failures++;
          if (failures < 10) $display("FAIL exact (%0d,%0d): %0d, expected %0d", x, y, acc_ex, exact);
        end
        if (longint'(acc_ax) != m) begin
          failures++;
          if (failures < 10) $display("FAIL approx (%0d,%0d): %0d, model %0d", x, y, acc_ax, m);
        end
        se_ex += real'((clip((int'(acc_ex) + 136) / 273, 0, 255) - clean[y][x]) ** 2);
        se_ax += real'((clip((int'(acc_ax) + 136) / 273, 0, 255) - clean[y][x]) ** 2);
        se_n  += real'((noisy[y][x] - clean[y][x]) ** 2);
      end
    psnr_ex = 10.0 * $log10(255.0 * 255.0 / (se_ex / (S * S)));
    psnr_ax = 10.0 * $log10(255.0 * 255.0 / (se_ax / (S * S)));
    psnr_n  = 10.0 * $log10(255.0 * 255.0 / (se_n / (S * S)));
    $display("PSNR against the clean image: noisy %0.2f dB, exact filter %0.2f dB, AXMAC3 filter %0.2f dB (loss %0.2f dB)",
             psnr_n, psnr_ex, psnr_ax, psnr_ex - psnr_ax);
    checks++;
    if (psnr_ex - psnr_ax > 3.0) begin
      failures++;
      $display("FAIL PSNR loss %0.2f dB", psnr_ex - psnr_ax);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
