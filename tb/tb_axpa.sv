// Self-checking testbench for axpa.
//   Mode AXPA_HALF_EXACT: the result must be the exact sum of the low halves
//   plus cin (N = 32 random, N = 8 exhaustive).
//   Mode AXPA_FULL_APPROX: N = 32 random against the model (halves added
//   separately, carry into the upper half a[H-1] | b[H-1]); N = 8 exhaustive,
//   where the error (exact - approximate) must be 0 or -2^H, with mean
//   -(2^(H-2) + 1/2): the quoted -2^((N-4)/2) plus a 1/2 that vanishes
//   relative to it as N grows.
module tb_axpa;
  import approx_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  axpa_mode_e  mode;
  logic        cin;
  logic [31:0] a32, b32; logic [32:0] s32;
  logic [7:0]  a8, b8;   logic [8:0]  s8;
  axpa dut32 (.mode(mode), .a(a32), .b(b32), .cin(cin), .s(s32));
  axpa #(.N(8)) dut8 (.mode(mode), .a(a8), .b(b8), .cin(cin), .s(s8));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic longint unsigned model(longint unsigned a, longint unsigned b, int n);
    int h = n / 2;
    longint unsigned m = (longint'(1) << h) - 1;
    longint unsigned lo = ((a & m) + (b & m)) & m;
    longint unsigned c  = ((a >> (h - 1)) & 1) | ((b >> (h - 1)) & 1);
    return (((a >> h) + (b >> h) + c) << h) + lo;
  endfunction

  initial begin
    automatic longint sum_ed = 0;
    automatic int ed, n_bad = 0;
    mode = AXPA_HALF_EXACT;
    for (int i = 0; i < 3000; i++) begin
      a32 = $urandom; b32 = $urandom; cin = 1'($urandom);
      #1;
      chk(s32 == 33'(a32[15:0]) + 33'(b32[15:0]) + 33'(cin),
          $sformatf("exact mode %h+%h+%0d -> %h", a32, b32, cin, s32));
    end
    mode = AXPA_FULL_APPROX;
    for (int i = 0; i < 3000; i++) begin
      a32 = $urandom; b32 = $urandom; cin = 1'($urandom);
      #1;
      chk(longint'(s32) == model(a32, b32, 32), $sformatf("approx mode %h+%h -> %h", a32, b32, s32));
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        mode = AXPA_HALF_EXACT; cin = 1'(x ^ y);
        #1;
        chk(s8 == 9'(x % 16 + y % 16 + (x ^ y) % 2), $sformatf("N=8 exact %0d %0d", x, y));
        mode = AXPA_FULL_APPROX;
        #1;
        chk(longint'(s8) == model(x, y, 8), $sformatf("N=8 approx %0d %0d -> %0d", x, y, s8));
        ed = (x + y) - int'(s8);
        if (ed != 0 && ed != -16) n_bad++;
        sum_ed += ed;
      end
    chk(n_bad == 0, $sformatf("%0d errors outside {0, -16}", n_bad));
    // mean -(4 + 1/2) over 65536 pairs
    chk(sum_ed == -294912, $sformatf("error sum %0d, expected -294912", sum_ed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
