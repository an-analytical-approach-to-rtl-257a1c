// Self-checking testbench for axm1_4b: all 256 operand pairs against the
// column-count model; also checks that products with at most one partial
// product per column (e.g. a or b a power of two) are exact.
module tb_axm1_4b;
  import approx_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] a, b;
  logic [7:0] z;
  axm1_4b dut (.a(a), .b(b), .z(z));

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a = 4'(x); b = 4'(y);
        #1;
        checks++;
        if (int'(z) != ref_axm4(x, y)) begin
          failures++;
          $display("FAIL %0d x %0d -> %0d, expected %0d", x, y, z, ref_axm4(x, y));
        end
        if (x == 0 || y == 0 || x == 1 || y == 1 || x == 2 || y == 2 || x == 4 || y == 4 ||
            x == 8 || y == 8) begin
          checks++;
          if (int'(z) != x * y) begin
            failures++;
            $display("FAIL exact case %0d x %0d -> %0d", x, y, z);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
