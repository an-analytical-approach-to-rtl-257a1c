// Self-checking testbench for cond_inc: exhaustive at W = 3 (default) and
// W = 5; the result must equal a + inc with the carry in cout.
module tb_cond_inc;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] a3, y3; logic i3, co3;
  logic [4:0] a5, y5; logic i5, co5;
  cond_inc dut3 (.a(a3), .inc(i3), .y(y3), .cout(co3));
  cond_inc #(.W(5)) dut5 (.a(a5), .inc(i5), .y(y5), .cout(co5));

  initial begin
    for (int x = 0; x < 32; x++)
      for (int c = 0; c < 2; c++) begin
        a3 = 3'(x); i3 = 1'(c); a5 = 5'(x); i5 = 1'(c);
        #1;
        if (x < 8) begin
          checks++;
          if ({co3, y3} !== 4'(x % 8 + c)) begin
            failures++;
            $display("FAIL W=3 %0d + %0d = %0d", x, c, {co3, y3});
          end
        end
        checks++;
        if ({co5, y5} !== 6'(x + c)) begin
          failures++;
          $display("FAIL W=5 %0d + %0d = %0d", x, c, {co5, y5});
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
