// Self-checking testbench for pp_csa: the two output vectors must add up to
// the exact product, exhaustively for W = 4 (default) and W = 5, and for
// random 8-bit operands.
module tb_pp_csa;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] a4, b4; logic [7:0]  s4, c4;
  logic [4:0] a5, b5; logic [9:0]  s5, c5;
  logic [7:0] a8, b8; logic [15:0] s8, c8;
  pp_csa dut4 (.a(a4), .b(b4), .vs(s4), .vc(c4));
  pp_csa #(.W(5)) dut5 (.a(a5), .b(b5), .vs(s5), .vc(c5));
  pp_csa #(.W(8)) dut8 (.a(a8), .b(b8), .vs(s8), .vc(c8));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        a4 = 4'(x); b4 = 4'(y); a5 = 5'(x); b5 = 5'(y);
        #1;
        if (x < 16 && y < 16) chk(8'(s4 + c4) == 8'(x * y), $sformatf("W=4 %0d*%0d", x, y));
        chk(10'(s5 + c5) == 10'(x * y), $sformatf("W=5 %0d*%0d", x, y));
      end
    for (int i = 0; i < 2000; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom);
      #1;
      chk(16'(s8 + c8) == 16'(a8 * b8), $sformatf("W=8 %0d*%0d", a8, b8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
