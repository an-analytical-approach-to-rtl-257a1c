// Self-checking testbench for prefix_adder: random and corner operands at
// W = 16 (default) and W = 7, compared with the exact sum a + b + cin.
module tb_prefix_adder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] a16, b16, s16; logic c16, co16;
  logic [6:0]  a7, b7, s7;    logic c7, co7;
  prefix_adder dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));
  prefix_adder #(.W(7)) dut7 (.a(a7), .b(b7), .cin(c7), .sum(s7), .cout(co7));

  task automatic run16(logic [15:0] x, logic [15:0] y, logic ci);
    logic [16:0] exp_v;
    a16 = x; b16 = y; c16 = ci;
    #1;
    exp_v = 17'(x) + 17'(y) + 17'(ci);
    checks++;
    if ({co16, s16} !== exp_v) begin
      failures++;
      $display("FAIL W=16 %h + %h + %0d = %h, expected %h", x, y, ci, {co16, s16}, exp_v);
    end
  endtask

  initial begin
    run16(16'hFFFF, 16'h0000, 1'b1);
    run16(16'hFFFF, 16'hFFFF, 1'b1);
    run16(16'h8000, 16'h8000, 1'b0);
    run16(16'h5555, 16'hAAAA, 1'b1);
    for (int i = 0; i < 5000; i++) run16(16'($urandom), 16'($urandom), 1'($urandom));
    for (int x = 0; x < 128; x++)
      for (int y = 0; y < 128; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a7 = 7'(x); b7 = 7'(y); c7 = 1'(ci);
          #1;
          checks++;
          if ({co7, s7} !== 8'(x + y + ci)) begin
            failures++;
            $display("FAIL W=7 %0d + %0d + %0d = %0d", x, y, ci, {co7, s7});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
