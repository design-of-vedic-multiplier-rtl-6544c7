// Testbench for vedic_mult8: every operand pair against integer
// multiplication.
module tb_vedic_mult8;
  logic [7:0]   a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  logic clk = 0;

  vedic_mult8 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] x, input logic [7:0] y);
    longint unsigned expect_p;
    a = x; b = y;
    #1;
    expect_p = longint'(x) * longint'(y);
    checks++;
    if (p != 16'(expect_p)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d -> %0d, expected %0d", x, y, p, expect_p);
    end
  endtask

  initial begin
    check(8'b10110110, 8'b11011001);   // 182 * 217 = 16'b1001101001000110
    for (int i = 0; i < 2 ** 16; i++) check(8'(i >> 8), 8'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
