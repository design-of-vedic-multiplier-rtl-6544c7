// Testbench for vedic_mult2: every operand pair against integer
// multiplication.
module tb_vedic_mult2;
  logic [1:0]   a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;
  logic clk = 0;

  vedic_mult2 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [1:0] x, input logic [1:0] y);
    longint unsigned expect_p;
    a = x; b = y;
    #1;
    expect_p = longint'(x) * longint'(y);
    checks++;
    if (p != 4'(expect_p)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d -> %0d, expected %0d", x, y, p, expect_p);
    end
  endtask

  initial begin
    for (int i = 0; i < 2 ** 4; i++) check(2'(i >> 2), 2'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
