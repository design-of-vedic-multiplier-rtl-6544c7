// Testbench for vedic_mult16: corner cases and random operand pairs against integer
// multiplication, for the default 4 x 4 / 2 x 2 hierarchy and for the
// column-form 8 x 8 stages (COLUMN_8X8 = 1).
module tb_vedic_mult16;
  logic [15:0]   a, b;
  logic [31:0] p, p_col;
  int checks = 0, failures = 0;
  logic clk = 0;

  vedic_mult16                    dut     (.a(a), .b(b), .p(p));
  vedic_mult16 #(.COLUMN_8X8(1)) dut_col (.a(a), .b(b), .p(p_col));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    longint unsigned expect_p;
    a = x; b = y;
    #1;
    expect_p = longint'(x) * longint'(y);
    checks++;
    if (p != 32'(expect_p)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d -> %0d, expected %0d", x, y, p, expect_p);
    end
    checks++;
    if (p_col != 32'(expect_p)) begin
      failures++;
      if (failures < 10) $display("FAIL column form %0d * %0d -> %0d", x, y, p_col);
    end
  endtask

  initial begin
    check(16'hFFFF, 16'hFFFF);
    check(16'd205, 16'd3);
    check(16'h8000, 16'h8000);
    check(16'h00FF, 16'hFF00);
    for (int i = 0; i < 16; i++) check(16'(1) << i, 16'hFFFF);
    repeat (200000) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
