// Testbench for csla_bec: the default 16-bit adder with corner cases (carry
// rippling through every group boundary) and random operands, plus an 8-bit
// adder exhaustively, all against integer addition.
module tb_csla_bec;
  logic [15:0] a, b, s;
  logic [7:0]  a8, b8, s8;
  logic        cin, co, co8;
  int checks = 0, failures = 0;
  logic clk = 0;

  csla_bec          dut  (.a(a),  .b(b),  .cin(cin), .sum(s),  .cout(co));
  csla_bec #(.W(8)) dut8 (.a(a8), .b(b8), .cin(cin), .sum(s8), .cout(co8));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    a = x; b = y; cin = c;
    #1;
    checks++;
    if ({co, s} != 17'(int'(x) + int'(y) + int'(c))) begin
      failures++;
      $display("FAIL %0d+%0d+%0d -> %0d", x, y, c, {co, s});
    end
  endtask

  initial begin
    // a carry entering at each bit position
    for (int i = 0; i < 16; i++) begin
      check16(16'hFFFF >> i, 16'(1) << 0, 1'b0);
      check16(16'hFFFF, 16'(1) << i, 1'b0);
      check16(16'hFFFF << i, 16'hFFFF >> (16 - i), 1'b1);
    end
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    repeat (50000) check16(16'($urandom), 16'($urandom), 1'($urandom));
    for (int i = 0; i < 2 ** 17; i++) begin
      {cin, a8, b8} = 17'(i);
      #1;
      checks++;
      if ({co8, s8} != 9'(int'(a8) + int'(b8) + int'(cin))) begin
        failures++;
        $display("FAIL W=8 %0d+%0d+%0d -> %0d", a8, b8, cin, {co8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
