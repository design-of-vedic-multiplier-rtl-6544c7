// Testbench for rca: the default 4-bit adder exhaustively (all a, b, cin)
// and a 7-bit adder exhaustively, both against integer addition.
module tb_rca;
  logic [3:0] a4, b4, s4;
  logic [6:0] a7, b7, s7;
  logic       cin, co4, co7;
  int checks = 0, failures = 0;
  logic clk = 0;

  rca          dut4 (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(co4));
  rca #(.W(7)) dut7 (.a(a7), .b(b7), .cin(cin), .sum(s7), .cout(co7));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2 ** 15; i++) begin
      {cin, a7, b7} = 15'(i);
      a4 = a7[3:0];
      b4 = b7[3:0];
      #1;
      checks += 2;
      if ({co7, s7} != 8'(int'(a7) + int'(b7) + int'(cin))) begin
        failures++;
        $display("FAIL W=7 %0d+%0d+%0d -> %0d", a7, b7, cin, {co7, s7});
      end
      if ({co4, s4} != 5'(int'(a4) + int'(b4) + int'(cin))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
