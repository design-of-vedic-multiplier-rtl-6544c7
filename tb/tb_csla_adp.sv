// Testbench for csla_adp: the default 40-bit adder with a carry entering at
// every bit position and random operands, plus a 9-bit adder exhaustively,
// all against integer addition.
module tb_csla_adp;
  logic [39:0] a, b, s;
  logic [8:0]  a9, b9, s9;
  logic        cin, co, co9;
  int checks = 0, failures = 0;
  logic clk = 0;

  csla_adp          dut  (.a(a),  .b(b),  .cin(cin), .sum(s),  .cout(co));
  csla_adp #(.W(9)) dut9 (.a(a9), .b(b9), .cin(cin), .sum(s9), .cout(co9));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check40(input logic [39:0] x, input logic [39:0] y, input logic c);
    a = x; b = y; cin = c;
    #1;
    checks++;
    if ({co, s} != 41'(longint'(x) + longint'(y) + longint'(c))) begin
      failures++;
      $display("FAIL %0d+%0d+%0d -> %0d", x, y, c, {co, s});
    end
  endtask

  initial begin
    for (int i = 0; i < 40; i++) begin
      check40({40{1'b1}} >> i, 40'd1, 1'b0);
      check40({40{1'b1}}, 40'(1) << i, 1'b0);
      check40({40{1'b1}} << i, {40{1'b1}} >> (40 - i), 1'b1);
    end
    check40({40{1'b1}}, {40{1'b1}}, 1'b1);
    repeat (50000) check40({8'($urandom), 32'($urandom)}, {8'($urandom), 32'($urandom)},
                           1'($urandom));
    for (int i = 0; i < 2 ** 19; i++) begin
      {cin, a9, b9} = 19'(i);
      #1;
      checks++;
      if ({co9, s9} != 10'(int'(a9) + int'(b9) + int'(cin))) begin
        failures++;
        $display("FAIL W=9 %0d+%0d+%0d -> %0d", a9, b9, cin, {co9, s9});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
