// Testbench for half_adder: all four input pairs against the half adder
// truth table written out below.
module tb_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;
  logic clk = 0;
  // truth table rows {a, b, sum, carry}
  localparam logic [3:0] TT [4] = '{4'b0000, 4'b0110, 4'b1010, 4'b1101};

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (TT[i]) begin
      {a, b} = TT[i][3:2];
      #1;
      checks++;
      if ({sum, carry} !== TT[i][1:0]) begin
        failures++;
        $display("FAIL a=%b b=%b sum=%b carry=%b", a, b, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
