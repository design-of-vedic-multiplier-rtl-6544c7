// Testbench for full_adder: all eight input combinations against the full
// adder truth table written out below.
module tb_full_adder;
  logic x, y, cin, sum, cout;
  int checks = 0, failures = 0;
  logic clk = 0;
  // rows {x, y, cin, sum, carry}
  localparam logic [4:0] TT [8] = '{5'b00000, 5'b00110, 5'b01010, 5'b01101,
                                    5'b10010, 5'b10101, 5'b11001, 5'b11111};

  full_adder dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (TT[i]) begin
      {x, y, cin} = TT[i][4:2];
      #1;
      checks++;
      if ({sum, cout} !== TT[i][1:0]) begin
        failures++;
        $display("FAIL x=%b y=%b cin=%b sum=%b cout=%b", x, y, cin, sum, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
