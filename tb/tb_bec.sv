// Testbench for bec: the 4-bit converter against its function table
// (x = b + 1, 1111 wrapping to 0000) and a 6-bit converter exhaustively.
module tb_bec;
  logic [3:0] b4, x4;
  logic [5:0] b6, x6;
  int checks = 0, failures = 0;
  logic clk = 0;

  bec          dut4 (.b(b4), .x(x4));
  bec #(.W(6)) dut6 (.b(b6), .x(x6));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      b6 = 6'(i);
      b4 = 4'(i);
      #1;
      checks++;
      if (x6 != 6'((i + 1) % 64)) begin
        failures++;
        $display("FAIL W=6 b=%0d x=%0d", b6, x6);
      end
      if (i < 16) begin
        checks++;
        if (x4 != 4'((i + 1) % 16)) begin
          failures++;
          $display("FAIL W=4 b=%b x=%b", b4, x4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
