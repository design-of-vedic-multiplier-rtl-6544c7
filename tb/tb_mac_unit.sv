// Testbench for mac_unit at its default sizes (16-bit operands, 40-bit
// accumulator). First the worked example of the unit: a = 205, b = 3 held,
// reset low gives 615, and after reset each clock adds 615 more. Then random
// runs, each opened by a reset (clear-and-load) cycle, and a long run of
// full-scale products that wraps the accumulator. After every clock acc must
// equal the model's sum of all products sampled so far, i.e. a one-clock
// latency from operands to accumulator.
module tb_mac_unit;
  logic        clk = 0, rst_n;
  logic [15:0] a, b;
  logic [31:0] product;
  logic [39:0] acc;
  logic [39:0] model;
  int checks = 0, failures = 0;
  int loads = 0, accums = 0, wraps = 0;

  mac_unit dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .product(product), .acc(acc));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply operands for one clock and check the accumulator after the edge
  task automatic step(input logic r, input logic [15:0] x, input logic [15:0] w);
    logic [40:0] wide;
    @(negedge clk);
    rst_n = r; a = x; b = w;
    #1;
    checks++;
    if (product != 32'(longint'(x) * longint'(w))) begin
      failures++;
      $display("FAIL product %0d*%0d -> %0d", x, w, product);
    end
    wide  = (r ? {1'b0, model} : 41'd0) + 41'(longint'(x) * longint'(w));
    if (r && wide[40]) wraps++;
    if (r) accums++; else loads++;
    model = wide[39:0];
    @(posedge clk);
    #1;
    checks++;
    if (acc != model) begin
      failures++;
      $display("FAIL acc=%0d expected %0d", acc, model);
    end
  endtask

  initial begin
    model = '0;
    // worked example
    step(1'b0, 16'd205, 16'd3);
    checks++;
    if (acc != 40'd615) failures++;
    for (int k = 2; k <= 6; k++) begin
      step(1'b1, 16'd205, 16'd3);
      checks++;
      if (acc != 40'(615 * k)) failures++;
    end
    // random runs
    repeat (200) begin
      step(1'b0, 16'($urandom), 16'($urandom));
      repeat ($urandom_range(1, 30)) step(1'b1, 16'($urandom), 16'($urandom));
    end
    // wrap-around of the 40-bit accumulator
    step(1'b0, 16'hFFFF, 16'hFFFF);
    repeat (300) step(1'b1, 16'hFFFF, 16'hFFFF);
    checks++;
    if (loads == 0 || accums == 0 || wraps == 0) begin
      failures++;
      $display("FAIL loads=%0d accums=%0d wraps=%0d", loads, accums, wraps);
    end
    $display("loads=%0d accumulations=%0d wraps=%0d", loads, accums, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
