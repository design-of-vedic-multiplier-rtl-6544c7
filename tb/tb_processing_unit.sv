// End-to-end testbench for processing_unit at its default parameters.
// Each operation is one neuron evaluation: a reset (clear-and-load) cycle
// with the first sample and weight, then M-1 more samples accumulated, one
// per clock. After the last sample the accumulator is compared with the sum
// of products worked out here, and the threshold is then swept so that the
// activation input z = acc - threshold lands in every segment of the sigmoid
// on both signs; y and fire are compared with a real-arithmetic model. The
// worked example (205 * 3 repeated) is the first operation. Each mechanism
// is counted: load, accumulate, fire high and low, and the eight sigmoid
// segments; one that never occurs is a failure.
module tb_processing_unit;
  logic        clk = 0, rst_n;
  logic [15:0] x, w;
  logic [39:0] threshold;
  logic [31:0] product;
  logic [39:0] acc;
  logic [8:0]  y;
  logic        fire;
  logic [39:0] model;
  int checks = 0, failures = 0;
  int loads = 0, accums = 0, fires = 0, quiets = 0;
  int seg_hits [2][4];

  processing_unit dut (
    .clk(clk), .rst_n(rst_n), .x(x), .w(w), .threshold(threshold),
    .product(product), .acc(acc), .y(y), .fire(fire)
  );

  function automatic real plan(input real ax);
    if (ax >= 5.0)        return 1.0;
    else if (ax >= 2.375) return ax / 32.0 + 0.84375;
    else if (ax >= 1.0)   return ax / 8.0 + 0.625;
    else                  return ax / 4.0 + 0.5;
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int segment(input real ax);
    return (ax >= 5.0) ? 3 : (ax >= 2.375) ? 2 : (ax >= 1.0) ? 1 : 0;
  endfunction

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sample(input logic first, input logic [15:0] xs, input logic [15:0] ws);
    @(negedge clk);
    rst_n = ~first; x = xs; w = ws;
    model = (first ? 40'd0 : model) + 40'(longint'(xs) * longint'(ws));
    if (first) loads++; else accums++;
    @(posedge clk);
    #1;
    checks++;
    if (acc != model) begin
      failures++;
      $display("FAIL acc=%0d expected %0d", acc, model);
    end
  endtask

  // set z = acc - threshold to d/256 and check the activation outputs
  task automatic activate(input int d);
    real zr;
    int  yp, ye;
    threshold = model - 40'(longint'(d));
    #1;
    zr = real'(d) / 256.0;
    yp = int'($floor(plan(rabs(zr)) * 256.0));
    ye = (d < 0) ? 256 - yp : yp;
    checks++;
    if (int'(y) != ye || fire != (d >= 0)) begin
      failures++;
      $display("FAIL z=%f y=%0d expected %0d fire=%b", zr, y, ye, fire);
    end
    seg_hits[d < 0][segment(rabs(zr))]++;
    if (fire) fires++; else quiets++;
  endtask

  task automatic neuron(input int m, input bit example);
    for (int i = 0; i < m; i++)
      if (example) sample(i == 0, 16'd205, 16'd3);
      else         sample(i == 0, 16'($urandom), 16'($urandom));
    // hold the accumulator while the threshold is swept: zero operands
    // with reset high add nothing
    @(negedge clk);
    rst_n = 1'b1; x = '0; w = '0;
    for (int d = -7 * 256; d <= 7 * 256; d += 37) activate(d);
    repeat (20) activate($urandom_range(0, 3000) - 1500);
  endtask

  initial begin
    threshold = '0;
    model     = '0;
    neuron(4, 1'b1);
    checks++;
    if (model != 40'd2460) failures++;
    repeat (20) neuron($urandom_range(1, 16), 1'b0);
    foreach (seg_hits[s, g]) begin
      checks++;
      if (seg_hits[s][g] == 0) begin
        failures++;
        $display("FAIL sigmoid segment %0d of sign %0d never reached", g, s);
      end
    end
    checks++;
    if (loads == 0 || accums == 0 || fires == 0 || quiets == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("loads=%0d accumulations=%0d fire=%0d no_fire=%0d", loads, accums, fires, quiets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
