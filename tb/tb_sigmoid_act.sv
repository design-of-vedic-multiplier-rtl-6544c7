// Testbench for sigmoid_act: every activation input z from -7.0 to +7.0 in
// steps of 1/256 (default 8 fraction bits), very large |z|, and a second
// instance with 12 fraction bits. Each y is compared with the piecewise-linear
// sigmoid worked out here in real arithmetic (truncated to 8 fraction bits),
// and must also lie within 0.025 of the exact 1/(1+e^-z); fire must equal
// (z >= 0). Each of the four segments is hit on both signs.
module tb_sigmoid_act;
  logic signed [40:0] z;
  logic [8:0]         y;
  logic               fire;
  logic signed [19:0] z12;
  logic [8:0]         y12;
  logic               fire12;
  int checks = 0, failures = 0;
  int seg_hits [2][4];
  logic clk = 0;

  sigmoid_act                         dut   (.z(z),   .y(y),   .fire(fire));
  sigmoid_act #(.Z_W(20), .FRAC(12))  dut12 (.z(z12), .y(y12), .fire(fire12));

  // piecewise-linear sigmoid of a non-negative argument
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

  function automatic int expect_y(input real zr);
    int yp;
    real ax;
    ax = (zr < 0.0) ? -zr : zr;
    yp = int'($floor(plan(ax) * 256.0));
    return (zr < 0.0) ? 256 - yp : yp;
  endfunction

  task automatic check(input real zr, input int got_y, input logic got_fire);
    real exact;
    exact = 1.0 / (1.0 + $exp(-zr));
    checks++;
    if (got_y != expect_y(zr) || got_fire != (zr >= 0.0) ||
        rabs(real'(got_y) / 256.0 - exact) > 0.025) begin
      failures++;
      if (failures < 10) $display("FAIL z=%f y=%0d expected %0d fire=%b", zr, got_y,
                                  expect_y(zr), got_fire);
    end
    seg_hits[zr < 0.0][segment((zr < 0.0) ? -zr : zr)]++;
  endtask

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    z12 = '0;
    for (int i = -7 * 256; i <= 7 * 256; i++) begin
      z = 41'(i);
      #1;
      check(real'(i) / 256.0, int'(y), fire);
    end
    foreach (seg_hits[s, g]) begin
      checks++;
      if (seg_hits[s][g] == 0) begin
        failures++;
        $display("FAIL segment %0d of sign %0d never reached", g, s);
      end
    end
    // extreme values
    z = 41'sh0FFFFFFFFFF;  #1; check(real'(z) / 256.0, int'(y), fire);
    z = -41'sh0FFFFFFFFFF; #1; check(real'(z) / 256.0, int'(y), fire);
    // 12 fraction bits: random points across the range
    repeat (5000) begin
      z12 = 20'($urandom_range(0, 2 * 8 * 4096) - 8 * 4096);
      #1;
      check(real'(z12) / 4096.0, int'(y12), fire12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
