// Testbench for adp_fsg: for every pair of 5-bit operands (and both carry-in
// values) the unit's inputs are formed from a and b as the adder would form
// them, and its output is compared with the sum and carry out for both carry-in values worked out
// here from integer addition.
module tb_adp_fsg;
  localparam int W = 5;
  logic [W-1:0] a, b;
  logic         cin;
  logic [W-1:0] s0, c0, c, s; logic cout;
  int checks = 0, failures = 0;
  logic clk = 0;

  adp_fsg #(.W(W)) dut (.s0(s0), .c(c), .cin(cin), .s(s), .cout(cout));

  function automatic logic [W-1:0] ref_s0(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = (int'(x[i]) + int'(y[i])) % 2 == 1;
    return r;
  endfunction

  function automatic logic [W-1:0] ref_c0(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = (int'(x[i]) + int'(y[i])) == 2;
    return r;
  endfunction

  // bit i: carry out of bit position i of x + y + ci
  function automatic logic [W-1:0] ref_carry(input logic [W-1:0] x, input logic [W-1:0] y,
                                             input logic ci);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++)
      r[i] = ((int'(x) % (2 ** (i + 1))) + (int'(y) % (2 ** (i + 1))) + int'(ci)) >= 2 ** (i + 1);
    return r;
  endfunction

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2 ** (2 * W + 1); i++) begin
      {cin, a, b} = (2 * W + 1)'(i);
      s0 = ref_s0(a, b); c0 = ref_c0(a, b); c = ref_carry(a, b, cin);
      #1;
      checks++; if ({cout, s} != (W+1)'(int'(a) + int'(b) + int'(cin))) begin failures++; $display("FAIL a=%b b=%b cin=%b s=%b cout=%b", a, b, cin, s, cout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
