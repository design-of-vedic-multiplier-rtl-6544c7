// Ripple carry adder of W full adders: the carry out of bit i is the carry in
// of bit i+1. Used inside each group of the carry-select adders.
// Interface: a, b (W bits), cin; sum (W bits), cout. Purely combinational.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.x(a[i]), .y(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[W];
endmodule
