// Carry selection (CS) unit of the reduced area-delay-power carry-select
// adder. It picks c1_0 when cin is 0 and c1_1 when cin is 1. Because a bit set
// in c1_0 is always set in c1_1, the n-bit 2:1 multiplexer shrinks to one
// AND-OR gate per bit:  c[i] = c1_0[i] | (cin & c1_1[i]). Combinational.
module adp_cs #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] c1_0,
  input  logic [W-1:0] c1_1,
  input  logic         cin,
  output logic [W-1:0] c
);
  assign c = c1_0 | ({W{cin}} & c1_1);
endmodule
