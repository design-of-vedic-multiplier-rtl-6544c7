// Carry generation unit for input carry 0 (CG0) of the reduced
// area-delay-power carry-select adder. From the half sum word s0 and the half
// carry word c0 it forms the full carry word c1_0, where bit i is the carry out
// of bit i when the group's carry in is 0:
//   c1_0[0] = c0[0],  c1_0[i] = c0[i] | (s0[i] & c1_0[i-1]).
// The fixed carry in removes the carry-in gate of bit 0, so s0[0] is not
// needed here; the port keeps the word whole so CG0 and CG1 match. Combinational.
module adp_cg0 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] s0,
  input  logic [W-1:0] c0,
  output logic [W-1:0] c1_0
);
  assign c1_0[0] = c0[0];
  for (genvar i = 1; i < W; i++) begin : g_carry
    assign c1_0[i] = c0[i] | (s0[i] & c1_0[i-1]);
  end
endmodule
