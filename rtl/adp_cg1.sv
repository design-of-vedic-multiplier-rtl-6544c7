// Carry generation unit for input carry 1 (CG1) of the reduced
// area-delay-power carry-select adder. Like CG0 but for a carry in of 1, so
// bit 0 carries whenever either operand bit is set:
//   c1_1[0] = c0[0] | s0[0],  c1_1[i] = c0[i] | (s0[i] & c1_1[i-1]).
// Combinational.
module adp_cg1 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] s0,
  input  logic [W-1:0] c0,
  output logic [W-1:0] c1_1
);
  assign c1_1[0] = c0[0] | s0[0];
  for (genvar i = 1; i < W; i++) begin : g_carry
    assign c1_1[i] = c0[i] | (s0[i] & c1_1[i-1]);
  end
endmodule
