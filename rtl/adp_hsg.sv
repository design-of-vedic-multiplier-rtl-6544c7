// Half sum generation (HSG) unit of the reduced area-delay-power carry-select
// adder: from the two n-bit operands it forms the half sum word s0 = a ^ b and
// the half carry word c0 = a & b, one half adder per bit. Combinational.
module adp_hsg #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s0,
  output logic [W-1:0] c0
);
  assign s0 = a ^ b;
  assign c0 = a & b;
endmodule
