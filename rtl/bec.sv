// Binary to excess-1 converter (BEC): x = b + 1 (modulo 2^W) without an adder.
// Bit 0 is inverted and every higher bit is XORed with the AND of all bits
// below it:  x0 = ~b0,  x1 = b1 ^ b0,  x2 = b2 ^ (b1 & b0),  ...
// This is the BEC used in the carry-select adder in place of the ripple adder
// with carry in 1; a W-bit BEC follows an (W-1)-bit ripple adder, its top bit
// being that adder's carry out. Purely combinational.
module bec #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] x
);
  logic [W-1:0] all_ones_below;   // AND of b[i-1:0]

  assign all_ones_below[0] = 1'b1;
  for (genvar i = 1; i < W; i++) begin : g_and
    assign all_ones_below[i] = all_ones_below[i-1] & b[i-1];
  end
  assign x = b ^ all_ones_below;
endmodule
