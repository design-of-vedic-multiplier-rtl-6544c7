// Full sum generation (FSG) unit of the reduced area-delay-power carry-select
// adder. The MSB of the final carry word c is the carry out; the n-1 lower
// carry bits are XORed with the n-1 upper bits of the half sum word s0, and
// the LSB of s0 is XORed with the carry in:
//   s[0] = s0[0] ^ cin,  s[i] = s0[i] ^ c[i-1],  cout = c[n-1].
// Combinational.
module adp_fsg #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] s0,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  if (W == 1) begin : g_one
    assign s = s0 ^ cin;
  end else begin : g_many
    assign s = s0 ^ {c[W-2:0], cin};
  end
  assign cout = c[W-1];
endmodule
