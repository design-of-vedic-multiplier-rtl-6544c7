// 16 x 16 Vedic multiplier (Urdhva Tiryakbhyam), unsigned, p = a * b.
// The operands are split into 8-bit halves; four 8 x 8 Vedic multipliers
// form the vertical (aL*bL, aH*bH) and crosswise (aH*bL, aL*bH) products all
// at once, and vedic_combine adds them with three 16-bit square-root
// carry-select adders. Each 8 x 8 is four 4 x 4, each of those four 2 x 2.
// This is the multiplier of the MAC unit.
// COLUMN_8X8 = 1 replaces the four 8 x 8 stages by the column-form 8 x 8
// Urdhva multiplier (urdhva_mult8); the default 0 uses the 4 x 4 / 2 x 2
// hierarchy. Both give the same product.
// Purely combinational.
module vedic_mult16 #(
  parameter bit COLUMN_8X8 = 1'b0
) (
  input  logic [15:0]  a,
  input  logic [15:0]  b,
  output logic [31:0] p
);
  logic [15:0] q0, q1, q2, q3;

  if (COLUMN_8X8) begin : g_column
    urdhva_mult8 u_ll (.a(a[7:0]), .b(b[7:0]), .p(q0));
    urdhva_mult8 u_hl (.a(a[15:8]), .b(b[7:0]), .p(q1));
    urdhva_mult8 u_lh (.a(a[7:0]), .b(b[15:8]), .p(q2));
    urdhva_mult8 u_hh (.a(a[15:8]), .b(b[15:8]), .p(q3));
  end else begin : g_hier
    vedic_mult8 u_ll (.a(a[7:0]), .b(b[7:0]), .p(q0));
    vedic_mult8 u_hl (.a(a[15:8]), .b(b[7:0]), .p(q1));
    vedic_mult8 u_lh (.a(a[7:0]), .b(b[15:8]), .p(q2));
    vedic_mult8 u_hh (.a(a[15:8]), .b(b[15:8]), .p(q3));
  end

  vedic_combine #(.N(16)) u_add (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
