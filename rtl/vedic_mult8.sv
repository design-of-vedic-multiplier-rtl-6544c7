// 8 x 8 Vedic multiplier (Urdhva Tiryakbhyam), unsigned, p = a * b.
// The operands are split into 4-bit halves; four 4 x 4 Vedic multipliers
// form the vertical (aL*bL, aH*bH) and crosswise (aH*bL, aL*bH) products all
// at once, and vedic_combine adds them with three 8-bit square-root
// carry-select adders. Each 4 x 4 is in turn four 2 x 2 multipliers and three adders.
// Purely combinational.
module vedic_mult8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;

  vedic_mult4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_mult4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic_mult4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic_mult4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q3));

  vedic_combine #(.N(8)) u_add (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
