// 4 x 4 Vedic multiplier (Urdhva Tiryakbhyam), unsigned, p = a * b.
// The operands are split into 2-bit halves; four 2 x 2 Vedic multipliers
// form the vertical (aL*bL, aH*bH) and crosswise (aH*bL, aL*bH) products all
// at once, and vedic_combine adds them with three 4-bit square-root
// carry-select adders. The 2 x 2 multipliers are four AND gates and two half adders
// each.
// Purely combinational.
module vedic_mult4 (
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;

  vedic_mult2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_mult2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_mult2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_mult2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q3));

  vedic_combine #(.N(4)) u_add (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
