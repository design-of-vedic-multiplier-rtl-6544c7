// 2x2 Vedic (Urdhva Tiryakbhyam, "vertically and crosswise") multiplier:
// four AND gates form the partial products; the vertical product a0&b0 is
// p[0], the two crosswise products are added by one half adder to give p[1]
// and a carry, and a second half adder adds that carry to the vertical
// product a1&b1 to give p[2] and p[3]. Unsigned, purely combinational.
module vedic_mult2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;

  assign p[0] = a[0] & b[0];
  half_adder u_ha0 (.a(a[1] & b[0]), .b(a[0] & b[1]), .sum(p[1]), .carry(c1));
  half_adder u_ha1 (.a(a[1] & b[1]), .b(c1),          .sum(p[2]), .carry(p[3]));
endmodule
