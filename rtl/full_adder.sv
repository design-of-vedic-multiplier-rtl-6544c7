// Full adder: adds two bits and a carry in. Built as two half adders and an
// OR gate: the first half adder forms x^y and x&y, the second adds the carry
// in, and the OR merges the two carries, giving
//   sum = x ^ y ^ cin,  cout = (x ^ y) & cin | x & y.
// Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic s1, c1, c2;

  half_adder u_ha0 (.a(x),  .b(y),   .sum(s1),  .carry(c1));
  half_adder u_ha1 (.a(s1), .b(cin), .sum(sum), .carry(c2));

  assign cout = c1 | c2;
endmodule
