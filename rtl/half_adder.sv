// Half adder: adds two bits. The sum is their XOR and the carry their AND,
// exactly the two-gate circuit of the classic half adder. Purely
// combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
