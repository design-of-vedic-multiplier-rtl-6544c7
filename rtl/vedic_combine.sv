// Adder stage of an N x N Vedic multiplier (Urdhva Tiryakbhyam).
//
// With the operands split into halves of H = N/2 bits, the four half-size
// multipliers deliver the vertical and crosswise products
//   q0 = aL*bL,  q1 = aH*bL,  q2 = aL*bH,  q3 = aH*bH      (N bits each).
// Three N-bit square-root carry-select adders (csla_bec) add them:
//   1: {c1,s1} = q1 + q2                      (the crosswise sum)
//   2: {c2,s2} = s1 + q0[N-1:H]               (adds the upper half of q0)
//   3: s3      = q3 + {c1|c2, s2[N-1:H]}      (adds what lies above bit N)
// and the product is p = {s3, s2[H-1:0], q0[H-1:0]}. c1 and c2 are never
// both set (q1 + q2 + q0[N-1:H] < 2^(N+1)), so an OR merges them, and the
// third adder never carries out (the product fits in 2N bits); its carry out
// is left unconnected for that reason. Three adders per doubling step follow
// the Vedic multiplier structure; this particular wiring of them is this
// design's choice. Purely combinational.
module vedic_combine #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   q0,
  input  logic [N-1:0]   q1,
  input  logic [N-1:0]   q2,
  input  logic [N-1:0]   q3,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] s1, s2, s3;
  logic         c1, c2, c3_unused;

  csla_bec #(.W(N)) u_add1 (.a(q1), .b(q2), .cin(1'b0), .sum(s1), .cout(c1));
  csla_bec #(.W(N)) u_add2 (.a(s1), .b({{H{1'b0}}, q0[N-1:H]}), .cin(1'b0),
                            .sum(s2), .cout(c2));
  csla_bec #(.W(N)) u_add3 (.a(q3), .b({{(H-1){1'b0}}, c1 | c2, s2[N-1:H]}),
                            .cin(1'b0), .sum(s3), .cout(c3_unused));

  assign p = {s3, s2[H-1:0], q0[H-1:0]};
endmodule
