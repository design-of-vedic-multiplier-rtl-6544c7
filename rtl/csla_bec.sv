// Square-root carry-select adder with binary-to-excess-1 converters (BEC
// SQRT-CSLA): sum = a + b + cin, W bits plus carry out.
//
// The word is split into groups of 2, 2, 3, 4, 5 ... bits (16 bits: five
// groups, see vedic_pkg). The first group is a plain ripple adder fed by cin.
// Every other group has one ripple adder with carry in 0, whose n-bit sum and
// carry form an (n+1)-bit word; a (n+1)-bit BEC adds one to that word, giving
// the result for carry in 1. A 2:1 multiplexer per bit, steered by the carry
// out of the group below, picks one of the two; the top bit of the chosen word
// is the group's carry out. Thus the ripple adders of all groups work at the
// same time and only the multiplexer chain runs from the bottom to the top.
// The grouping for widths other than 16 continues the same rule and is this
// design's choice. Purely combinational.
module csla_bec
  import vedic_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int NG = csla_num_groups(W);

  logic [NG:0] gc;   // gc[g] = carry into group g
  assign gc[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int LSB = csla_grp_lsb(g);
    localparam int GW  = csla_grp_width(W, g);

    if (g == 0) begin : g_first
      rca #(.W(GW)) u_rca (
        .a(a[LSB +: GW]), .b(b[LSB +: GW]), .cin(gc[0]),
        .sum(sum[LSB +: GW]), .cout(gc[1])
      );
    end else begin : g_sel
      logic [GW-1:0] s0;
      logic          c0;
      logic [GW:0]   inc;   // {c0, s0} + 1: the result for carry in 1

      rca #(.W(GW)) u_rca (
        .a(a[LSB +: GW]), .b(b[LSB +: GW]), .cin(1'b0),
        .sum(s0), .cout(c0)
      );
      bec #(.W(GW + 1)) u_bec (.b({c0, s0}), .x(inc));

      assign {gc[g+1], sum[LSB +: GW]} = gc[g] ? inc : {c0, s0};
    end
  end

  assign cout = gc[NG];
endmodule
