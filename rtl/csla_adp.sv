// Reduced area-delay-power square-root carry-select adder:
// {cout, sum} = a + b + cin, W bits.
//
// The word is split into the same square-root groups as csla_bec (2, 2, 3,
// 4, 5, ... bits; see vedic_pkg). Each group holds the four units of the
// design: HSG forms the half sum and half carry words, CG0 and CG1 form the
// full carry words for a carry in of 0 and of 1 (all groups at once, since
// none of this depends on the carry in), CS selects one carry word with the
// carry out of the group below, and FSG forms the group's sum and carry out.
// Only the CS and FSG gates lie on the carry path from group to group.
// Used as the accumulator adder of the MAC unit. Purely combinational.
module csla_adp
  import vedic_pkg::*;
#(
  parameter int unsigned W = 40
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

    logic [GW-1:0] s0, c0, c1_0, c1_1, c;

    adp_hsg #(.W(GW)) u_hsg (.a(a[LSB +: GW]), .b(b[LSB +: GW]), .s0(s0), .c0(c0));
    adp_cg0 #(.W(GW)) u_cg0 (.s0(s0), .c0(c0), .c1_0(c1_0));
    adp_cg1 #(.W(GW)) u_cg1 (.s0(s0), .c0(c0), .c1_1(c1_1));
    adp_cs  #(.W(GW)) u_cs  (.c1_0(c1_0), .c1_1(c1_1), .cin(gc[g]), .c(c));
    adp_fsg #(.W(GW)) u_fsg (.s0(s0), .c(c), .cin(gc[g]), .s(sum[LSB +: GW]),
                             .cout(gc[g+1]));
  end

  assign cout = gc[NG];
endmodule
