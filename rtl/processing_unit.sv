// Processing unit (artificial neuron): a MAC unit followed by the sigmoid
// activation unit.
//
// Each clock the sample x is multiplied by its weight w in the 16 x 16 Vedic
// multiplier and the product is added into the accumulator (see mac_unit for
// the reset/load rule). The accumulated sum, less the neuron's threshold, is
// the activation input z = acc - threshold, read as a signed fixed-point
// number with FRAC fraction bits; the activation unit returns the sigmoid y of
// z (8 fraction bits, 256 = 1.0) and the 0/1 threshold decision fire = (z >= 0).
// Interface: x, w are unsigned 16-bit; threshold is unsigned ACC_W-bit.
// COLUMN_8X8 selects how the 8 x 8 stages of the multiplier are built (see
// vedic_mult16); it does not change the result.
// Timing: acc, y and fire follow the x and w sampled at the last rising edge;
// y and fire are combinational from the accumulator register.
// The MAC + sigmoid structure follows the neuron described for this design;
// subtracting the threshold before the activation, the fixed-point format and
// the accumulator width are this design's choices.
module processing_unit
  import vedic_pkg::*;
#(
  parameter int unsigned ACC_W = 40,
  parameter int unsigned FRAC  = 8,
  parameter bit          COLUMN_8X8 = 1'b0   // 8 x 8 stages in column form
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [15:0]           x,
  input  logic [15:0]           w,
  input  logic [ACC_W-1:0]      threshold,
  output logic [31:0]           product,
  output logic [ACC_W-1:0]      acc,
  output logic [ACT_OUT_FRAC:0] y,
  output logic                  fire
);
  logic signed [ACC_W:0] z;

  mac_unit #(.ACC_W(ACC_W), .COLUMN_8X8(COLUMN_8X8)) u_mac (
    .clk(clk), .rst_n(rst_n), .a(x), .b(w), .product(product), .acc(acc)
  );

  assign z = $signed({1'b0, acc}) - $signed({1'b0, threshold});

  sigmoid_act #(.Z_W(ACC_W + 1), .FRAC(FRAC)) u_act (.z(z), .y(y), .fire(fire));
endmodule
