// Sigmoid activation unit: y = 1 / (1 + e^-z) for the neuron sum z, and the
// binary threshold decision fire = (z >= 0).
//
// z is a signed fixed-point number with FRAC fraction bits. The sigmoid is
// approximated piecewise linearly (the PLAN approximation), which needs only
// shifts and additions:
//   |z| >= 5          : 1
//   2.375 <= |z| < 5  : |z|/32 + 0.84375
//   1 <= |z| < 2.375  : |z|/8  + 0.625
//   0 <= |z| < 1      : |z|/4  + 0.5
// and y(-z) = 1 - y(z). The result y is unsigned with 8 fraction bits
// (256 = 1.0), truncated. Its worst error against the exact sigmoid is below
// 0.025. Purely combinational.
// The sigmoid function is the one named for the activation unit; the
// piecewise-linear approximation, the number formats and the threshold output
// are this design's choices.
module sigmoid_act
  import vedic_pkg::*;
#(
  parameter int unsigned Z_W  = 41,
  parameter int unsigned FRAC = 8
) (
  input  logic signed [Z_W-1:0] z,
  output logic [ACT_OUT_FRAC:0] y,      // 0 .. 256
  output logic                  fire
);
  localparam int unsigned SH = FRAC - ACT_OUT_FRAC;

  localparam logic [Z_W-1:0] ONE     = Z_W'(1) << FRAC;
  localparam logic [Z_W-1:0] X2_375  = Z_W'(19) << (FRAC - 3);
  localparam logic [Z_W-1:0] X5      = Z_W'(5) << FRAC;
  localparam logic [Z_W-1:0] K0_5    = Z_W'(1) << (FRAC - 1);
  localparam logic [Z_W-1:0] K0_625  = Z_W'(5) << (FRAC - 3);
  localparam logic [Z_W-1:0] K0_8438 = Z_W'(27) << (FRAC - 5);

  logic [Z_W-1:0]          ax;       // |z|
  logic [Z_W-1:0]          ypos;     // y(|z|), FRAC fraction bits
  logic [ACT_OUT_FRAC:0]   ypos8;    // y(|z|), 8 fraction bits

  always_comb begin
    ax = z[Z_W-1] ? Z_W'(-z) : Z_W'(z);
    if (ax >= X5)          ypos = ONE;
    else if (ax >= X2_375) ypos = (ax >> 5) + K0_8438;
    else if (ax >= ONE)    ypos = (ax >> 3) + K0_625;
    else                   ypos = (ax >> 2) + K0_5;
    ypos8 = (ACT_OUT_FRAC + 1)'(ypos >> SH);
    y     = z[Z_W-1] ? (ACT_OUT_FRAC + 1)'(9'd256 - ypos8) : ypos8;
    fire  = ~z[Z_W-1];
  end

  initial begin
    assert (FRAC >= ACT_OUT_FRAC) else $error("sigmoid_act: FRAC must be at least 8");
  end
endmodule
