// Multiply-accumulate (MAC) unit of the neuron: every clock the product of
// the input sample a and the weight b is added into the accumulator.
//
// The product comes from the 16 x 16 Vedic multiplier (vedic_mult16); the
// accumulation uses the reduced area-delay-power carry-select adder
// (csla_adp), whose other operand is the accumulator register.
// rst_n is a synchronous, active-low reset that clears and loads: while it is
// low the accumulator takes 0 + a*b, so the product of the sample present at
// reset is visible on acc one clock later; once rst_n is high each clock adds
// the new product, acc <= acc + a*b. (Holding a = 205, b = 3: 615 while in
// reset, then 1230, 1845, ...) The accumulator is unsigned, ACC_W bits wide,
// (default 40: the 32-bit product plus 8 guard bits, room for 256 full-scale
// products) and wraps modulo 2^ACC_W; the carry out of its adder is dropped.
// Latency: a and b sampled at a rising edge are in acc right after it.
// The reset behaviour, the accumulator width and the choice of adder for the
// accumulator are this design's choices.
module mac_unit #(
  parameter int unsigned ACC_W      = 40,
  parameter bit          COLUMN_8X8 = 1'b0   // 8 x 8 stages in column form
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      a,
  input  logic [15:0]      b,
  output logic [31:0]      product,
  output logic [ACC_W-1:0] acc
);
  logic [ACC_W-1:0] acc_in;     // accumulator operand, zero while in reset
  logic [ACC_W-1:0] acc_next;
  logic             cout_unused;

  vedic_mult16 #(.COLUMN_8X8(COLUMN_8X8)) u_mult (.a(a), .b(b), .p(product));

  assign acc_in = rst_n ? acc : '0;

  csla_adp #(.W(ACC_W)) u_add (
    .a(acc_in), .b(ACC_W'(product)), .cin(1'b0),
    .sum(acc_next), .cout(cout_unused)
  );

  always_ff @(posedge clk) acc <= acc_next;

  initial begin
    assert (ACC_W >= 32) else $error("mac_unit: ACC_W must hold a product");
  end
endmodule
