// 8 x 8 Urdhva Tiryakbhyam multiplier in column form, unsigned, p = a * b.
//
// Column k (k = 0 .. 14) of the vertically-and-crosswise scheme holds the
// partial products a[i] & b[j] with i + j = k, all formed at once by AND
// gates. Each column adds its partial products and the carries handed to it
// by the columns below; bit 0 of that column sum is product bit p[k], and the
// higher bits are the carries: the bit of weight 2 goes to column k+1, the bit
// of weight 4 to column k+2 and the bit of weight 8 to column k+3 (a column
// holds at most 8 partial products and 6 carries, so its sum has 4 bits).
// The carries out of the top columns form p[15]. The column sums are left to
// synthesis as small adders rather than drawn as individual full and half
// adders. Selected in vedic_mult16 as an alternative 8 x 8 stage.
// Purely combinational.
module urdhva_mult8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [3:0] col_sum [15];     // column sums, partial products plus carries
  logic [3:0] carry_in [18];    // carries handed to each column

  always_comb begin
    for (int k = 0; k < 18; k++) carry_in[k] = '0;
    for (int k = 0; k < 15; k++) begin
      col_sum[k] = carry_in[k];
      for (int i = 0; i < 8; i++)
        if (k - i >= 0 && k - i < 8) col_sum[k] = col_sum[k] + 4'(a[i] & b[k-i]);
      carry_in[k+1] = carry_in[k+1] + 4'(col_sum[k][1]);
      carry_in[k+2] = carry_in[k+2] + 4'(col_sum[k][2]);
      carry_in[k+3] = carry_in[k+3] + 4'(col_sum[k][3]);
      p[k] = col_sum[k][0];
    end
    p[15] = carry_in[15][0];
  end
endmodule
