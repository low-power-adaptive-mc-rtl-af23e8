// Signed fixed-point divider: q = (num * 2^DIV_SHIFT) / den, truncated
// toward zero and saturated to 16 bits; a denominator of zero or below
// saturates to the sign of the numerator.  Combinational.
module divider
  import mccdma_pkg::*;
#(
  parameter int unsigned DIV_SHIFT = 8
) (
  input  word_t num,
  input  word_t den,
  output word_t q
);

  logic signed [39:0] n_ext, d_ext, qq;

  always_comb begin
    n_ext = 40'(num) <<< DIV_SHIFT;
    d_ext = 40'(den);
    if (den <= 0) qq = (num < 0) ? -40'sd32768 : 40'sd32767;
    else          qq = n_ext / d_ext;
    q = sat16(qq);
  end

endmodule
