// Division module: equalizer coefficients from the despread pilot.
//
// m_r = xf_r / (Hsq + lambda) and m_i = ~xf_i / (Hsq + lambda), i.e. the
// MMSE coefficient A(k) = H*(k) / (|H(k)|^2 + lambda) with the pilot's
// despread value standing for H(k).  A two-word FIFO (enabled by enF)
// delays the numerator xd_r/xd_i by two cycles so it meets the divisor,
// which is Hsq + lambda captured in register R (enabled by enR); COMP is the
// one's complement of the imaginary part.  Both FIFO and R are enabled only
// during channel estimation.  The two dividers are combinational, so m_r /
// m_i are valid in the cycle after enR.  Structure after the division
// module figure; the fixed-point format (DIV_SHIFT) is this design's.
module division_module
  import mccdma_pkg::*;
#(
  parameter int unsigned DIV_SHIFT = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t xdr,
  input  word_t xdi,
  input  word_t hsq,
  input  word_t lambda,
  input  logic  enf,
  input  logic  enr,
  output word_t mr,
  output word_t mi
);

  cplx_t f0, f1;        // two-word FIFO
  word_t den;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f0 <= '0; f1 <= '0; den <= '0;
    end else begin
      if (enf) begin
        f0 <= '{re: xdr, im: xdi};
        f1 <= f0;
      end
      if (enr) den <= sat16(40'(hsq) + 40'(lambda));   // Adder + R
    end
  end

  divider #(.DIV_SHIFT(DIV_SHIFT)) u_div1 (.num(f1.re),  .den, .q(mr));
  divider #(.DIV_SHIFT(DIV_SHIFT)) u_div2 (.num(~f1.im), .den, .q(mi));

endmodule
