// Complex multiplier of a stage: y = a * w, w a Q2.14 twiddle factor.
//
// Four real 16x16 products, two sums, an arithmetic shift by 14 and
// saturation to 16 bits.  Combinational.
module cmult
  import mccdma_pkg::*;
(
  input  cplx_t a,
  input  cplx_t w,
  output cplx_t y
);

  logic signed [39:0] pr, pi;

  always_comb begin
    pr = 40'(a.re) * 40'(w.re) - 40'(a.im) * 40'(w.im);
    pi = 40'(a.re) * 40'(w.im) + 40'(a.im) * 40'(w.re);
    y.re = sat16(pr >>> TW_FRAC);
    y.im = sat16(pi >>> TW_FRAC);
  end

endmodule
