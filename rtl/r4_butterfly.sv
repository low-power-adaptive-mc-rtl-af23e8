// Radix-4 butterfly producing one of its four outputs per clock.
//
// With the commutator rotation, operand O(i+1) holds x[(s-i) mod 4] where
// s = `sel`, and the butterfly returns X_s = sum_q x_q (-j)^(s*q), i.e. it
// weights O(i+1) by (-j)^(s*(s-i)).  Multiplication by a power of -j is a
// swap and/or negation, so no multiplier is needed.  The 18-bit sum is
// divided by four (arithmetic shift) to keep a 16-bit word: each stage
// scales by 1/4, so an N-point transform returns DFT/N.  Purely
// combinational.  The one-output-per-clock schedule is that of the
// single-path delay commutator the document builds on; the scaling is this
// design's choice.
module r4_butterfly
  import mccdma_pkg::*;
(
  input  cplx_t       o [4],
  input  logic [1:0]  sel,
  output cplx_t       y
);

  always_comb begin
    logic signed [WL+1:0] sr, si;
    logic [1:0] e;
    sr = '0;
    si = '0;
    for (int i = 0; i < 4; i++) begin
      e = 2'(sel * (sel - 2'(i)));
      unique case (e)
        2'd0: begin sr += (WL+2)'(o[i].re); si += (WL+2)'(o[i].im); end   // x 1
        2'd1: begin sr += (WL+2)'(o[i].im); si -= (WL+2)'(o[i].re); end   // x -j
        2'd2: begin sr -= (WL+2)'(o[i].re); si -= (WL+2)'(o[i].im); end   // x -1
        default: begin sr -= (WL+2)'(o[i].im); si += (WL+2)'(o[i].re); end // x +j
      endcase
    end
    y.re = word_t'(sr >>> 2);
    y.im = word_t'(si >>> 2);
  end

endmodule
