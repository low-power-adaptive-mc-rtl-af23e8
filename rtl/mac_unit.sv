// Multiplication and accumulation module of the combiner.
//
// Two multipliers serve both phases.  Channel estimation (S11 = S12 = 0):
// Mult I squares x_r and Mult II squares x_i, S13 = 0 and S14 = 0, so the
// summer output is Hsq = |H(k)|^2 of the despread pilot.  Demodulation
// (S11 = S12 = 1): Mult I forms x_r*eq_r and Mult II x_i*eq_i, S13 = 1
// complements the Mult II product (subtracting it, one's complement) and
// S14 = 1 adds the accumulator, so ACC accumulates Re{A(k) x(k)}; S14 = 0
// at the first sub-carrier of a 64-chip group starts a new sum.  FO, the
// received bit, is the sign bit of ACC (1 = negative = data bit 1).
//
// Timing: operands are registered at the multiplier inputs (controls S11,
// S12 act in the cycle before), the products are registered (S13 acts in
// the multiply cycle), SUM is combinational (S14 and Hsq in that cycle) and
// ACC loads on acc_en at the end of it.  xd_r / xd_i are the registered
// real and imaginary operands for the division module.  Products are
// (a*b) >>> MULT_SHIFT saturated to 16 bits, sums saturate: the scaling is
// this design's choice, the structure that of the module's figure.
module mac_unit
  import mccdma_pkg::*;
#(
  parameter int unsigned MULT_SHIFT = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t xr,
  input  word_t xi,
  input  word_t eqr,
  input  word_t eqi,
  input  logic  s11,
  input  logic  s12,
  input  logic  s13,
  input  logic  s14,
  input  logic  acc_en,
  output word_t xdr,
  output word_t xdi,
  output word_t hsq,
  output word_t acc,
  output logic  fo
);

  word_t r_xr, r_ma, r_xi, r_mb;   // multiplier input registers
  word_t p1, p2, p1_q, p2_q;
  word_t sum, mc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_xr <= '0; r_ma <= '0; r_xi <= '0; r_mb <= '0;
      p1_q <= '0; p2_q <= '0; acc <= '0;
    end else begin
      r_xr <= xr;
      r_ma <= s11 ? eqr : xr;          // MUX A
      r_xi <= xi;
      r_mb <= s12 ? eqi : xi;          // MUX B
      p1_q <= p1;
      p2_q <= p2 ^ {WL{s13}};          // XOR gates
      if (acc_en) acc <= sum;
    end
  end

  always_comb begin
    p1 = sat16(40'(r_xr) * 40'(r_ma) >>> MULT_SHIFT);   // Mult I
    p2 = sat16(40'(r_xi) * 40'(r_mb) >>> MULT_SHIFT);   // Mult II
    mc = s14 ? acc : '0;                                 // MUX C
    sum = sat16(40'(p1_q) + 40'(p2_q) + 40'(mc));        // SUM
  end

  assign hsq = sum;
  assign xdr = r_xr;
  assign xdi = r_mb;
  assign fo  = acc[WL-1];

endmodule
