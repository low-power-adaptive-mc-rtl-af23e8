// Partitioned equalizer-coefficient memory: a 256-word dual-port RAM split
// into a 64-word part (addresses 0..63) and a 192-word part (64..255).
//
// One write port (cs, wa, wd) and one read port (ra, rd) work at the same
// time, so the estimation of a new frame may overlap the demodulation of the
// last symbols.  Read is synchronous: rd holds the word addressed by ra one
// cycle later.  With GATE_UPPER = 1 (combiner-I) the 192-word part is
// clock-gated whenever S256 = 0; with GATE_UPPER = 0 (combiner-II) it stays
// clocked.  A word is {m_r, m_i}.
module eq_memory
  import mccdma_pkg::*;
#(
  parameter bit GATE_UPPER = 1'b1
) (
  input  logic       clk,
  input  logic       s256,
  input  logic       cs,
  input  logic [7:0] wa,
  input  cplx_t      wd,
  input  logic [7:0] ra,
  output cplx_t      rd,
  output logic       upper_en      // gated clock of the 192-word part
);

  cplx_t lo [64];
  cplx_t hi [192];
  cplx_t q_lo, q_hi;
  logic  rd_hi;
  logic [7:0] wa_hi, ra_hi;

  assign upper_en = GATE_UPPER ? s256 : 1'b1;
  assign wa_hi    = wa - 8'd64;
  assign ra_hi    = (ra >= 8'd64) ? (ra - 8'd64) : 8'd0;

  always_ff @(posedge clk) begin
    if (cs && wa < 8'd64) lo[wa[5:0]] <= wd;
    q_lo  <= lo[ra[5:0]];
    rd_hi <= (ra >= 8'd64);
  end

  always_ff @(posedge clk) begin
    if (upper_en) begin
      if (cs && wa >= 8'd64) hi[wa_hi] <= wd;
      q_hi <= hi[ra_hi];
    end
  end

  assign rd = rd_hi ? q_hi : q_lo;

endmodule
