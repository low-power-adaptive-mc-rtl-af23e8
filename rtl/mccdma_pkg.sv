// Shared types and constants of the reconfigurable MC-CDMA receiver.
//
// All data words are 16-bit two's complement (the word length of the
// receiver cores).  A complex sample is a packed {re, im} pair.  The FFT
// stages are driven by a 7-bit control word C1..C7 per stage and the
// combiner by a 23-bit control word {S11,S12,S13,S14,enF,enR,cs,ra,wa}; both
// are given as packed structs here so that the widths match the block
// diagrams.  The meaning of each bit inside those words is this design's
// own choice (see the comments on the fields).
// TW_FRAC is read only by the twiddle multiplier (cmult), so a lint run
// on a module without it reports the constant as unused.
package mccdma_pkg;

  localparam int unsigned WL = 16;          // data word length
  localparam int unsigned TW_FRAC = 14;     // fractional bits of the twiddles

  typedef logic signed [WL-1:0] word_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  // Control word C1..C7 of one radix-4 stage.
  typedef struct packed {
    logic       c1;      // commutator mux 1: 1 = direct tap, 0 = FIFO 4
    logic       c2;      // commutator mux 2: 1 = tap after FIFO 1, 0 = FIFO 5
    logic       c3;      // commutator mux 3: 1 = tap after FIFO 2, 0 = FIFO 6
    logic [1:0] bf_sel;  // C4,C5: which of the four butterfly outputs
    logic       shift;   // C6: commutator FIFOs advance (a valid sample)
    logic       out_ok;  // C7: the butterfly output is a valid sample
  } stage_ctrl_t;

  // 23-bit control word of the combiner (Fig. 16 order).
  typedef struct packed {
    logic       s11;     // MUX A: 0 = despread sample, 1 = equalizer coeff
    logic       s12;     // MUX B: 0 = despread sample, 1 = equalizer coeff
    logic       s13;     // 1 = complement Mult II product (subtract)
    logic       s14;     // MUX C: 0 = add 0, 1 = add accumulator
    logic       enf;     // two-word FIFO enable of the division module
    logic       enr;     // divisor register enable of the division module
    logic       cs;      // equalizer RAM write strobe
    logic [7:0] ra;      // equalizer RAM read address
    logic [7:0] wa;      // equalizer RAM write address
  } comb_ctrl_t;

  // Digit (base-4) reversal of an 8-bit index: the order in which the
  // radix-4 DIF pipeline delivers a 256-point transform.
  function automatic logic [7:0] digit_rev8(input logic [7:0] c);
    return {c[1:0], c[3:2], c[5:4], c[7:6]};
  endfunction

  // Digit reversal of a 6-bit index (64-point transform).
  function automatic logic [5:0] digit_rev6(input logic [5:0] c);
    return {c[1:0], c[3:2], c[5:4]};
  endfunction

  // Saturate a wide signed value to a 16-bit word.
  function automatic word_t sat16(input logic signed [39:0] v);
    if (v > 40'sd32767) return 16'sh7fff;
    else if (v < -40'sd32768) return 16'sh8000;
    else return v[15:0];
  endfunction

endpackage
