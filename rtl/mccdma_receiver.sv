// Reconfigurable MC-CDMA receiver core (receiver-I / receiver-II): a
// 256/64-point FFT with ordering stage followed by the reconfigurable
// combiner, both switched between 256 and 64 sub-carriers by S256.
//
// Input: the time-domain samples of the OFDM symbols after guard removal,
// one per valid cycle, symbols back to back (256 or 64 samples each),
// frames of 1 pilot + 31 data symbols, the first symbol after reset or a
// change of S256 being a pilot.  Output: the received bits FO with a
// strobe, four per symbol for 256 sub-carriers and one for 64.  The input
// stream has to continue for one more symbol (two in 256 mode) to flush the
// last bits out of the pipeline.  VARIANT 1 applies clock gating to the
// stage-1 commutator RAMs and the 192-word coefficient memory (receiver-I);
// VARIANT 2 limits it to registers and FSMs (receiver-II); results are
// identical.
module mccdma_receiver
  import mccdma_pkg::*;
#(
  parameter int unsigned VARIANT = 1,
  parameter logic [63:0] CHIP_CODE = 64'h9A5C_36E1_F00F_5AA5,
  parameter int unsigned MULT_SHIFT = 8,
  parameter int unsigned DIV_SHIFT = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s256,
  input  word_t lambda,
  input  cplx_t din,
  input  logic  din_valid,
  output logic  fo,
  output logic  fo_valid,
  output word_t fo_soft,
  output logic  fft_gck1_en,
  output logic  mem_upper_en,
  output logic  pilot,
  output logic  restart
);

  cplx_t y;
  logic  y_valid;

  rx_fft #(.GATE_FIFO(VARIANT == 1)) u_fft (
    .clk, .rst_n, .s256, .din, .din_valid,
    .dout(y), .dout_valid(y_valid), .gck1_en(fft_gck1_en), .restart);

  combiner #(.VARIANT(VARIANT), .CHIP_CODE(CHIP_CODE),
             .MULT_SHIFT(MULT_SHIFT), .DIV_SHIFT(DIV_SHIFT)) u_comb (
    .clk, .rst_n, .s256, .lambda, .y, .y_valid,
    .fo, .fo_valid, .acc(fo_soft), .pilot, .mem_upper_en);

endmodule
