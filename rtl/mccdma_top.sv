// Top level: the reconfigurable MC-CDMA receiver (256/64 sub-carriers) and,
// beside it with its own ports, the stand-alone reconfigurable
// 256/64/16-point FFT/IFFT processor.
//
// The two cores share only clock and reset.  RX_VARIANT selects receiver-I
// (1, extensive clock gating) or receiver-II (2, gating of registers and
// FSMs only); RFFT_VARIANT selects RFFT-I (1) or RFFT-II (2) in the same
// sense.  See mccdma_receiver and rfft256 for the stream formats.
module mccdma_top
  import mccdma_pkg::*;
#(
  parameter int unsigned RX_VARIANT = 1,
  parameter int unsigned RFFT_VARIANT = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  // receiver
  input  logic  rx_s256,
  input  word_t rx_lambda,
  input  cplx_t rx_din,
  input  logic  rx_din_valid,
  output logic  rx_fo,
  output logic  rx_fo_valid,
  output word_t rx_fo_soft,
  output logic  rx_fft_gck1_en,
  output logic  rx_mem_upper_en,
  output logic  rx_pilot,
  output logic  rx_restart,
  // stand-alone FFT
  input  logic  fft_s256,
  input  logic  fft_s64,
  input  logic  fft_inverse,
  input  cplx_t fft_din,
  input  logic  fft_din_valid,
  output cplx_t fft_dout,
  output logic  fft_dout_valid,
  output logic  fft_gck1_en,
  output logic  fft_gck2_en,
  output logic  fft_restart
);

  mccdma_receiver #(.VARIANT(RX_VARIANT)) u_rx (
    .clk, .rst_n, .s256(rx_s256), .lambda(rx_lambda),
    .din(rx_din), .din_valid(rx_din_valid),
    .fo(rx_fo), .fo_valid(rx_fo_valid), .fo_soft(rx_fo_soft),
    .fft_gck1_en(rx_fft_gck1_en), .mem_upper_en(rx_mem_upper_en),
    .pilot(rx_pilot), .restart(rx_restart));

  rfft256 #(.SUPPORT_16(1'b1), .GATE_FIFO(RFFT_VARIANT == 1)) u_rfft (
    .clk, .rst_n, .s256(fft_s256), .inverse(fft_inverse), .s64(fft_s64),
    .din(fft_din), .din_valid(fft_din_valid),
    .dout(fft_dout), .dout_valid(fft_dout_valid),
    .gck1_en(fft_gck1_en), .gck2_en(fft_gck2_en), .restart(fft_restart));

endmodule
