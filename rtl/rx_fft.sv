// Receiver FFT (FFT-I / FFT-II): 256/64-point reconfigurable FFT followed by
// the ordering block and the output multiplexer OMUX.
//
// In 256 sub-carrier mode (S256 = 1) the digit-reversed FFT output passes
// the ordering block and leaves in natural sub-carrier order.  In 64 mode
// stage 1 is bypassed and gated, the ordering block is idle and OMUX passes
// the digit-reversed 64-point output directly (the combiner compensates by
// addressing its chip ROM in the same order).  GATE_FIFO = 1 gates the
// stage-1 commutator RAMs too (FFT-I), 0 gates only its registers and FSM
// (FFT-II).  Output: one sample per valid cycle; latency 255 samples + 7
// cycles + 256 samples + 1 cycle in 256 mode, 63 samples + 5 cycles in 64.
module rx_fft
  import mccdma_pkg::*;
#(
  parameter bit GATE_FIFO = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s256,
  input  cplx_t din,
  input  logic  din_valid,
  output cplx_t dout,
  output logic  dout_valid,
  output logic  gck1_en,
  output logic  restart
);

  cplx_t f_out, o_out;
  logic  f_v, o_v, g2_unused;

  rfft256 #(.SUPPORT_16(1'b0), .GATE_FIFO(GATE_FIFO)) u_fft (
    .clk, .rst_n, .s256, .s64(1'b1), .inverse(1'b0), .din, .din_valid,
    .dout(f_out), .dout_valid(f_v), .gck1_en, .gck2_en(g2_unused), .restart);

  ord_block u_ord (
    .clk, .rst_n, .s256, .clr(restart), .din(f_out), .din_valid(f_v),
    .dout(o_out), .dout_valid(o_v));

  // OMUX
  assign dout       = s256 ? o_out : f_out;
  assign dout_valid = s256 ? o_v   : f_v;

endmodule
