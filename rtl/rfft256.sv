// Reconfigurable radix-4 pipelined 256-point FFT (also 64 and 16 points).
//
// Four single-path delay-commutator stages (NT = 64, 16, 4, 1) in a chain.
// MUX I feeds stage 2 with either the stage-1 output or the raw input, MUX
// II (present when SUPPORT_16 = 1) feeds stage 3 with either the stage-2
// output or the raw input, so the same pipeline computes a 256-, 64- or
// 16-point transform with the unused front stages clock-gated by the FFSM
// (Gck1, Gck2).  GATE_FIFO selects how far the gating reaches: 1 = all of
// the commutator including its FIFO RAMs (RFFT-I), 0 = only the registers
// and FSMs (RFFT-II).  The two variants give identical results.
//
// Interface: one complex sample per valid cycle in natural order; output one
// sample per valid cycle in digit-reversed order, scaled by 1/N (1/4 per
// stage).  The first output of a block appears after N-1 further input
// samples plus 2 cycles per stage with a multiplier and 1 for the last
// stage (255 samples + 7 cycles for 256 points).  Inputs must keep coming to
// flush the last block out.  A change of S256/S64 restarts the pipeline.
// With `inverse` = 1 the core computes the IFFT (1/N included): real and
// imaginary parts are swapped at the input and again at the output, since
// swap(DFT(swap(x))) is the inverse transform without its 1/N.  A change of
// `inverse` restarts the pipeline too; the output is digit-reversed as well.
// The stage structure, the bypass multiplexers and the gating follow the
// document; the fixed-point scaling and the restart are this design's.
module rfft256
  import mccdma_pkg::*;
#(
  parameter bit SUPPORT_16 = 1'b1,
  parameter bit GATE_FIFO  = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s256,
  input  logic  s64,
  input  logic  inverse,      // 0 = FFT, 1 = IFFT
  input  cplx_t din,
  input  logic  din_valid,
  output cplx_t dout,
  output logic  dout_valid,
  output logic  gck1_en,      // stage-1 clock running
  output logic  gck2_en,      // stage-2 clock running
  output logic  restart       // size change seen this cycle
);

  stage_ctrl_t ctrl [4];
  logic [7:0]  tw_addr [3];
  logic [5:0]  fa1;
  logic [3:0]  fa2;
  logic [1:0]  fa3;
  logic [0:0]  fa4;
  logic        mux1_sel, mux2_sel, clr;
  logic [3:0]  sv;                         // stage input valid
  cplx_t       din_x;
  cplx_t       s_in  [4];
  cplx_t       s_out [4];
  logic [3:0]  s_ov;

  ffsm #(.SUPPORT_16(SUPPORT_16)) u_ffsm (
    .clk, .rst_n, .s256, .s64, .inverse, .stage_in_valid(sv),
    .gck1_en, .gck2_en, .mux1_sel, .mux2_sel, .clr, .ctrl,
    .fifo_addr1(fa1), .fifo_addr2(fa2), .fifo_addr3(fa3), .fifo_addr4(fa4),
    .tw_addr);

  assign restart = clr;

  assign din_x = inverse ? '{re: din.im, im: din.re} : din;

  // MUX I and MUX II
  always_comb begin
    s_in[0] = din_x;
    sv[0]   = din_valid;
    s_in[1] = mux1_sel ? s_out[0] : din_x;
    sv[1]   = mux1_sel ? s_ov[0]  : din_valid;
    if (SUPPORT_16) begin
      s_in[2] = mux2_sel ? s_out[1] : din_x;
      sv[2]   = mux2_sel ? s_ov[1]  : din_valid;
    end else begin
      s_in[2] = s_out[1];
      sv[2]   = s_ov[1];
    end
    s_in[3] = s_out[2];
    sv[3]   = s_ov[2];
  end

  r4_stage #(.NT(64), .STAGE(1), .HAS_MULT(1), .GATE_FIFO(GATE_FIFO)) u_st1 (
    .clk, .rst_n, .en(gck1_en), .clr, .din(s_in[0]), .din_valid(sv[0]),
    .ctrl(ctrl[0]), .fifo_addr(fa1), .tw_addr(tw_addr[0]),
    .dout(s_out[0]), .dout_valid(s_ov[0]));
  r4_stage #(.NT(16), .STAGE(2), .HAS_MULT(1), .GATE_FIFO(GATE_FIFO)) u_st2 (
    .clk, .rst_n, .en(gck2_en), .clr, .din(s_in[1]), .din_valid(sv[1]),
    .ctrl(ctrl[1]), .fifo_addr(fa2), .tw_addr(tw_addr[1]),
    .dout(s_out[1]), .dout_valid(s_ov[1]));
  r4_stage #(.NT(4), .STAGE(3), .HAS_MULT(1), .GATE_FIFO(1'b1)) u_st3 (
    .clk, .rst_n, .en(1'b1), .clr, .din(s_in[2]), .din_valid(sv[2]),
    .ctrl(ctrl[2]), .fifo_addr(fa3), .tw_addr(tw_addr[2]),
    .dout(s_out[2]), .dout_valid(s_ov[2]));
  r4_stage #(.NT(1), .STAGE(4), .HAS_MULT(0), .GATE_FIFO(1'b1)) u_st4 (
    .clk, .rst_n, .en(1'b1), .clr, .din(s_in[3]), .din_valid(sv[3]),
    .ctrl(ctrl[3]), .fifo_addr(fa4), .tw_addr(8'd0),
    .dout(s_out[3]), .dout_valid(s_ov[3]));

  // IFFT by swapping real and imaginary parts at both ends
  assign dout       = inverse ? '{re: s_out[3].im, im: s_out[3].re} : s_out[3];
  assign dout_valid = s_ov[3];

endmodule
