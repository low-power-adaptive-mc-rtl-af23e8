// One stage of the radix-4 single-path delay-commutator FFT pipeline:
// commutator -> butterfly -> twiddle multiplier, as in the general-stage
// figure.  The last stage (HAS_MULT = 0) has only commutator and butterfly.
//
// Stage t of a 256-point transform works on blocks of 4*NT samples,
// NT = 4^(4-t).  For each valid input sample it emits one sample of the
// decimation-in-frequency stage output y_s[n] = (sum_q x_q[n](-j)^(sq))/4 *
// W_(4NT)^(s*n), in the order s = 0..3, n = 0..NT-1, beginning 3*NT samples
// after the first input of a block.
//
// Timing: the butterfly output is registered (1 cycle), the twiddle ROM
// read is synchronous and the product is registered (2nd cycle), so
// dout_valid follows the qualifying din_valid by 2 cycles (1 without a
// multiplier).  `en` is the stage's gated-clock enable: every register of
// the stage holds while it is low.  GATE_FIFO = 1 gates the FIFO RAMs as
// well (RFFT-I / FFT-I); with GATE_FIFO = 0 the RAMs keep taking the input
// stream at a frozen address (RFFT-II / FFT-II), which costs power but
// changes no result.  Control comes from the stage FSM in the FFSM.
// Without a multiplier (last stage) the tw_addr input is left unused; it
// stays in the port list so that all four stages share one interface.
module r4_stage
  import mccdma_pkg::*;
#(
  parameter int unsigned NT = 64,
  parameter int unsigned STAGE = 1,
  parameter bit HAS_MULT = 1'b1,
  parameter bit GATE_FIFO = 1'b1,
  localparam int unsigned AW = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clr,
  input  cplx_t         din,
  input  logic          din_valid,
  input  stage_ctrl_t   ctrl,
  input  logic [AW-1:0] fifo_addr,
  input  logic [7:0]    tw_addr,
  output cplx_t         dout,
  output logic          dout_valid
);

  cplx_t o [4];
  cplx_t bf, bf_q;
  logic  bf_v;
  logic  fifo_we;

  assign fifo_we = GATE_FIFO ? ctrl.shift : (din_valid && !clr);

  // the stage number fixes the FIFO length: NT = 4^(4-STAGE)
  if (NT != (1 << (2 * (4 - STAGE)))) begin : g_bad_geometry
    $error("r4_stage: NT must equal 4^(4-STAGE)");
  end

  r4_commutator #(.NT(NT)) u_com (
    .clk, .we(fifo_we), .addr(fifo_addr),
    .c1(ctrl.c1), .c2(ctrl.c2), .c3(ctrl.c3),
    .din, .o
  );

  r4_butterfly u_bf (.o, .sel(ctrl.bf_sel), .y(bf));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bf_q <= '0;
      bf_v <= 1'b0;
    end else if (clr) begin
      bf_v <= 1'b0;
    end else if (en) begin
      bf_q <= bf;
      bf_v <= ctrl.out_ok;
    end
  end

  if (HAS_MULT) begin : g_mult
    cplx_t w, prod;
    twiddle_rom u_rom (.clk, .en, .addr(tw_addr), .w);
    cmult u_mul (.a(bf_q), .w, .y(prod));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dout       <= '0;
        dout_valid <= 1'b0;
      end else if (clr) begin
        dout_valid <= 1'b0;
      end else if (en) begin
        dout       <= prod;
        dout_valid <= bf_v;
      end
    end
  end else begin : g_nomult
    assign dout       = bf_q;
    assign dout_valid = bf_v;
  end

endmodule
