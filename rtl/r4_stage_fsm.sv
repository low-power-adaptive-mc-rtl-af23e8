// Control FSM of one radix-4 stage: generates C1..C7, the FIFO address and
// the twiddle address.
//
// A counter of 2+log2(NT) bits advances once per valid input sample while
// the stage clock is enabled.  Its top two bits are the input quarter q of
// the current 4*NT block, its low bits the index n inside the quarter.  The
// commutator muxes take the direct taps in quarter 3 (C1..C3 = 1), the
// butterfly computes output s = (q+1) mod 4, and the twiddle for that
// output is W_256^(s*n*4^(STAGE-1)).  Until the first quarter 3 is reached
// the butterfly operands are not yet complete, so C7 (output valid) is held
// low.  `clr` restarts the count (mode change); it acts even while the
// stage clock is gated.  Outputs are combinational from the counter and
// `in_valid`.  The document gives the count of control lines (seven per
// stage); their assignment is this design's.
module r4_stage_fsm
  import mccdma_pkg::*;
#(
  parameter int unsigned NT = 64,
  parameter int unsigned STAGE = 1,
  localparam int unsigned AW = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,        // gated-clock enable of the stage
  input  logic          clr,       // restart (mode change)
  input  logic          in_valid,  // a sample enters the stage
  output stage_ctrl_t   ctrl,
  output logic [AW-1:0] fifo_addr,
  output logic [7:0]    tw_addr
);

  localparam int unsigned NB = $clog2(4 * NT);

  logic [NB-1:0] cnt;
  logic          primed;
  logic [1:0]    q, s;
  logic [AW-1:0] n;

  assign q = cnt[NB-1 -: 2];
  if (NT > 1) begin : g_n
    assign n = cnt[AW-1:0];
  end else begin : g_n1
    assign n = '0;
  end
  assign s = q + 2'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      primed <= 1'b0;
    end else if (clr) begin
      cnt    <= '0;
      primed <= 1'b0;
    end else if (en && in_valid) begin
      cnt <= cnt + 1'b1;
      if (q == 2'd3) primed <= 1'b1;
    end
  end

  always_comb begin
    ctrl.c1     = (q == 2'd3);
    ctrl.c2     = (q == 2'd3);
    ctrl.c3     = (q == 2'd3);
    ctrl.bf_sel = s;
    ctrl.shift  = en && in_valid && !clr;
    ctrl.out_ok = en && in_valid && !clr && (primed || q == 2'd3);
  end

  assign fifo_addr = n;
  assign tw_addr   = 8'((16'(s) * 16'(n)) << (2 * (STAGE - 1)));

endmodule
