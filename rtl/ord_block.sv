// Ordering block (ORD): restores the digit-reversed 256-point FFT output to
// natural order for the combiner.
//
// Two 256-word RAMs work in ping-pong.  While one is written, the other
// returns the previous block.  The write address is Mcount = ROM(Count),
// the digit-reversed position of the incoming word, and the read address is
// the plain counter Count, so the block comes out in natural order one
// block later.  MUXA0/MUXA1 steer the two addresses and MUXD picks the RAM
// being read; the FSM flips Sel after every 256 valid words.  In 64
// sub-carrier mode (S256 = 0) the IMUX holds the RAM input at 0 and the FSM
// clock is gated, so the block is idle and the caller bypasses it.
//
// Timing: the RAM read is synchronous, so dout_valid follows the valid input
// that read it by one cycle; the first valid output belongs to the first
// input of the second block (latency 256 samples + 1 cycle).  A change of
// S256 or `clr` restarts the block.  The RAMs, multiplexers, ROM and FSM
// are those of the ordering-stage figure; the ROM is the digit-reversal
// permutation {c[1:0],c[3:2],c[5:4],c[7:6]}, which is only wiring.
module ord_block
  import mccdma_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s256,
  input  logic  clr,
  input  cplx_t din,
  input  logic  din_valid,
  output cplx_t dout,
  output logic  dout_valid
);

  cplx_t       ram0 [256];
  cplx_t       ram1 [256];
  cplx_t       wdata, q0, q1;
  logic [7:0]  count, mcount, addr0, addr1;
  logic        sel, primed, gck, step, rd_sel, rd_v;

  assign gck    = s256;              // gated clock of the ORD FSM
  assign step   = gck && din_valid && !clr;
  assign mcount = digit_rev8(count); // address ROM

  // IMUX
  assign wdata = s256 ? din : '0;

  // FSM: counter and RAM select
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      sel    <= 1'b0;
      primed <= 1'b0;
    end else if (clr || !s256) begin
      count  <= '0;
      sel    <= 1'b0;
      primed <= 1'b0;
    end else if (step) begin
      count <= count + 8'd1;
      if (count == 8'hff) begin
        sel    <= ~sel;
        primed <= 1'b1;
      end
    end
  end

  // MUXA0 / MUXA1: the RAM being written takes Mcount, the other Count
  assign addr0 = sel ? count : mcount;
  assign addr1 = sel ? mcount : count;

  always_ff @(posedge clk) begin
    if (step && !sel) ram0[addr0] <= wdata;   // wr-e = ~Sel
    if (step)         q0 <= ram0[addr0];
  end

  always_ff @(posedge clk) begin
    if (step && sel)  ram1[addr1] <= wdata;   // wr-e = Sel
    if (step)         q1 <= ram1[addr1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_sel <= 1'b0;
      rd_v   <= 1'b0;
    end else begin
      rd_sel <= sel;
      rd_v   <= step && primed;
    end
  end

  // MUXD: the RAM not being written is read
  assign dout       = rd_sel ? q0 : q1;
  assign dout_valid = rd_v;

endmodule
