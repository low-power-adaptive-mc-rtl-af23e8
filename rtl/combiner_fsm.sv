// Combiner control FSM for NSC sub-carriers (FSM256 or FSM64).
//
// A frame is one pilot symbol followed by 31 data symbols, each symbol NSC
// consecutive valid samples.  During the pilot (estimation phase: NSC
// cycles) the FSM steers the MAC module to form |H|^2, enables the
// division module's FIFO (enF) and register (enR) and writes the
// coefficient of sub-carrier k to RAM word k (cs, wa).  During the 31 data
// symbols (31*NSC cycles: 7936 for 256, 1984 for 64) it reads coefficient k
// (ra), switches MUX A/B to the coefficients, complements the Mult II
// product (S13) and accumulates (S14), clearing the sum every 64
// sub-carriers, and marks the end of each 64-chip sum (fo_valid).
//
// Timing: the word is a mixture of pipeline steps.  ra leaves with the
// sample (step 0); adr1 and S11/S12 one cycle later; S13 and enF two; S14,
// enR and acc_en three; cs, wa and fo_valid four (enF also at three, so
// the FIFO shifts twice per pilot word).  `en` is the FSM's gated clock;
// `clr` restarts it at a pilot symbol.  For 64 sub-carriers the chip index
// adr1 follows the digit-reversed order in which the FFT then delivers its
// output.  Phase lengths follow the document, the step timing is this
// design's.
module combiner_fsm
  import mccdma_pkg::*;
#(
  parameter int unsigned NSC = 256,
  parameter int unsigned NSYM = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       clr,
  input  logic       in_valid,
  output comb_ctrl_t ctrl,
  output logic [5:0] adr1,
  output logic       acc_en,
  output logic       fo_valid,
  output logic       pilot       // the sample entering now is a pilot
);

  localparam int unsigned KW = $clog2(NSC);

  typedef struct packed {
    logic       v;
    logic       est;
    logic [7:0] k;
  } step_t;

  logic [KW-1:0]       k;
  logic [$clog2(NSYM)-1:0] sym;
  step_t st0, st1, st2, st3, st4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k   <= '0;
      sym <= '0;
    end else if (clr) begin
      k   <= '0;
      sym <= '0;
    end else if (en && in_valid) begin
      k <= k + 1'b1;
      if (k == KW'(NSC - 1)) sym <= (sym == ($clog2(NSYM))'(NSYM - 1)) ? '0 : sym + 1'b1;
    end
  end

  assign st0 = '{v: en && in_valid && !clr, est: (sym == '0), k: 8'(k)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st1 <= '0; st2 <= '0; st3 <= '0; st4 <= '0;
    end else if (clr) begin
      st1 <= '0; st2 <= '0; st3 <= '0; st4 <= '0;
    end else if (en) begin
      st1 <= st0; st2 <= st1; st3 <= st2; st4 <= st3;
    end
  end

  assign pilot = st0.est;

  always_comb begin
    ctrl.ra  = st0.k;
    ctrl.s11 = !st1.est;
    ctrl.s12 = !st1.est;
    ctrl.s13 = st2.v && !st2.est;
    ctrl.enf = (st2.v && st2.est) || (st3.v && st3.est);
    ctrl.s14 = st3.v && !st3.est && (st3.k[5:0] != 6'd0);
    ctrl.enr = st3.v && st3.est;
    ctrl.cs  = st4.v && st4.est;
    ctrl.wa  = st4.k;
    adr1     = (NSC == 64) ? digit_rev6(st1.k[5:0]) : st1.k[5:0];
    acc_en   = st3.v;
    fo_valid = st4.v && !st4.est && (st4.k[5:0] == 6'd63);
  end

endmodule
