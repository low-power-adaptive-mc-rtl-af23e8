// Finite-state-machine module of the reconfigurable combiner: FSM256,
// FSM64 and the 23-bit multiplexer MUX23.
//
// S256 = 1 selects FSM256, S256 = 0 FSM64.  The unselected FSM has its
// clock gated (enable low).  A change of S256 is registered and yields a
// one-cycle `clr` that restarts both FSMs, so the next valid sample is
// taken as the pilot of a new frame.  Besides the 23-bit word of the block
// diagram the selected FSM also gives the chip address adr1, the
// accumulator enable and the received-bit strobe; they pass the same mux.
module combiner_ctrl
  import mccdma_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       s256,
  input  logic       in_valid,
  output comb_ctrl_t ctrl,
  output logic [5:0] adr1,
  output logic       acc_en,
  output logic       fo_valid,
  output logic       pilot,
  output logic       fsm256_en,
  output logic       clr
);

  comb_ctrl_t c256, c64;
  logic [5:0] a256, a64;
  logic       ae256, ae64, fv256, fv64, p256, p64, s256_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s256_q <= 1'b1;
    else        s256_q <= s256;
  end

  assign clr       = (s256 != s256_q);
  assign fsm256_en = s256;

  combiner_fsm #(.NSC(256)) u_fsm256 (
    .clk, .rst_n, .en(s256), .clr, .in_valid,
    .ctrl(c256), .adr1(a256), .acc_en(ae256), .fo_valid(fv256), .pilot(p256));
  combiner_fsm #(.NSC(64)) u_fsm64 (
    .clk, .rst_n, .en(!s256), .clr, .in_valid,
    .ctrl(c64), .adr1(a64), .acc_en(ae64), .fo_valid(fv64), .pilot(p64));

  // MUX23 (and the side signals)
  assign ctrl     = s256 ? c256  : c64;
  assign adr1     = s256 ? a256  : a64;
  assign acc_en   = s256 ? ae256 : ae64;
  assign fo_valid = s256 ? fv256 : fv64;
  assign pilot    = s256 ? p256  : p64;

endmodule
