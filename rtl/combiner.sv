// Reconfigurable combiner (combiner-I / combiner-II) for 256 or 64
// sub-carriers: despreading, pilot-based MMSE channel estimation and
// equalization, and accumulation of 64 chips into one received bit.
//
// Data flow per sample: input register -> despreader (chip from the 64-bit
// ROM) -> MAC module.  In a pilot symbol the MAC output Hsq and the
// despread pilot go to the division module, whose coefficients
// m = H*/(|H|^2 + lambda) are written to the partitioned equalizer memory
// at the sub-carrier's address.  In the 31 data symbols the coefficient is
// read back and the MAC accumulates Re{A(k) c(k) Y(k)} over 64 sub-carriers;
// the sign is the received bit FO (fo_valid marks it).  256 sub-carriers
// carry four bits per symbol (sub-carriers 0-63, 64-127, ...), 64 carry one.
//
// Timing: fo_valid rises 5 cycles after the last sample of a 64-chip group.
// The first valid sample after reset or a change of S256 is taken as a
// pilot.  VARIANT 1 (combiner-I) gates the 192-word part of the memory in
// 64 mode; VARIANT 2 (combiner-II) gates only the FSM.  LAMBDA is the MMSE
// regularisation term lambda, given as an input.
// The controller's fsm256_en/clr and the despreader's chip outputs are
// status signals for test and are deliberately left open here.
module combiner
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
  input  cplx_t y,
  input  logic  y_valid,
  output logic  fo,
  output logic  fo_valid,
  output word_t acc,          // signed sum behind the decision, for observation
  output logic  pilot,        // current input sample belongs to a pilot
  output logic  mem_upper_en  // clock of the 192-word memory part
);

  comb_ctrl_t ctrl;
  logic [5:0] adr1;
  logic       acc_en;
  cplx_t      y_q, x, eq, m;
  word_t      xdr, xdi, hsq;

  combiner_ctrl u_ctrl (
    .clk, .rst_n, .s256, .in_valid(y_valid),
    .ctrl, .adr1, .acc_en, .fo_valid, .pilot, .fsm256_en(), .clr());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_q <= '0;
    else        y_q <= y;
  end

  despreader #(.CHIP_CODE(CHIP_CODE)) u_desp (.y(y_q), .adr1, .x, .chip());

  mac_unit #(.MULT_SHIFT(MULT_SHIFT)) u_mac (
    .clk, .rst_n, .xr(x.re), .xi(x.im), .eqr(eq.re), .eqi(eq.im),
    .s11(ctrl.s11), .s12(ctrl.s12), .s13(ctrl.s13), .s14(ctrl.s14),
    .acc_en, .xdr, .xdi, .hsq, .acc, .fo);

  division_module #(.DIV_SHIFT(DIV_SHIFT)) u_div (
    .clk, .rst_n, .xdr, .xdi, .hsq, .lambda, .enf(ctrl.enf), .enr(ctrl.enr),
    .mr(m.re), .mi(m.im));

  eq_memory #(.GATE_UPPER(VARIANT == 1)) u_mem (
    .clk, .s256, .cs(ctrl.cs), .wa(ctrl.wa), .wd(m), .ra(ctrl.ra), .rd(eq),
    .upper_en(mem_upper_en));

endmodule
