// Radix-4 single-path delay commutator (six N_t FIFOs, three multiplexers).
//
// The input stream passes a chain of three FIFOs, giving taps delayed by 0,
// NT, 2NT and 3NT samples; the 3NT tap is output O1.  A second chain of
// three FIFOs, each fed by the previous output, together with the muxes
// C1..C3 produces O2..O4.  When the C-selects are 1 (the last quarter of a
// 4*NT block) the muxes pass the direct taps and the four outputs hold
// x0,x3,x2,x1 of one butterfly; in the next three quarters they pass the
// FIFOs and the outputs hold the same four operands rotated by one place
// each quarter.  So every valid sample cycle presents all four operands of
// one butterfly, which lets a butterfly produce one output per clock.
//
// Topology follows the commutator figure; the select polarity and the
// rotation bookkeeping are this design's.  Outputs are combinational from
// `din` and the FIFO words; the FIFOs advance when `we` is high.
module r4_commutator
  import mccdma_pkg::*;
#(
  parameter int unsigned NT = 64,
  localparam int unsigned AW = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic          clk,
  input  logic          we,       // advance all six FIFOs
  input  logic [AW-1:0] addr,     // sample index within a quarter
  input  logic          c1,
  input  logic          c2,
  input  logic          c3,
  input  cplx_t         din,
  output cplx_t         o [4]     // O1..O4
);

  cplx_t d1, d2, d3;      // taps after FIFO 1, 2, 3
  cplx_t f4, f5, f6;      // outputs of FIFO 4, 5, 6

  delay_fifo #(.NT(NT)) u_f1 (.clk, .we, .addr, .din(din), .dout(d1));
  delay_fifo #(.NT(NT)) u_f2 (.clk, .we, .addr, .din(d1),  .dout(d2));
  delay_fifo #(.NT(NT)) u_f3 (.clk, .we, .addr, .din(d2),  .dout(d3));
  delay_fifo #(.NT(NT)) u_f4 (.clk, .we, .addr, .din(d3),  .dout(f4));
  delay_fifo #(.NT(NT)) u_f5 (.clk, .we, .addr, .din(o[1]), .dout(f5));
  delay_fifo #(.NT(NT)) u_f6 (.clk, .we, .addr, .din(o[2]), .dout(f6));

  assign o[0] = d3;
  assign o[1] = c1 ? din : f4;
  assign o[2] = c2 ? d1  : f5;
  assign o[3] = c3 ? d2  : f6;

endmodule
