// N_t-word FIFO of the radix-4 delay commutator, built as a dual-port RAM
// used as a circular delay line.
//
// The stage FSM supplies the address: it counts the samples of the stage
// modulo NT, so reading the word at that address and writing the new sample
// over it delays the stream by exactly NT written samples.  The read is
// asynchronous (the old word is visible in the same cycle), the write is
// synchronous on `we`.  Building the FIFO from a RAM rather than a shift
// register follows the document; sharing the address with the stage FSM is
// this design's choice.
module delay_fifo
  import mccdma_pkg::*;
#(
  parameter int unsigned NT = 64,
  localparam int unsigned AW = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic          clk,
  input  logic          we,     // write the new sample (one FIFO step)
  input  logic [AW-1:0] addr,   // sample count modulo NT
  input  cplx_t         din,
  output cplx_t         dout    // sample written NT steps earlier
);

  cplx_t mem [NT];

  logic [AW-1:0] a;
  assign a = (NT > 1) ? addr : '0;

  always_ff @(posedge clk) begin
    if (we) mem[a] <= din;
  end

  assign dout = mem[a];

endmodule
