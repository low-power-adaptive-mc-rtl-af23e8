// Twiddle-factor ROM: W_256^k = exp(-j*2*pi*k/256), k = 0..255, in Q2.14.
//
// Entry k holds {round(16384*cos(2*pi*k/256)), round(-16384*sin(2*pi*k/256))}
// as two 16-bit fields, loaded from rtl/twiddle256.hex (path relative to the
// directory the simulator runs in).  Every stage of the 256-point pipeline
// uses a subset of this table: stage t reads index (s*n*4^(t-1)) mod 256.
// One-cycle synchronous read.
module twiddle_rom
  import mccdma_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  logic [7:0] addr,
  output cplx_t      w
);

  logic [31:0] rom [256];

  initial $readmemh("rtl/twiddle256.hex", rom);

  always_ff @(posedge clk) begin
    if (en) w <= rom[addr];
  end

endmodule
