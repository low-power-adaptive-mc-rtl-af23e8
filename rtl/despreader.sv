// Despreading module: multiplies each FFT output by its chip value +1/-1.
//
// The chip code of the user is a 64-bit ROM (parameter CHIP_CODE, bit k =
// chip k, 1 standing for -1).  A -1 chip complements both halves of the
// sample with XOR gates (one's complement, i.e. -x-1); a +1 chip lets the
// sample through.  Combinational.  The XOR scheme and the 64-bit ROM
// follow the document; the code value itself is this design's placeholder
// for the user's spreading code.
module despreader
  import mccdma_pkg::*;
#(
  parameter logic [63:0] CHIP_CODE = 64'h9A5C_36E1_F00F_5AA5
) (
  input  cplx_t      y,
  input  logic [5:0] adr1,     // chip index
  output cplx_t      x,
  output logic       chip      // 1 = chip -1
);

  assign chip = CHIP_CODE[adr1];
  assign x.re = y.re ^ {WL{chip}};
  assign x.im = y.im ^ {WL{chip}};

endmodule
