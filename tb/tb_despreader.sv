// Testbench of the despreading module: for every chip index and random
// samples the output must be the sample for a +1 chip and its one's
// complement (-x-1) for a -1 chip, with the chip taken from the code the
// testbench holds.
`timescale 1ns/1ps
module tb_despreader;
  import mccdma_pkg::*;

  localparam logic [63:0] CODE = 64'h9A5C_36E1_F00F_5AA5;
  cplx_t y, x;
  logic [5:0] adr1;
  logic chip;
  int checks = 0, failures = 0;

  despreader #(.CHIP_CODE(CODE)) dut (.y, .adr1, .x, .chip);

  initial begin
    for (int t = 0; t < 1024; t++) begin
      int a, b, er, ei;
      a = int'($urandom_range(65535)) - 32768;
      b = int'($urandom_range(65535)) - 32768;
      y.re = 16'(a); y.im = 16'(b); adr1 = 6'(t);
      er = CODE[t % 64] ? -a - 1 : a;
      ei = CODE[t % 64] ? -b - 1 : b;
      #1;
      checks++;
      if (int'(x.re) != er || int'(x.im) != ei || chip != CODE[t % 64]) begin
        failures++;
        if (failures < 5) $display("FAIL k=%0d got %0d expected %0d", t % 64, x.re, er);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
