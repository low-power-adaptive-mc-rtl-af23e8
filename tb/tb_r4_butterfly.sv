// Testbench of the radix-4 butterfly: random operand sets x0..x3 are placed
// on O1..O4 in the rotation the commutator produces for output s, and the
// result must equal X_s = floor((sum_q x_q (-j)^(s q)) / 4), computed here
// directly from the DFT definition.
`timescale 1ns/1ps
module tb_r4_butterfly;
  import mccdma_pkg::*;

  cplx_t o [4];
  logic [1:0] sel;
  cplx_t y;
  int checks = 0, failures = 0;

  r4_butterfly dut (.o, .sel, .y);

  initial begin
    int xr [4], xi [4];
    for (int t = 0; t < 2000; t++) begin
      int er, ei, s;
      s = t % 4;
      for (int q = 0; q < 4; q++) begin
        xr[q] = (t < 8) ? ((t % 2) ? 32767 : -32768) : int'($urandom_range(65535)) - 32768;
        xi[q] = (t < 8) ? ((t % 2) ? -32768 : 32767) : int'($urandom_range(65535)) - 32768;
      end
      for (int i = 0; i < 4; i++) begin
        o[i].re = 16'(xr[(s - i + 4) % 4]);
        o[i].im = 16'(xi[(s - i + 4) % 4]);
      end
      sel = 2'(s);
      er = 0; ei = 0;
      for (int q = 0; q < 4; q++) begin
        case ((s * q) % 4)
          0: begin er += xr[q]; ei += xi[q]; end
          1: begin er += xi[q]; ei -= xr[q]; end
          2: begin er -= xr[q]; ei -= xi[q]; end
          3: begin er -= xi[q]; ei += xr[q]; end
        endcase
      end
      er = er >>> 2; ei = ei >>> 2;
      #1;
      checks++;
      if (int'(y.re) != er || int'(y.im) != ei) begin
        failures++;
        if (failures < 5) $display("FAIL s=%0d got %0d,%0d expected %0d,%0d", s, y.re, y.im, er, ei);
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
