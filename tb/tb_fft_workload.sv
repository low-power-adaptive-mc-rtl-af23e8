// Workload testbench of the reconfigurable FFT: 4000 random samples per size.
//
// For each transform size (256, 64 and 16 points) it streams at least 4000
// uniformly distributed random complex samples (whole blocks: 16 x 256,
// 63 x 64, 250 x 16) back to back through an RFFT-I-style and an
// RFFT-II-style instance.  Every output sample is compared with a bit-true
// radix-4 DIF model (exact) and with a floating-point DFT/N (within 12
// LSBs); the two instances must agree sample for sample.  It also checks
// the sustained rate: one output per input clock once the pipeline is full.
`timescale 1ns/1ps
module tb_fft_workload;
  import mccdma_pkg::*;
  import fft_ref_pkg::*;

  localparam int NSAMP = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s256, s64;
  cplx_t din;
  logic din_valid;
  cplx_t dout_a, dout_b;
  logic dv_a, dv_b, g1a, g2a, g1b, g2b, rs_a, rs_b;
  int checks = 0, failures = 0;
  int nout = 0;

  always #5 clk = ~clk;

  rfft256 #(.SUPPORT_16(1), .GATE_FIFO(1)) dut_a (
    .clk, .rst_n, .s256, .s64, .inverse(1'b0), .din, .din_valid,
    .dout(dout_a), .dout_valid(dv_a), .gck1_en(g1a), .gck2_en(g2a), .restart(rs_a));
  rfft256 #(.SUPPORT_16(1), .GATE_FIFO(0)) dut_b (
    .clk, .rst_n, .s256, .s64, .inverse(1'b0), .din, .din_valid,
    .dout(dout_b), .dout_valid(dv_b), .gck1_en(g1b), .gck2_en(g2b), .restart(rs_b));

  ci_t expq [$];
  real fexp_re [$], fexp_im [$];

  always @(posedge clk) begin
    if (rst_n && (dv_a !== dv_b || (dv_a && dout_a != dout_b))) begin
      failures++;
      $display("FAIL variant mismatch");
    end
    if (rst_n && dv_a && expq.size() > 0) begin
      ci_t e;
      real fr, fi;
      e  = expq.pop_front();
      fr = fexp_re.pop_front();
      fi = fexp_im.pop_front();
      nout++;
      checks++;
      if (int'(dout_a.re) != e.re || int'(dout_a.im) != e.im) begin
        failures++;
        if (failures < 10)
          $display("FAIL out (%0d,%0d) expected (%0d,%0d)", dout_a.re, dout_a.im, e.re, e.im);
      end
      if ((fr - dout_a.re) > 12.0 || (dout_a.re - fr) > 12.0 ||
          (fi - dout_a.im) > 12.0 || (dout_a.im - fi) > 12.0) begin
        failures++;
        if (failures < 10) $display("FAIL out vs DFT/N: (%0d,%0d) vs (%f,%f)", dout_a.re, dout_a.im, fr, fi);
      end
    end
  end

  task automatic run_size(int n, bit a256, bit a64);
    int nblk = (NSAMP + n - 1) / n;
    int first_out, last_out, cyc;
    s256 = a256; s64 = a64;
    repeat (2) @(posedge clk);
    nout = 0;
    cyc = 0; first_out = -1; last_out = -1;
    for (int b = 0; b <= nblk; b++) begin
      ci_t blk [], r [];
      blk = new[n];
      for (int i = 0; i < n; i++) begin
        blk[i].re = (b < nblk) ? int'($urandom_range(16000)) - 8000 : 0;
        blk[i].im = (b < nblk) ? int'($urandom_range(16000)) - 8000 : 0;
      end
      if (b < nblk) begin
        r = new[n];
        foreach (r[i]) r[i] = blk[i];
        dif_fixed(n, r);
        for (int i = 0; i < n; i++) begin
          real fr, fi;
          dft_bin(n, blk, digrev(i, n), fr, fi);
          expq.push_back(r[i]);
          fexp_re.push_back(fr);
          fexp_im.push_back(fi);
        end
      end
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        din_valid = 1'b1;
        din.re = 16'(blk[i].re);
        din.im = 16'(blk[i].im);
        if (dv_a) begin
          if (first_out < 0) first_out = cyc;
          last_out = cyc;
        end
        cyc++;
      end
    end
    @(negedge clk);
    din_valid = 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0 || nout != nblk * n) begin
      failures++;
      $display("FAIL size %0d: %0d of %0d outputs", n, nout, nblk * n);
      expq.delete(); fexp_re.delete(); fexp_im.delete();
    end
    // sustained rate: the valid outputs seen while streaming form one run
    checks++;
    if (first_out < 0 || (last_out - first_out + 1) < (nblk - 1) * n) begin
      failures++;
      $display("FAIL size %0d: output run %0d..%0d shorter than expected", n, first_out, last_out);
    end
    $display("size %0d: %0d blocks, %0d samples checked", n, nblk, nout);
  endtask

  initial begin
    din = '0; din_valid = 1'b0; s256 = 1'b1; s64 = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_size(256, 1'b1, 1'b1);
    run_size(64,  1'b0, 1'b1);
    run_size(16,  1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
