// Self-checking testbench of the reconfigurable FFT (both gating variants).
//
// For each size (256, 64, 16, then 256 again) it streams NBLK random
// blocks plus one flush block through an RFFT-I-style and an RFFT-II-style
// instance side by side, and compares every output sample against a
// bit-true radix-4 DIF model (exact match) and against a floating-point
// DFT/N (within a few LSBs).  It also checks the input-to-output latency of
// the first sample of each size, that both instances agree, and that the
// IFFT mode matches a floating-point inverse DFT/N; and that the
// clock enables of stages 1 and 2 follow the size.
`timescale 1ns/1ps
module tb_rfft256;
  import mccdma_pkg::*;
  import fft_ref_pkg::*;

  localparam int NBLK = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s256, s64, inverse;
  cplx_t din;
  logic din_valid;
  cplx_t dout_a, dout_b;
  logic dv_a, dv_b, g1a, g2a, g1b, g2b, rs_a, rs_b;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  rfft256 #(.SUPPORT_16(1), .GATE_FIFO(1)) dut_a (
    .clk, .rst_n, .s256, .s64, .inverse, .din, .din_valid,
    .dout(dout_a), .dout_valid(dv_a), .gck1_en(g1a), .gck2_en(g2a), .restart(rs_a));
  rfft256 #(.SUPPORT_16(1), .GATE_FIFO(0)) dut_b (
    .clk, .rst_n, .s256, .s64, .inverse, .din, .din_valid,
    .dout(dout_b), .dout_valid(dv_b), .gck1_en(g1b), .gck2_en(g2b), .restart(rs_b));

  ci_t expq [$];
  ci_t inblk [];
  int first_in_cycle, first_out_cycle;
  bit  got_first;

  // output checker
  always @(posedge clk) begin
    if (rst_n && (dv_a !== dv_b || (dv_a && dout_a != dout_b))) begin
      failures++;
      $display("FAIL variant mismatch at cycle %0d", cycle);
    end
    if (rst_n && dv_a && expq.size() > 0) begin
      ci_t e;
      e = expq.pop_front();
      checks++;
      if (!got_first) begin
        got_first = 1'b1;
        first_out_cycle = cycle;
      end
      if (int'(dout_a.re) != e.re || int'(dout_a.im) != e.im) begin
        failures++;
        if (failures < 10)
          $display("FAIL fft out (%0d,%0d) expected (%0d,%0d)", dout_a.re, dout_a.im, e.re, e.im);
      end
    end
  end

  task automatic run_size(int n, bit a256, bit a64, int lat_exp, bit inv = 1'b0);
    ci_t blocks [NBLK][];
    s256 = a256; s64 = a64; inverse = inv;
    @(posedge clk); @(posedge clk);
    // gate check
    checks++;
    if (g1a != (n == 256) || g2a != (n >= 64) || g1b != g1a || g2b != g2a) begin
      failures++; $display("FAIL clock enables for size %0d", n);
    end
    got_first = 1'b0;
    for (int b = 0; b < NBLK; b++) begin
      ci_t r [];
      blocks[b] = new[n];
      for (int i = 0; i < n; i++) begin
        blocks[b][i].re = int'($urandom_range(16000)) - 8000;
        blocks[b][i].im = int'($urandom_range(16000)) - 8000;
      end
      r = new[n];
      // the IFFT is expected as swap(FFT(swap(x))), which the DFT check
      // below confirms independently
      foreach (r[i]) r[i] = inv ? '{re: blocks[b][i].im, im: blocks[b][i].re} : blocks[b][i];
      dif_fixed(n, r);
      if (inv) foreach (r[i]) r[i] = '{re: r[i].im, im: r[i].re};
      for (int i = 0; i < n; i++) begin
        real fr, fi;
        expq.push_back(r[i]);
        // floating-point cross-check of the model (first block only)
        if (b == 0) begin
          if (inv) idft_bin(n, blocks[b], digrev(i, n), fr, fi);
          else     dft_bin(n, blocks[b], digrev(i, n), fr, fi);
          checks++;
          if ((fr - r[i].re) > 12.0 || (r[i].re - fr) > 12.0 || (fi - r[i].im) > 12.0 || (r[i].im - fi) > 12.0) begin
            failures++;
            $display("FAIL model vs DFT n=%0d bin %0d: %0d,%0d vs %f,%f", n, i, r[i].re, r[i].im, fr, fi);
          end
        end
      end
    end
    // stream blocks followed by one flush block
    for (int b = 0; b <= NBLK; b++) begin
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        if (b == 0 && i == 0) first_in_cycle = cycle;
        din_valid = 1'b1;
        if (b < NBLK) begin
          din.re = 16'(blocks[b][i].re);
          din.im = 16'(blocks[b][i].im);
        end else begin
          din = '0;
        end
      end
    end
    @(negedge clk);
    din_valid = 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++; $display("FAIL %0d outputs missing for size %0d", expq.size(), n);
      expq.delete();
    end
    checks++;
    if (first_out_cycle - first_in_cycle != lat_exp) begin
      failures++;
      $display("FAIL latency size %0d: %0d cycles, expected %0d", n, first_out_cycle - first_in_cycle, lat_exp);
    end
  endtask

  initial begin
    din = '0; din_valid = 1'b0; s256 = 1'b1; s64 = 1'b1; inverse = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // latency: (N-1) samples plus 2 cycles per multiplier stage, 1 for the last
    run_size(256, 1'b1, 1'b1, 255 + 7);
    run_size(64,  1'b0, 1'b1, 63 + 5);
    run_size(16,  1'b0, 1'b0, 15 + 3);
    run_size(256, 1'b1, 1'b0, 255 + 7);
    // inverse transform at every size
    run_size(256, 1'b1, 1'b0, 255 + 7, 1'b1);
    run_size(64,  1'b0, 1'b1, 63 + 5, 1'b1);
    run_size(16,  1'b0, 1'b0, 15 + 3, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
