// End-to-end testbench of the top level at its default parameters
// (receiver-I beside RFFT-I), one complete operation of each core.
//
// Receiver part:
// Sequence: 256 sub-carriers, one full frame (pilot + 31 data symbols) and
// the pilot and first data symbol of a second frame over a different
// channel; then 64 sub-carriers, one full frame; then 256 again, a pilot and
// three data symbols.  Every received bit is compared with the transmitted
// one, the estimation and demodulation phase
// lengths (256/7936 and 64/1984 cycles) are measured, and the clock-gating
// indications (stage 1 of the FFT, upper memory part) must follow the mode.
// FFT part, running at the same time: blocks of 256, 64 and 16 points
// (and a 64-point IFFT)
// compared bit-true with a radix-4 DIF model.  Every mechanism (size
// restart, stage-1 and stage-2 clock gating, memory gating, pilot
// re-estimation, MUX I and MUX II bypass, inverse transform) is counted and must occur.
`timescale 1ns/1ps
module tb_mccdma_top;
  import mccdma_pkg::*;
  import mccdma_tx_pkg::*;
  import fft_ref_pkg::*;

  localparam logic [63:0] CODE = 64'h9A5C_36E1_F00F_5AA5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s256;
  word_t lambda;
  cplx_t din;
  logic din_valid;
  logic fo_a, fv_a, g1_a, mu_a, pil_a, rs_a;
  word_t soft_a;
  int checks = 0, failures = 0, cycle = 0;
  int bits_ok = 0, restarts = 0, gated1 = 0, gated_mem = 0, pilots = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic fs256, fs64, finv, fdv, fov, fg1, fg2, frs;
  cplx_t fdin, fdout;
  int f_checks = 0, f_fail = 0, gated2 = 0, bypass1 = 0, bypass2 = 0, f_restarts = 0, ifft_samples = 0;
  bit fft_done = 1'b0;

  mccdma_top dut (
    .clk, .rst_n,
    .rx_s256(s256), .rx_lambda(lambda), .rx_din(din), .rx_din_valid(din_valid),
    .rx_fo(fo_a), .rx_fo_valid(fv_a), .rx_fo_soft(soft_a), .rx_fft_gck1_en(g1_a),
    .rx_mem_upper_en(mu_a), .rx_pilot(pil_a), .rx_restart(rs_a),
    .fft_s256(fs256), .fft_s64(fs64), .fft_inverse(finv), .fft_din(fdin), .fft_din_valid(fdv),
    .fft_dout(fdout), .fft_dout_valid(fov), .fft_gck1_en(fg1), .fft_gck2_en(fg2),
    .fft_restart(frs));


  ci_t fexp [$];
  always @(posedge clk) begin
    if (frs && rst_n) f_restarts++;
    if (fdv && !fg2) gated2++;
    if (fdv && !fg1) bypass1++;
    if (fdv && !fg2) bypass2++;
    if (fdv && finv) ifft_samples++;
    if (fov && fexp.size() > 0) begin
      ci_t e;
      e = fexp.pop_front();
      f_checks++;
      if (int'(fdout.re) != e.re || int'(fdout.im) != e.im) begin
        f_fail++;
        if (f_fail < 5) $display("FAIL fft (%0d,%0d) expected (%0d,%0d)", fdout.re, fdout.im, e.re, e.im);
      end
    end
  end

  task automatic fft_size(int n, bit a256, bit a64, bit inv = 1'b0);
    ci_t blk [];
    @(negedge clk);
    fdv = 1'b0;
    fs256 = a256; fs64 = a64; finv = inv;
    repeat (3) @(negedge clk);
    for (int b = 0; b < 3; b++) begin
      blk = new[n];
      foreach (blk[i]) begin
        blk[i].re = int'($urandom_range(16000)) - 8000;
        blk[i].im = int'($urandom_range(16000)) - 8000;
      end
      for (int i = 0; i < n; i++) begin
        fdin.re = 16'(blk[i].re); fdin.im = 16'(blk[i].im); fdv = 1'b1;
        @(negedge clk);
      end
      // IFFT = swap(FFT(swap(x))); the swap itself is checked against an
      // inverse DFT in the FFT's own testbench
      if (inv) foreach (blk[i]) blk[i] = '{re: blk[i].im, im: blk[i].re};
      dif_fixed(n, blk);
      if (inv) foreach (blk[i]) blk[i] = '{re: blk[i].im, im: blk[i].re};
      foreach (blk[i]) fexp.push_back(blk[i]);
    end
    fdin = '0;
    repeat (n + 20) @(negedge clk);
    fdv = 1'b0;
    repeat (5) @(negedge clk);
    f_checks++;
    if (fexp.size() != 0) begin f_fail++; $display("FAIL %0d fft outputs missing", fexp.size()); fexp.delete(); end
  endtask

  initial begin
    fs256 = 1'b1; fs64 = 1'b1; finv = 1'b0; fdv = 1'b0; fdin = '0;
    @(posedge rst_n);
    fft_size(256, 1'b1, 1'b1);
    fft_size(64, 1'b0, 1'b1);
    fft_size(16, 1'b0, 1'b0);
    fft_size(256, 1'b1, 1'b1);
    fft_size(64, 1'b0, 1'b1, 1'b1);
    fft_done = 1'b1;
  end

  bit expq [$];
  int extra_bits = 0;

  always @(posedge clk) begin
    if (fv_a) begin
      if (expq.size() > 0) begin
        bit e;
        e = expq.pop_front();
        checks++;
        if (fo_a != e) begin
          failures++;
          if (failures < 10) $display("FAIL bit: got %0d expected %0d (soft %0d) cycle %0d", fo_a, e, soft_a, cycle);
        end else bits_ok++;
      end else extra_bits++;
    end
    if (rs_a && rst_n) restarts++;
    if (!g1_a && din_valid) gated1++;
    if (!mu_a && din_valid) gated_mem++;
  end

  // phase-length measurement on the combiner's pilot indication
  int run_len = 0, est_len = 0, dem_len = 0;
  logic pil_q = 1'b0;
  always @(posedge clk) begin
    if (dut.u_rx.u_comb.y_valid) begin
      if (pil_a && !pil_q) pilots++;
      if (pil_a != pil_q && run_len > 0) begin
        if (pil_q) est_len = run_len; else dem_len = run_len;
        run_len = 0;
      end
      run_len++;
      pil_q = pil_a;
    end
  end

  task automatic send_symbol(int n, cr_t h[], bit bits[], bit expect_bits);
    int xr [];
    int xi [];
    make_symbol(n, h, CODE, bits, xr, xi);
    if (expect_bits) foreach (bits[g]) expq.push_back(bits[g]);
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      din_valid = 1'b1;
      din.re = 16'(xr[t]);
      din.im = 16'(xi[t]);
    end
  endtask

  task automatic send_frame(int n, cr_t h[], int ndata);
    bit bits [];
    bits = new[n / 64];
    foreach (bits[g]) bits[g] = 1'b0;
    send_symbol(n, h, bits, 1'b0);            // pilot
    for (int s = 0; s < ndata; s++) begin
      foreach (bits[g]) bits[g] = 1'($urandom_range(1));
      send_symbol(n, h, bits, 1'b1);
    end
  endtask

  task automatic flush(int nsamp);
    for (int t = 0; t < nsamp; t++) begin
      @(negedge clk);
      din_valid = 1'b1;
      din = '0;
    end
    @(negedge clk);
    din_valid = 1'b0;
    repeat (20) @(posedge clk);
  endtask

  task automatic check_phase(int e_exp, int d_exp);
    checks++;
    if (est_len != e_exp || dem_len != d_exp) begin
      failures++;
      $display("FAIL phase lengths %0d/%0d expected %0d/%0d", est_len, dem_len, e_exp, d_exp);
    end
  endtask

  task automatic switch_mode(bit m);
    @(negedge clk);
    din_valid = 1'b0;
    s256 = m;
    repeat (4) @(posedge clk);
    pil_q = 1'b0;
    run_len = 0;
  endtask

  initial begin
    cr_t h1 [];
    cr_t h2 [];
    cr_t h3 [];
    din = '0; din_valid = 1'b0; s256 = 1'b1; lambda = 16'sd16;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    make_channel(256, 0.4, 0.7, 3, h1);
    make_channel(256, 0.5, 2.1, 5, h2);
    send_frame(256, h1, 31);
    send_frame(256, h2, 1);
    flush(2 * 256 + 64);
    check_phase(256, 7936);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d bits missing (256)", expq.size()); expq.delete(); end

    switch_mode(1'b0);
    make_channel(64, 0.45, 1.3, 2, h3);
    send_frame(64, h3, 31);
    send_frame(64, h3, 1);
    flush(64 + 16);
    check_phase(64, 1984);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d bits missing (64)", expq.size()); expq.delete(); end

    switch_mode(1'b1);
    send_frame(256, h2, 3);
    flush(2 * 256 + 64);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d bits missing (256 again)", expq.size()); expq.delete(); end

    wait (fft_done);
    checks += f_checks;
    failures += f_fail;
    // every mechanism must have happened
    checks++;
    if (restarts < 2 || gated1 == 0 || gated_mem == 0 || pilots < 5 ||
        f_restarts < 4 || ifft_samples == 0 || gated2 == 0 || bypass1 == 0 || bypass2 == 0) begin
      failures++;
      $display("FAIL mechanisms: restarts=%0d gated1=%0d gated_mem=%0d pilots=%0d", restarts, gated1, gated_mem, pilots);
    end
    $display("fft outputs checked=%0d size restarts=%0d stage-2 gated cycles=%0d ifft samples=%0d",
             f_checks, f_restarts, gated2, ifft_samples);
    $display("bits ok=%0d restarts=%0d stage1-gated cycles=%0d memory-gated cycles=%0d pilots=%0d",
             bits_ok, restarts, gated1, gated_mem, pilots);
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
