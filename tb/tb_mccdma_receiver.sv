// End-to-end testbench of the MC-CDMA receiver core, both variants side by
// side on the same stream.
//
// Sequence: 256 sub-carriers, one full frame (pilot + 31 data symbols) and
// the pilot and first data symbol of a second frame over a different
// channel; then 64 sub-carriers, one full frame; then 256 again, a pilot and
// three data symbols.  Every received bit is compared with the transmitted
// one, the two variants must agree, the estimation and demodulation phase
// lengths (256/7936 and 64/1984 cycles) are measured, and the clock-gating
// indications (stage 1 of the FFT, upper memory part) must follow the mode.
`timescale 1ns/1ps
module tb_mccdma_receiver;
  import mccdma_pkg::*;
  import mccdma_tx_pkg::*;

  localparam logic [63:0] CODE = 64'h9A5C_36E1_F00F_5AA5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s256;
  word_t lambda;
  cplx_t din;
  logic din_valid;
  logic fo_a, fv_a, g1_a, mu_a, pil_a, rs_a;
  logic fo_b, fv_b, g1_b, mu_b, pil_b, rs_b;
  word_t soft_a, soft_b;
  int checks = 0, failures = 0, cycle = 0;
  int bits_ok = 0, restarts = 0, gated1 = 0, gated_mem = 0, pilots = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  mccdma_receiver #(.VARIANT(1), .CHIP_CODE(CODE)) dut_a (
    .clk, .rst_n, .s256, .lambda, .din, .din_valid,
    .fo(fo_a), .fo_valid(fv_a), .fo_soft(soft_a), .fft_gck1_en(g1_a),
    .mem_upper_en(mu_a), .pilot(pil_a), .restart(rs_a));
  mccdma_receiver #(.VARIANT(2), .CHIP_CODE(CODE)) dut_b (
    .clk, .rst_n, .s256, .lambda, .din, .din_valid,
    .fo(fo_b), .fo_valid(fv_b), .fo_soft(soft_b), .fft_gck1_en(g1_b),
    .mem_upper_en(mu_b), .pilot(pil_b), .restart(rs_b));

  bit expq [$];
  int extra_bits = 0;

  always @(posedge clk) begin
    if (fv_a !== fv_b || (fv_a && (fo_a != fo_b))) begin
      failures++; $display("FAIL variants disagree at cycle %0d", cycle);
    end
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
    if (mu_b !== 1'b1) begin failures++; $display("FAIL receiver-II gated its memory"); end
  end

  // phase-length measurement on the combiner's pilot indication
  int run_len = 0, est_len = 0, dem_len = 0;
  logic pil_q = 1'b0;
  always @(posedge clk) begin
    if (dut_a.u_comb.y_valid) begin
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

    // every mechanism must have happened
    checks++;
    if (restarts < 2 || gated1 == 0 || gated_mem == 0 || pilots < 5) begin
      failures++;
      $display("FAIL mechanisms: restarts=%0d gated1=%0d gated_mem=%0d pilots=%0d", restarts, gated1, gated_mem, pilots);
    end
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
