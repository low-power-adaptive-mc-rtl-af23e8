// Multi-user workload testbench of the receiver core: 32 users at 40 dB SNR.
//
// 32 users share the sub-carriers, each spread by its own row of the 64 x 64
// Walsh-Hadamard matrix (rows 32..63) with equal amplitude; the receiver is
// built for one of them (row 37).  Each frame has a pilot symbol sent by the
// received user alone, then 31 data symbols in which all 32 users send
// random bits.  The symbols pass a two-path channel and white Gaussian
// noise is added at 40 dB SNR.  The frame is run once with 256 and once
// with 64 sub-carriers, and every bit of the received user must come out
// right: the per-sub-carrier MMSE equaliser restores the orthogonality of
// the codes, so the other 31 users cancel in the 64-chip sum.  The smallest
// decision margin seen is printed.  (Because the coefficients are estimated
// from the despread pilot, the chip ROM cancels against the pilot: which
// user is received is set by the code of the pilot symbol.)
`timescale 1ns/1ps
module tb_multiuser;
  import mccdma_pkg::*;
  import mccdma_tx_pkg::*;

  localparam int          NUSERS = 32;
  localparam int          ME     = 5;            // index of the received user
  localparam logic [63:0] CODE   = walsh(32 + ME);
  localparam real         SNR_DB = 40.0;
  localparam real         A_DATA = 40.0;         // per-user data amplitude
  localparam real         A_PIL  = 256.0;        // pilot amplitude

  logic clk = 1'b0, rst_n = 1'b0;
  logic s256;
  word_t lambda;
  cplx_t din;
  logic din_valid;
  logic fo, fv, g1, mu, pil, rs;
  word_t fo_sum;
  int checks = 0, failures = 0, bit_errors = 0, min_margin = 32767;

  always #5 clk = ~clk;

  mccdma_receiver #(.VARIANT(1), .CHIP_CODE(CODE)) dut (
    .clk, .rst_n, .s256, .lambda, .din, .din_valid,
    .fo, .fo_valid(fv), .fo_soft(fo_sum), .fft_gck1_en(g1),
    .mem_upper_en(mu), .pilot(pil), .restart(rs));

  bit expq [$];

  always @(posedge clk) begin
    if (rst_n && fv && expq.size() > 0) begin
      bit e;
      int m;
      e = expq.pop_front();
      checks++;
      m = (int'(fo_sum) < 0) ? -int'(fo_sum) : int'(fo_sum);
      if (m < min_margin) min_margin = m;
      if (fo != e) begin
        failures++;
        bit_errors++;
        if (bit_errors < 10) $display("FAIL bit: got %0d expected %0d (sum %0d)", fo, e, fo_sum);
      end
    end
  end

  task automatic send(int n, int xr[], int xi[]);
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      din_valid = 1'b1;
      din.re = 16'(xr[t]);
      din.im = 16'(xi[t]);
    end
  endtask

  task automatic run_frame(int n, cr_t h[]);
    logic [63:0] codes [];
    real amp [];
    bit bits [];
    int xr [], xi [];
    int ng = n / 64;
    codes = new[NUSERS];
    amp   = new[NUSERS];
    bits  = new[NUSERS * ng];
    foreach (codes[u]) codes[u] = walsh(32 + u);
    // pilot: received user only, all bits 0
    foreach (amp[u]) amp[u] = (u == ME) ? A_PIL : 0.0;
    foreach (bits[i]) bits[i] = 1'b0;
    make_symbol_mu(n, h, NUSERS, codes, amp, bits, SNR_DB, xr, xi);
    send(n, xr, xi);
    // 31 data symbols, all users active
    foreach (amp[u]) amp[u] = A_DATA;
    for (int s = 0; s < 31; s++) begin
      foreach (bits[i]) bits[i] = 1'($urandom_range(1));
      for (int g = 0; g < ng; g++) expq.push_back(bits[ME * ng + g]);
      make_symbol_mu(n, h, NUSERS, codes, amp, bits, SNR_DB, xr, xi);
      send(n, xr, xi);
    end
    // flush
    for (int t = 0; t < 2 * n + 64; t++) begin
      @(negedge clk);
      din_valid = 1'b1;
      din = '0;
    end
    @(negedge clk);
    din_valid = 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d bits missing (n=%0d)", expq.size(), n);
      expq.delete();
    end
  endtask

  initial begin
    cr_t h [];
    din = '0; din_valid = 1'b0; s256 = 1'b1; lambda = 16'sd16;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    make_channel(256, 0.4, 0.7, 3, h);
    run_frame(256, h);
    @(negedge clk);
    s256 = 1'b0;
    repeat (4) @(posedge clk);
    make_channel(64, 0.45, 1.3, 2, h);
    run_frame(64, h);
    $display("32 users, %0.0f dB SNR: %0d bit errors, smallest decision margin %0d",
             SNR_DB, bit_errors, min_margin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
