// Testbench of the receiver FFT (FFT-I and FFT-II side by side).  In 256
// mode the output must be the bit-true 256-point transform in natural
// order, 255 + 256 samples + 8 cycles after the input; in 64 mode the
// 64-point transform in digit-reversed order (ordering block bypassed),
// 63 samples + 5 cycles after the input.
`timescale 1ns/1ps
module tb_rx_fft;
  import mccdma_pkg::*;
  import fft_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, s256 = 1'b1;
  cplx_t din, da, db;
  logic din_valid, va, vb, g1a, g1b, ra, rb;
  int checks = 0, failures = 0, cycle = 0, t_in, t_out;
  bit got;
  ci_t expq [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  rx_fft #(.GATE_FIFO(1)) dut_a (.clk, .rst_n, .s256, .din, .din_valid, .dout(da), .dout_valid(va), .gck1_en(g1a), .restart(ra));
  rx_fft #(.GATE_FIFO(0)) dut_b (.clk, .rst_n, .s256, .din, .din_valid, .dout(db), .dout_valid(vb), .gck1_en(g1b), .restart(rb));

  always @(posedge clk) begin
    if (rst_n && (va != vb || (va && da != db))) begin failures++; $display("FAIL variants differ"); end
    if (va) begin
      if (!got) begin got = 1'b1; t_out = cycle; end
      if (expq.size() > 0) begin
        ci_t e;
        e = expq.pop_front();
        checks++;
        if (int'(da.re) != e.re || int'(da.im) != e.im) begin
          failures++;
          if (failures < 5) $display("FAIL got %0d,%0d expected %0d,%0d", da.re, da.im, e.re, e.im);
        end
      end
    end
  end

  task automatic run(int n, int nflush, int lat);
    ci_t x [];
    ci_t r [];
    got = 1'b0;
    for (int b = 0; b < 3 + nflush; b++) begin
      x = new[n];
      foreach (x[i]) begin
        x[i].re = (b < 3) ? int'($urandom_range(16000)) - 8000 : 0;
        x[i].im = (b < 3) ? int'($urandom_range(16000)) - 8000 : 0;
      end
      if (b < 3) begin
        r = new[n];
        foreach (x[i]) r[i] = x[i];
        dif_fixed(n, r);
        // 256: natural order; 64: digit-reversed order as delivered
        for (int i = 0; i < n; i++) expq.push_back((n == 256) ? r[digrev(i, n)] : r[i]);
      end
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        if (b == 0 && i == 0) t_in = cycle;
        din_valid = 1'b1;
        din.re = 16'(x[i].re); din.im = 16'(x[i].im);
      end
    end
    @(negedge clk); din_valid = 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d missing (n=%0d)", expq.size(), n); expq.delete(); end
    checks++;
    if (t_out - t_in != lat) begin failures++; $display("FAIL latency %0d expected %0d", t_out - t_in, lat); end
  endtask

  initial begin
    din = '0; din_valid = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(256, 2, 255 + 7 + 256 + 1);
    @(negedge clk); s256 = 1'b0; repeat (3) @(negedge clk);
    checks++;
    if (g1a || g1b) begin failures++; $display("FAIL stage 1 not gated in 64 mode"); end
    run(64, 1, 63 + 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
