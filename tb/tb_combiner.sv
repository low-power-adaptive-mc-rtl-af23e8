// Testbench of the reconfigurable combiner (combiner-I and -II side by
// side), fed directly with FFT-domain samples Y(k) = 256 c(k) b H(k).
// Checks: every equalizer coefficient written during a pilot equals
// trunc(256 x / ((x_r^2 >> 8) + (x_i^2 >> 8) + lambda)) (imaginary part
// from the complemented x_i) with x the despread pilot; every received
// bit equals the transmitted one; both variants agree.  In 64 mode the
// samples arrive in the digit-reversed order of the 64-point FFT.
`timescale 1ns/1ps
module tb_combiner;
  import mccdma_pkg::*;
  import mccdma_tx_pkg::*;
  import fft_ref_pkg::digrev;

  localparam logic [63:0] CODE = 64'h9A5C_36E1_F00F_5AA5;
  logic clk = 1'b0, rst_n = 1'b0, s256 = 1'b1;
  word_t lambda = 16'sd16;
  cplx_t y;
  logic y_valid = 1'b0;
  logic fo1, fv1, fo2, fv2, p1, p2, mu1, mu2;
  word_t acc1, acc2;
  int checks = 0, failures = 0, coef_checked = 0;
  bit expq [$];

  always #5 clk = ~clk;

  combiner #(.VARIANT(1), .CHIP_CODE(CODE)) dut1 (.clk, .rst_n, .s256, .lambda, .y, .y_valid,
    .fo(fo1), .fo_valid(fv1), .acc(acc1), .pilot(p1), .mem_upper_en(mu1));
  combiner #(.VARIANT(2), .CHIP_CODE(CODE)) dut2 (.clk, .rst_n, .s256, .lambda, .y, .y_valid,
    .fo(fo2), .fo_valid(fv2), .acc(acc2), .pilot(p2), .mem_upper_en(mu2));

  always @(posedge clk) begin
    if (fv1 != fv2 || (fv1 && fo1 != fo2)) begin failures++; $display("FAIL variants differ"); end
    if (fv1 && expq.size() > 0) begin
      bit e;
      e = expq.pop_front();
      checks++;
      if (fo1 != e) begin failures++; if (failures < 10) $display("FAIL bit %0d expected %0d (acc %0d)", fo1, e, acc1); end
    end
  end

  function automatic int sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  int pil_r [256], pil_i [256];

  task automatic symbol(int n, cr_t h[], bit bits[], bit is_pilot);
    if (!is_pilot) foreach (bits[g]) expq.push_back(bits[g]);
    for (int i = 0; i < n; i++) begin
      int k;
      real s;
      k = (n == 256) ? i : digrev(i, 64);
      s = AMP * (CODE[k % 64] ? -1.0 : 1.0) * (bits[k / 64] ? -1.0 : 1.0);
      @(negedge clk);
      y_valid = 1'b1;
      y.re = 16'(rnd_sat(s * h[k].re));
      y.im = 16'(rnd_sat(s * h[k].im));
      if (is_pilot) begin
        pil_r[i] = CODE[k % 64] ? -int'(y.re) - 1 : int'(y.re);
        pil_i[i] = CODE[k % 64] ? -int'(y.im) - 1 : int'(y.im);
      end
    end
  endtask

  task automatic check_coefs(int n);
    for (int i = 0; i < n; i++) begin
      int d, er, ei;
      cplx_t m;
      d = sat(longint'((pil_r[i] * pil_r[i]) >>> 8) + ((pil_i[i] * pil_i[i]) >>> 8)) + 16;
      er = sat((longint'(pil_r[i]) * 256) / d);
      ei = sat((longint'(-pil_i[i] - 1) * 256) / d);
      m = (i < 64) ? dut1.u_mem.lo[i] : dut1.u_mem.hi[i - 64];
      checks++;
      coef_checked++;
      if (int'(m.re) != er || int'(m.im) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL coef %0d: %0d,%0d expected %0d,%0d", i, m.re, m.im, er, ei);
      end
    end
  endtask

  task automatic frame(int n, cr_t h[], int ndata);
    bit bits [];
    bits = new[n / 64];
    foreach (bits[g]) bits[g] = 1'b0;
    symbol(n, h, bits, 1'b1);
    symbol(n, h, bits, 1'b0);      // first data symbol all zero bits
    check_coefs(n);
    for (int s = 1; s < ndata; s++) begin
      foreach (bits[g]) bits[g] = 1'($urandom_range(1));
      symbol(n, h, bits, 1'b0);
    end
  endtask

  initial begin
    cr_t h [];
    bit z [];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    make_channel(256, 0.6, 0.3, 7, h);
    frame(256, h, 31);
    frame(256, h, 2);
    @(negedge clk); y_valid = 1'b0;
    repeat (10) @(posedge clk);
    s256 = 1'b0;
    repeat (3) @(posedge clk);
    make_channel(64, 0.5, 1.9, 3, h);
    frame(64, h, 31);
    frame(64, h, 3);
    @(negedge clk); y_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d bits missing", expq.size()); end
    $display("coefficients checked %0d", coef_checked);
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
