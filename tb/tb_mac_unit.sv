// Testbench of the multiplication and accumulation module.  Estimation:
// random (x_r, x_i) with S11 = S12 = S13 = S14 = 0 must give
// Hsq = x_r^2/256 + x_i^2/256 two cycles later.  Demodulation: groups of 64
// random (x, eq) pairs with S11 = S12 = S13 = 1 and S14 = 1 except at the
// first of a group must leave ACC = sum of x_r eq_r/256 - x_i eq_i/256 - 1
// (one's complement subtraction) and FO = its sign.  The controls are
// applied with the module's step timing: S11/S12 with the sample, S13 one
// cycle later, S14 and acc_en two cycles later.
`timescale 1ns/1ps
module tb_mac_unit;
  import mccdma_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  word_t xr, xi, eqr, eqi, xdr, xdi, hsq, acc;
  logic s11, s12, s13, s14, acc_en, fo;
  int checks = 0, failures = 0, nsign = 0;

  always #5 clk = ~clk;

  mac_unit #(.MULT_SHIFT(8)) dut (.clk, .rst_n, .xr, .xi, .eqr, .eqi, .s11, .s12, .s13, .s14,
    .acc_en, .xdr, .xdi, .hsq, .acc, .fo);

  // control pipeline of the testbench: {valid, est, first}
  logic [2:0] c0, c1, c2;
  int ehsq [$];
  int eacc [$];
  int run_sum = 0;

  function automatic int sat(int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  always @(posedge clk) begin
    c1 <= c0;
    c2 <= c1;
  end
  assign s11 = !c0[1];
  assign s12 = !c0[1];
  assign s13 = c1[2] && !c1[1];
  assign s14 = c2[2] && !c2[1] && !c2[0];
  assign acc_en = c2[2];

  always @(negedge clk) begin
    if (c2[2] && c2[1]) begin
      int e;
      e = ehsq.pop_front();
      checks++;
      if (int'(hsq) != e) begin failures++; if (failures < 5) $display("FAIL hsq %0d expected %0d", hsq, e); end
    end
  end

  initial begin
    c0 = '0; c1 = '0; c2 = '0;
    xr = '0; xi = '0; eqr = '0; eqi = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // estimation
    for (int t = 0; t < 300; t++) begin
      int a, b;
      @(negedge clk);
      a = int'($urandom_range(4000)) - 2000;
      b = int'($urandom_range(4000)) - 2000;
      xr = 16'(a); xi = 16'(b);
      c0 = 3'b110;
      ehsq.push_back(sat(((a * a) >>> 8) + ((b * b) >>> 8)));
    end
    // demodulation, 20 groups of 64
    for (int g = 0; g < 20; g++) begin
      int s;
      s = 0;
      for (int k = 0; k < 64; k++) begin
        int a, b, e, f;
        @(negedge clk);
        a = int'($urandom_range(1000)) - 500;
        b = int'($urandom_range(1000)) - 500;
        e = int'($urandom_range(1000)) - 500 + ((g % 2) ? 300 : -300);
        f = int'($urandom_range(1000)) - 500;
        xr = 16'(a); xi = 16'(b); eqr = 16'(e); eqi = 16'(f);
        c0 = {1'b1, 1'b0, (k == 0)};
        s = sat(s + ((a * e) >>> 8) + (-((b * f) >>> 8) - 1));
      end
      eacc.push_back(s);
      @(negedge clk);
      c0 = '0;
      @(negedge clk);
      @(negedge clk);
      begin
        int e;
        e = eacc.pop_front();
        checks++;
        if (int'(acc) != e || fo != (e < 0)) begin
          failures++; $display("FAIL group %0d acc %0d expected %0d", g, acc, e);
        end
        if (e < 0) nsign++;
      end
    end
    checks++;
    if (nsign == 0 || nsign == 20) begin failures++; $display("FAIL sign never changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
