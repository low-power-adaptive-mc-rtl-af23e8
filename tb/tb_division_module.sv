// Testbench of the division module.  A stream of pilot numerators
// (xd_r, xd_i) and, two cycles later each, |H|^2 values, with enF and enR
// set as during estimation, must give m_r = trunc(256 xd_r / (Hsq+lambda))
// and m_i = trunc(256 (-xd_i-1) / (Hsq+lambda)), saturated to 16 bits, in
// the cycle after enR.  When the enables are low the outputs must hold.
`timescale 1ns/1ps
module tb_division_module;
  import mccdma_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  word_t xdr, xdi, hsq, lambda, mr, mi;
  logic enf, enr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  division_module #(.DIV_SHIFT(8)) dut (.clk, .rst_n, .xdr, .xdi, .hsq, .lambda, .enf, .enr, .mr, .mi);

  function automatic int sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  int nr [$], ni [$], hq [$];
  int er, ei;

  initial begin
    xdr = '0; xdi = '0; hsq = '0; lambda = 16'sd16; enf = 1'b0; enr = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 260; t++) begin
      @(negedge clk);
      // numerator enters at t, its divisor at t+1 (one cycle later in the MAC)
      if (t < 256) begin
        int a, b, h;
        a = int'($urandom_range(2000)) - 1000;
        b = int'($urandom_range(2000)) - 1000;
        h = int'($urandom_range(3000));
        if (t < 4) h = 0;
        xdr = 16'(a); xdi = 16'(b);
        nr.push_back(a); ni.push_back(b); hq.push_back(h);
      end
      enf = (t < 257);
      if (t >= 1 && t <= 256) begin
        hsq = 16'(hq[t - 1]);
        enr = 1'b1;
      end else enr = 1'b0;
      if (t >= 2 && t <= 257) begin
        int d;
        d = hq[t - 2] + 16;
        er = sat((longint'(nr[t - 2]) * 256) / d);
        ei = sat((longint'(-ni[t - 2] - 1) * 256) / d);
        checks++;
        if (int'(mr) != er || int'(mi) != ei) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d m=%0d,%0d expected %0d,%0d", t, mr, mi, er, ei);
        end
      end
    end
    // enables low: hold
    @(negedge clk); enf = 1'b0; enr = 1'b0; xdr = 16'sd999; hsq = 16'sd1;
    @(negedge clk);
    er = int'(mr); ei = int'(mi);
    repeat (3) @(negedge clk);
    checks++;
    if (int'(mr) != er || int'(mi) != ei) begin failures++; $display("FAIL outputs changed with enables low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
