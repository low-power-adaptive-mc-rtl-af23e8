// Testbench of the ordering block.  Blocks of 256 words arrive in
// digit-reversed order (word c holds element digrev(c) of the block); each
// must leave, one block later, in natural order.  Also checked: the first
// output appears 256 samples + 1 cycle after the first input, and with
// S256 = 0 the block stays silent.
`timescale 1ns/1ps
module tb_ord_block;
  import mccdma_pkg::*;
  import fft_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, s256 = 1'b1, clr = 1'b0;
  cplx_t din, dout;
  logic din_valid, dout_valid;
  int checks = 0, failures = 0, cycle = 0, t_in = -1, t_out = -1, nout = 0;
  int expq [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  ord_block dut (.clk, .rst_n, .s256, .clr, .din, .din_valid, .dout, .dout_valid);

  always @(posedge clk) begin
    if (rst_n && dout_valid) begin
      nout++;
      if (t_out < 0) t_out = cycle;
      if (expq.size() > 0) begin
        int e;
        e = expq.pop_front();
        checks++;
        if (int'(dout.re) != e || int'(dout.im) != -e) begin
          failures++;
          if (failures < 5) $display("FAIL got %0d expected %0d", dout.re, e);
        end
      end
    end
  end

  initial begin
    int v [256];
    din = '0; din_valid = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 4; b++) begin
      foreach (v[i]) v[i] = int'($urandom_range(30000)) - 15000;
      if (b < 3) foreach (v[i]) expq.push_back(v[i]);
      for (int c = 0; c < 256; c++) begin
        @(negedge clk);
        if (t_in < 0) t_in = cycle;
        din_valid = 1'b1;
        din.re = 16'(v[digrev(c, 256)]);
        din.im = 16'(-v[digrev(c, 256)]);
      end
    end
    @(negedge clk); din_valid = 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d words missing", expq.size()); end
    checks++;
    if (t_out - t_in != 257) begin failures++; $display("FAIL latency %0d", t_out - t_in); end
    s256 = 1'b0; nout = 0;
    for (int c = 0; c < 600; c++) begin
      @(negedge clk); din_valid = 1'b1; din.re = 16'(c);
    end
    @(negedge clk); din_valid = 1'b0;
    checks++;
    if (nout != 0) begin failures++; $display("FAIL output in 64 mode"); end
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
