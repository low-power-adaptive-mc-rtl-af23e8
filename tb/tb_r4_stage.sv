// Testbench of one radix-4 stage (stage 2: NT = 16, 64-sample blocks) with
// its control FSM.  Each block of 64 random samples must come out as the
// DIF stage result y_s[n] = floor(BF_s/4) * W_64^(s n), in the order
// s = 0..3, n = 0..15, with twiddles computed here with $cos/$sin; the
// first output must leave 3*NT samples + 2 cycles after the first input.
// A second pass with the stage clock disabled must produce nothing.
`timescale 1ns/1ps
module tb_r4_stage;
  import mccdma_pkg::*;
  import fft_ref_pkg::*;

  localparam int NT = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, clr = 1'b0;
  cplx_t din, dout;
  logic din_valid, dout_valid;
  stage_ctrl_t ctrl;
  logic [3:0] fa;
  logic [7:0] ta;
  int checks = 0, failures = 0, cycle = 0, t_in = -1, t_out = -1, nout = 0;
  ci_t expq [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  r4_stage_fsm #(.NT(NT), .STAGE(2)) u_fsm (.clk, .rst_n, .en, .clr, .in_valid(din_valid),
    .ctrl, .fifo_addr(fa), .tw_addr(ta));
  r4_stage #(.NT(NT), .STAGE(2), .HAS_MULT(1), .GATE_FIFO(1)) dut (.clk, .rst_n, .en, .clr,
    .din, .din_valid, .ctrl, .fifo_addr(fa), .tw_addr(ta), .dout, .dout_valid);

  always @(posedge clk) begin
    if (dout_valid) begin
      nout++;
      if (t_out < 0) t_out = cycle;
      if (expq.size() > 0) begin
        ci_t e;
        e = expq.pop_front();
        checks++;
        if (int'(dout.re) != e.re || int'(dout.im) != e.im) begin
          failures++;
          if (failures < 5) $display("FAIL got %0d,%0d expected %0d,%0d", dout.re, dout.im, e.re, e.im);
        end
      end
    end
  end

  initial begin
    ci_t x [64];
    din = '0; din_valid = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 5; b++) begin
      foreach (x[i]) begin
        x[i].re = int'($urandom_range(20000)) - 10000;
        x[i].im = int'($urandom_range(20000)) - 10000;
      end
      if (b < 4) begin
        for (int s = 0; s < 4; s++)
          for (int n = 0; n < NT; n++) begin
            int sr, si, ar, ai, wr, wi;
            real ang;
            sr = 0; si = 0;
            for (int q = 0; q < 4; q++)
              case ((s * q) % 4)
                0: begin sr += x[q*NT+n].re; si += x[q*NT+n].im; end
                1: begin sr += x[q*NT+n].im; si -= x[q*NT+n].re; end
                2: begin sr -= x[q*NT+n].re; si -= x[q*NT+n].im; end
                3: begin sr -= x[q*NT+n].im; si += x[q*NT+n].re; end
              endcase
            ar = sr >>> 2; ai = si >>> 2;
            ang = 2.0 * 3.14159265358979323846 * ((s * n) % 64) / 64.0;
            wr = rnd(16384.0 * $cos(ang));
            wi = rnd(-16384.0 * $sin(ang));
            expq.push_back('{re: sat((longint'(ar) * wr - longint'(ai) * wi) >>> 14),
                             im: sat((longint'(ar) * wi + longint'(ai) * wr) >>> 14)});
          end
      end
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        if (t_in < 0) t_in = cycle;
        din_valid = 1'b1;
        din.re = 16'(x[i].re); din.im = 16'(x[i].im);
      end
    end
    @(negedge clk);
    din_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    checks++;
    if (t_out - t_in != 3 * NT + 2) begin failures++; $display("FAIL latency %0d", t_out - t_in); end
    // stage clock gated: restart, then nothing may come out
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0; en = 1'b0;
    nout = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); din_valid = 1'b1; din.re = 16'(i);
    end
    @(negedge clk); din_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (nout != 0) begin failures++; $display("FAIL gated stage produced %0d outputs", nout); end
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
