// Testbench of the FFT control FSM (SUPPORT_16 = 1).  For each size it
// checks the clock enables and bypass selects, the one-cycle restart on a
// size change, and, with a continuous input on stage 1 in 256-point mode,
// the whole control sequence of stage 1 against the schedule worked out
// from the sample index t: quarter q = (t/64) mod 4, C1..C3 = (q == 3),
// butterfly output (q+1) mod 4, FIFO address t mod 64, twiddle index
// ((q+1)(t mod 64)) mod 256, output valid from t = 192 on.  In 64-point
// mode stage 1 must not advance at all.  Selecting the IFFT must restart
// the pipeline as a size change does.
`timescale 1ns/1ps
module tb_ffsm;
  import mccdma_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s256, s64, inverse;
  logic [3:0] sv;
  logic g1, g2, m1, m2, clr;
  stage_ctrl_t ctrl [4];
  logic [5:0] fa1; logic [3:0] fa2; logic [1:0] fa3; logic [0:0] fa4;
  logic [7:0] tw [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ffsm #(.SUPPORT_16(1)) dut (.clk, .rst_n, .s256, .s64, .inverse, .stage_in_valid(sv),
    .gck1_en(g1), .gck2_en(g2), .mux1_sel(m1), .mux2_sel(m2), .clr, .ctrl,
    .fifo_addr1(fa1), .fifo_addr2(fa2), .fifo_addr3(fa3), .fifo_addr4(fa4), .tw_addr(tw));

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic set_size(bit a256, bit a64, bit e1, bit e2);
    @(negedge clk);
    s256 = a256; s64 = a64;
    #1;
    chk(clr == 1'b1, "restart pulse");
    @(negedge clk);
    chk(clr == 1'b0, "restart is one cycle");
    chk(g1 == e1 && m1 == e1, "stage-1 enable / MUX I");
    chk(g2 == e2 && m2 == e2, "stage-2 enable / MUX II");
  endtask

  initial begin
    s256 = 1'b1; s64 = 1'b1; sv = '0; inverse = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(g1 && g2 && m1 && m2 && !clr, "256 after reset");
    for (int t = 0; t < 600; t++) begin
      int q, n, s;
      sv = 4'b0001;
      q = (t / 64) % 4; n = t % 64; s = (q + 1) % 4;
      #1;
      chk(ctrl[0].c1 == (q == 3) && ctrl[0].c2 == (q == 3) && ctrl[0].c3 == (q == 3), "C1-C3");
      chk(ctrl[0].bf_sel == 2'(s), "butterfly select");
      chk(fa1 == 6'(n), "FIFO address");
      chk(tw[0] == 8'((s * n) % 256), "twiddle address");
      chk(ctrl[0].shift == 1'b1, "C6");
      chk(ctrl[0].out_ok == (t >= 192), "C7");
      @(negedge clk);
    end
    sv = '0;
    set_size(1'b0, 1'b1, 1'b0, 1'b1);
    sv = 4'b0011;
    #1;
    chk(ctrl[0].shift == 1'b0 && ctrl[0].out_ok == 1'b0, "stage 1 idle in 64 mode");
    chk(ctrl[1].shift == 1'b1 && fa2 == 4'd0, "stage 2 starts at 0");
    @(negedge clk);
    #1;
    chk(fa1 == 6'd0 && fa2 == 4'd1, "only stage 2 advances");
    sv = '0;
    set_size(1'b0, 1'b0, 1'b0, 1'b0);
    sv = 4'b0111;
    #1;
    chk(ctrl[1].shift == 1'b0 && ctrl[2].shift == 1'b1, "16 mode: stage 2 idle, stage 3 runs");
    @(negedge clk);
    sv = '0;
    set_size(1'b1, 1'b0, 1'b1, 1'b1);
    // FFT/IFFT switch restarts the pipeline without changing the size
    @(negedge clk);
    inverse = 1'b1;
    #1;
    chk(clr == 1'b1, "restart on IFFT select");
    @(negedge clk);
    chk(clr == 1'b0 && g1 && g2, "IFFT keeps the 256-point setting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
