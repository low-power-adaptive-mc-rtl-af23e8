// Testbench of one combiner FSM (run as FSM64 and as FSM256).  With a
// continuous input for two frames it counts, per frame: estimation-phase
// samples (NSC) and demodulation samples (31*NSC), RAM writes cs (NSC,
// addresses 0..NSC-1 in order, 4 cycles after the sample), enR (NSC),
// enF (NSC+1), S13 cycles (31*NSC), bit strobes (31*NSC/64) and that S14 is
// low exactly at the first sub-carrier of each 64-chip group.  The read
// address must follow the sub-carrier index and, for 64 sub-carriers, the
// chip address the digit-reversed index.
`timescale 1ns/1ps
module tb_combiner_fsm;
  import mccdma_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, clr = 1'b0;
  comb_ctrl_t c64, c256;
  logic [5:0] a64, a256;
  logic ae64, ae256, fv64, fv256, p64, p256;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  combiner_fsm #(.NSC(64))  f64  (.clk, .rst_n, .en(1'b1), .clr, .in_valid, .ctrl(c64),  .adr1(a64),  .acc_en(ae64),  .fo_valid(fv64),  .pilot(p64));
  combiner_fsm #(.NSC(256)) f256 (.clk, .rst_n, .en(1'b1), .clr, .in_valid, .ctrl(c256), .adr1(a256), .acc_en(ae256), .fo_valid(fv256), .pilot(p256));

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // per-FSM statistics
  int n_est [2], n_dem [2], n_cs [2], n_enr [2], n_enf [2], n_s13 [2], n_fv [2], bad_wa [2], bad_s14 [2];
  int t = 0;

  always @(negedge clk) if (rst_n) begin
    // index 0 = FSM64, 1 = FSM256
    for (int f = 0; f < 2; f++) begin
      comb_ctrl_t c;
      int nsc, k, k4, k3;
      logic pil;
      c   = f ? c256 : c64;
      pil = f ? p256 : p64;
      nsc = f ? 256 : 64;
      k  = t % nsc;
      k4 = (t - 4) % nsc;
      k3 = (t - 3) % nsc;
      if (in_valid) begin
        if (pil) n_est[f]++; else n_dem[f]++;
        if (c.ra != 8'(k)) bad_wa[f]++;
      end
      if (c.cs) begin n_cs[f]++; if (c.wa != 8'(k4)) bad_wa[f]++; end
      if (c.enr) n_enr[f]++;
      if (c.enf) n_enf[f]++;
      if (c.s13) n_s13[f]++;
      if (f ? fv256 : fv64) n_fv[f]++;
      if (in_valid && t >= 3 && ((t - 3) / nsc) % 32 != 0 && t - 3 < 2 * 32 * nsc)
        if (c.s14 != ((k3 % 64) != 0)) bad_s14[f]++;
    end
    if (in_valid && t >= 1 && t - 1 < 64 * 64)
      if (a64 != digit_rev6(6'((t - 1) % 64)) || a256 != 6'((t - 1) % 64)) bad_wa[0]++;
    if (in_valid) t++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    in_valid = 1'b1;
    repeat (2 * 32 * 256) @(negedge clk);
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    chk(n_est[0] == 4 * 2 * 64 && n_dem[0] == 4 * 2 * 31 * 64, "FSM64 phase lengths");
    chk(n_est[1] == 2 * 256 && n_dem[1] == 2 * 31 * 256, "FSM256 phase lengths");
    chk(n_cs[0] == 8 * 64 && n_enr[0] == 8 * 64 && n_enf[0] == 8 * 65, "FSM64 estimation strobes");
    chk(n_cs[1] == 2 * 256 && n_enr[1] == 2 * 256 && n_enf[1] == 2 * 257, "FSM256 estimation strobes");
    chk(n_s13[0] == 8 * 1984 && n_s13[1] == 2 * 7936, "S13 during demodulation");
    chk(n_fv[0] == 8 * 31 && n_fv[1] == 2 * 31 * 4, "bit strobes");
    chk(bad_wa[0] == 0 && bad_wa[1] == 0, "addresses");
    chk(bad_s14[0] == 0 && bad_s14[1] == 0, "accumulator clear every 64");
    $display("est %0d/%0d dem %0d/%0d cs %0d/%0d enf %0d/%0d fv %0d/%0d", n_est[0], n_est[1], n_dem[0], n_dem[1],
             n_cs[0], n_cs[1], n_enf[0], n_enf[1], n_fv[0], n_fv[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
