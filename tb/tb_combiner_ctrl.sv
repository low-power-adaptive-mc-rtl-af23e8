// Testbench of the combiner FSM module (FSM256, FSM64, MUX23).  In each
// mode it counts RAM writes and bit strobes over one frame of continuous
// input (256 and 4*31 for 256 sub-carriers, 64 and 31 for 64), checks the
// one-cycle restart on every change of S256, that a frame restarts with a
// pilot, and the FSM256 clock enable.
`timescale 1ns/1ps
module tb_combiner_ctrl;
  import mccdma_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, s256 = 1'b1, in_valid = 1'b0;
  comb_ctrl_t ctrl;
  logic [5:0] adr1;
  logic acc_en, fo_valid, pilot, fsm256_en, clr;
  int checks = 0, failures = 0, n_cs = 0, n_fv = 0, n_clr = 0;

  always #5 clk = ~clk;

  combiner_ctrl dut (.clk, .rst_n, .s256, .in_valid, .ctrl, .adr1, .acc_en, .fo_valid, .pilot, .fsm256_en, .clr);

  always @(negedge clk) if (rst_n) begin
    if (ctrl.cs) n_cs++;
    if (fo_valid) n_fv++;
    if (clr) n_clr++;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic frame(int nsc);
    n_cs = 0; n_fv = 0;
    @(negedge clk);
    chk(pilot == 1'b1, "frame starts with a pilot");
    in_valid = 1'b1;
    repeat (32 * nsc) @(negedge clk);
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    chk(n_cs == nsc, $sformatf("RAM writes %0d for %0d", n_cs, nsc));
    chk(n_fv == 31 * nsc / 64, $sformatf("bits %0d for %0d", n_fv, nsc));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    frame(256);
    chk(fsm256_en == 1'b1, "FSM256 clock on");
    @(negedge clk); s256 = 1'b0;
    @(negedge clk);
    chk(n_clr == 1 && fsm256_en == 1'b0, "restart and FSM256 gated");
    frame(64);
    // partial frame, then switch back: must restart at a pilot
    in_valid = 1'b1; repeat (100) @(negedge clk); in_valid = 1'b0;
    s256 = 1'b1;
    @(negedge clk);
    chk(n_clr == 2, "second restart");
    frame(256);
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
