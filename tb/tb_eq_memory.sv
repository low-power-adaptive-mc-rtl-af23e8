// Testbench of the partitioned equalizer memory (both variants).  All 256
// words are written and read back in 256 mode with reads overlapping
// writes; in 64 mode the lower 64 words still work, and writes to the
// upper 192 words are lost in the gated variant (combiner-I) but kept in
// the ungated one (combiner-II).
`timescale 1ns/1ps
module tb_eq_memory;
  import mccdma_pkg::*;

  logic clk = 1'b0, s256 = 1'b1, cs = 1'b0;
  logic [7:0] wa = '0, ra = '0;
  cplx_t wd = '0, rd1, rd2;
  logic ue1, ue2;
  int checks = 0, failures = 0;
  int model [256];

  always #5 clk = ~clk;

  eq_memory #(.GATE_UPPER(1)) dut1 (.clk, .s256, .cs, .wa, .wd, .ra, .rd(rd1), .upper_en(ue1));
  eq_memory #(.GATE_UPPER(0)) dut2 (.clk, .s256, .cs, .wa, .wd, .ra, .rd(rd2), .upper_en(ue2));

  task automatic wr(int a, int v);
    @(negedge clk); cs = 1'b1; wa = 8'(a); wd = 32'(v);
    @(negedge clk); cs = 1'b0;
  endtask

  task automatic rdchk(int a, int e1, int e2);
    @(negedge clk); ra = 8'(a);
    @(negedge clk);
    checks++;
    if (int'(rd1) != e1 || int'(rd2) != e2) begin
      failures++;
      if (failures < 5) $display("FAIL addr %0d: %h/%h expected %h/%h", a, rd1, rd2, e1, e2);
    end
  endtask

  initial begin
    // write everything, reading the previous word in the same cycles
    for (int a = 0; a < 256; a++) begin
      model[a] = int'($urandom());
      @(negedge clk); cs = 1'b1; wa = 8'(a); wd = 32'(model[a]); ra = 8'((a + 255) % 256);
      if (a > 1) begin
        checks++;
        if (int'(rd1) != model[(a + 254) % 256]) begin failures++; $display("FAIL overlap read %0d", a); end
      end
    end
    @(negedge clk); cs = 1'b0;
    for (int a = 0; a < 256; a++) rdchk(a, model[a], model[a]);
    checks++;
    if (!ue1 || !ue2) begin failures++; $display("FAIL upper part gated in 256 mode"); end
    s256 = 1'b0;
    checks++;
    if (ue1 || !ue2) begin failures++; $display("FAIL upper gating in 64 mode"); end
    wr(10, 32'h1234_5678);
    rdchk(10, 32'h1234_5678, 32'h1234_5678);
    wr(200, 32'h0bad_cafe);
    s256 = 1'b1;
    rdchk(200, model[200], 32'h0bad_cafe);
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
