// Testbench of the radix-4 delay commutator (NT = 64).  A counting stream
// is fed with the quarter-3 select schedule; from the first quarter 3 on,
// in every cycle the four outputs must be the four butterfly operands
// x_q[n] = in[block*4NT + q*NT + n] of one block, rotated by
// s = (quarter+1) mod 4: O(i+1) = x_((s-i) mod 4).  The operand values are
// taken from a record of the input stream, not from the block.
`timescale 1ns/1ps
module tb_r4_commutator;
  import mccdma_pkg::*;

  localparam int NT = 64;
  logic clk = 1'b0;
  logic we;
  logic [5:0] addr;
  logic c;
  cplx_t din;
  cplx_t o [4];
  int checks = 0, failures = 0;
  int hist [$];

  always #5 clk = ~clk;

  r4_commutator #(.NT(NT)) dut (.clk, .we, .addr, .c1(c), .c2(c), .c3(c), .din, .o);

  initial begin
    we = 1'b0; addr = '0; c = 1'b0; din = '0;
    for (int t = 0; t < 12 * NT; t++) begin
      int q, n, blk, s, base;
      @(negedge clk);
      q = (t / NT) % 4;
      n = t % NT;
      blk = t / (4 * NT);
      we = 1'b1;
      addr = 6'(n);
      c = (q == 3);
      din.re = 16'(t * 7 + 3);
      din.im = 16'(-t);
      hist.push_back(t);
      #1;
      if (t >= 3 * NT) begin
        s = (q + 1) % 4;
        base = (q == 3) ? blk * 4 * NT : (blk - 1) * 4 * NT;
        for (int i = 0; i < 4; i++) begin
          int idx;
          idx = base + ((s - i + 4) % 4) * NT + n;
          checks++;
          if (o[i].re != 16'(idx * 7 + 3) || o[i].im != 16'(-idx)) begin
            failures++;
            if (failures < 5) $display("FAIL t=%0d O%0d = %0d expected sample %0d", t, i + 1, o[i].re, idx);
          end
        end
      end
    end
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
