// FFT finite state machine (FFSM): one control FSM per radix-4 stage plus
// the reconfiguration logic.
//
// The size is chosen by the external selects: S256 = 1 gives 256 points,
// S256 = 0 and S64 = 1 gives 64 points (stage 1 bypassed by MUX I, its clock
// gated through Gck1), and both 0 give 16 points (stages 1 and 2 bypassed,
// MUX II selecting the input, Gck1 and Gck2 gated) when SUPPORT_16 = 1.
// Without SUPPORT_16 (the receiver's FFT) S64 is ignored and S256 = 0 means
// 64 points.  A change of size is registered and produces a one-cycle
// `clr` that restarts every stage FSM and empties the pipeline; the data in
// flight at that moment are dropped.  A change of `inverse` (FFT/IFFT)
// restarts the pipeline in the same way.  mux1_sel / mux2_sel are 1 when the
// MUX passes the previous stage's output.  The mapping of S64 on MUX II
// (MUX II passes stage 2 whenever the size is 64 or 256) and the restart on
// a size change are this design's reading of the block diagram.
module ffsm
  import mccdma_pkg::*;
#(
  parameter bit SUPPORT_16 = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s256,
  input  logic        s64,
  input  logic        inverse,          // FFT (0) or IFFT (1)
  input  logic [3:0]  stage_in_valid,   // input valid of stages 1..4
  output logic        gck1_en,
  output logic        gck2_en,
  output logic        mux1_sel,
  output logic        mux2_sel,
  output logic        clr,
  output stage_ctrl_t ctrl  [4],
  output logic [5:0]  fifo_addr1,
  output logic [3:0]  fifo_addr2,
  output logic [1:0]  fifo_addr3,
  output logic [0:0]  fifo_addr4,
  output logic [7:0]  tw_addr [3]
);

  logic       inv_q;
  logic [1:0] mode, mode_q;   // 2 = 256, 1 = 64, 0 = 16 points
  logic [7:0] tw4_unused;

  always_comb begin
    if (s256)                    mode = 2'd2;
    else if (s64 || !SUPPORT_16) mode = 2'd1;
    else                         mode = 2'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= 2'd2;
      inv_q  <= 1'b0;
    end else begin
      mode_q <= mode;
      inv_q  <= inverse;
    end
  end

  assign clr      = (mode != mode_q) || (inverse != inv_q);
  assign gck1_en  = (mode == 2'd2);
  assign gck2_en  = (mode != 2'd0);
  assign mux1_sel = (mode == 2'd2);
  assign mux2_sel = (mode != 2'd0);

  r4_stage_fsm #(.NT(64), .STAGE(1)) u_fsm1 (
    .clk, .rst_n, .en(gck1_en), .clr, .in_valid(stage_in_valid[0]),
    .ctrl(ctrl[0]), .fifo_addr(fifo_addr1), .tw_addr(tw_addr[0]));
  r4_stage_fsm #(.NT(16), .STAGE(2)) u_fsm2 (
    .clk, .rst_n, .en(gck2_en), .clr, .in_valid(stage_in_valid[1]),
    .ctrl(ctrl[1]), .fifo_addr(fifo_addr2), .tw_addr(tw_addr[1]));
  r4_stage_fsm #(.NT(4), .STAGE(3)) u_fsm3 (
    .clk, .rst_n, .en(1'b1), .clr, .in_valid(stage_in_valid[2]),
    .ctrl(ctrl[2]), .fifo_addr(fifo_addr3), .tw_addr(tw_addr[2]));
  r4_stage_fsm #(.NT(1), .STAGE(4)) u_fsm4 (
    .clk, .rst_n, .en(1'b1), .clr, .in_valid(stage_in_valid[3]),
    .ctrl(ctrl[3]), .fifo_addr(fifo_addr4), .tw_addr(tw4_unused));

endmodule
