// il_gain_enable - gain-dependent enable of the position interlock.
//
// At low beam current the BPM front end runs with more gain (less
// attenuation) and the position interlock is not wanted.  Rather than
// estimating the current, the attenuator settings are summed and the sum is
// compared with a limit A: ATT>A means the beam current is high enough.
// With GS_DEP set the position interlock is enabled only when ATT>A; with
// GS_DEP clear it is always enabled:
//   pos_enable = (ATT>A AND GS_DEP) OR NOT GS_DEP.
// The sum-and-compare principle and the gates follow the source; the number
// and width of the attenuators are this design's choice.
//
// Timing: the sum and comparison are registered, so att_gt_lim and
// pos_enable follow the inputs after one clock.  Reset clears ATT>A.
module il_gain_enable #(
  parameter int unsigned N_ATT = il_pkg::N_ATT,
  parameter int unsigned ATT_W = il_pkg::ATT_W,
  localparam int unsigned SUM_W = ATT_W + $clog2(N_ATT)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N_ATT-1:0][ATT_W-1:0]  att,
  input  logic [SUM_W-1:0]             att_limit,
  input  logic                         gs_dep,
  output logic                         att_gt_lim,
  output logic                         pos_enable
);

  logic [SUM_W-1:0] att_sum;

  always_comb begin
    att_sum = '0;
    for (int i = 0; i < int'(N_ATT); i++) att_sum = att_sum + SUM_W'(att[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) att_gt_lim <= 1'b0;
    else        att_gt_lim <= att_sum > att_limit;
  end

  assign pos_enable = (att_gt_lim & gs_dep) | ~gs_dep;

endmodule
