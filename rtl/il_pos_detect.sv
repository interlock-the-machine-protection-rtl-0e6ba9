// il_pos_detect - position detection for one axis (X or Y).
//
// The 10 kHz position stream is smoothed by a first-order IIR filter to
// remove single-sample spikes, and the filtered value is held against a
// window: one comparator fires when Min is above the position, the other
// when the position is above Max, and their OR is the axis' interlock flag
// IL_POS.  To disable one axis, software sets a window that can never be
// left; there is no per-axis enable.  This structure follows the source.
//
// Timing: pos_valid marks one position sample.  The filter register holds
// the new value one clock later and il_pos follows one clock after that;
// il_pos then holds until the next sample.  The registered comparator and
// the strict comparisons are this design's choices.
module il_pos_detect #(
  parameter int unsigned POS_W  = il_pkg::POS_W,
  parameter int unsigned K_FRAC = il_pkg::K_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pos_valid,
  input  logic signed [POS_W-1:0] pos,
  input  logic        [K_FRAC:0]  k,
  input  logic signed [POS_W-1:0] lim_min,
  input  logic signed [POS_W-1:0] lim_max,
  output logic                    il_pos,
  output logic signed [POS_W-1:0] pos_filt
);

  logic filt_valid;

  iir_filter #(.DATA_W(POS_W), .K_FRAC(K_FRAC)) u_filter (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr      (1'b0),
    .in_valid (pos_valid),
    .in_data  (pos),
    .k        (k),
    .out_valid(filt_valid),
    .out_data (pos_filt)
  );

  logic below_min, above_max;
  always_comb begin
    below_min = lim_min > pos_filt;
    above_max = pos_filt > lim_max;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)          il_pos <= 1'b0;
    else if (filt_valid) il_pos <= below_min | above_max;
  end

endmodule
