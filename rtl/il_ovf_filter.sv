// il_ovf_filter - duration filter on the ADC overflow flags.
//
// The per-channel overflow flags are OR-ed, and the result passes only once
// it has been present for ovf_dur consecutive clocks, so a single short
// overflow does not trip the interlock.  A run-length counter counts clocks
// with any flag set and clears when none is.  The OR of the four flags and
// the presence of a filter follow the source; that the filter is a
// persistence filter with a programmable duration is this design's choice.
//
// Timing: il_ovf rises on the clock after the ovf_dur-th consecutive clock
// with a flag set (ovf_dur 0 acts as 1) and falls one clock after all
// flags clear.
module il_ovf_filter #(
  parameter int unsigned N_CH  = il_pkg::N_CH,
  parameter int unsigned DUR_W = il_pkg::DUR_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_CH-1:0]  adc_ovfl,
  input  logic [DUR_W-1:0] ovf_dur,
  output logic             il_ovf
);

  logic             any_ovf;
  logic [DUR_W-1:0] run;     // consecutive clocks with an overflow, saturating
  logic [DUR_W-1:0] run_nx;

  always_comb begin
    any_ovf = |adc_ovfl;
    if (!any_ovf)        run_nx = '0;
    else if (&run)       run_nx = run;
    else                 run_nx = run + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run    <= '0;
      il_ovf <= 1'b0;
    end else begin
      run    <= run_nx;
      il_ovf <= any_ovf && (run_nx >= ovf_dur);
    end
  end

endmodule
