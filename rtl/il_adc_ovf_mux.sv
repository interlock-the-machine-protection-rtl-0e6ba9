// il_adc_ovf_mux - one saturation detector shared by the four ADC channels.
//
// The reaction time required of the interlock is far longer than a machine
// revolution, so a single quadrature detector is time-multiplexed over the
// channels: it watches one channel for a whole turn and moves to the next
// at every revolution trigger.  While a channel is watched, any overflow
// seen by the detector sets a sticky bit; at the end of the turn the bit
// becomes that channel's flag adc_ovfl[ch] (ADC1..ADC4_OVFL) and is
// cleared.  Each flag therefore reflects the last turn its channel was
// watched and is refreshed every N_CH turns.  Sharing the detector across
// channels at the revolution rate follows the source; the sticky flags,
// the filter restart and the blanking are this design's choices.
//
// After a channel switch the detector pipeline still carries the previous
// channel and its filter needs time to settle, so the filter is restarted
// on the first new sample and overflow is ignored for BLANK clocks.
//
// Timing: turn_tick is a one-clock pulse in this clock domain; turns must
// be longer than BLANK clocks, which an assertion checks.  The flag
// of the channel just left is written on the clock edge where turn_tick is
// high; ch_sel moves to the next channel at the same edge.
module il_adc_ovf_mux #(
  parameter int unsigned N_CH    = il_pkg::N_CH,
  parameter int unsigned ADC_W   = il_pkg::ADC_W,
  parameter int unsigned K_FRAC  = il_pkg::K_FRAC,
  parameter int unsigned N_DELAY = 1,
  parameter int unsigned BLANK   = 16,
  localparam int unsigned CH_W   = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [N_CH-1:0][ADC_W-1:0]         adc,
  input  logic                               turn_tick,
  input  logic [K_FRAC:0]                    k,
  input  logic [ADC_W-2:0]                   adc_limit,
  output logic [CH_W-1:0]                    ch_sel,
  output logic [N_CH-1:0]                    adc_ovfl,
  output logic [2*ADC_W-1:0]                 amp_sq
);

  localparam int unsigned BL_W = $clog2(BLANK + 1);

  logic             restart;
  logic [BL_W-1:0]  blank_cnt;
  logic             sticky;
  logic             det_ovf;
  logic             amp_valid;
  logic             ovf_now;

  il_quad_detector #(
    .ADC_W(ADC_W), .N_DELAY(N_DELAY), .K_FRAC(K_FRAC)
  ) u_det (
    .clk      (clk),
    .rst_n    (rst_n),
    .restart  (restart),
    .adc      ($signed(adc[ch_sel])),
    .k        (k),
    .adc_limit(adc_limit),
    .amp_sq   (amp_sq),
    .amp_valid(amp_valid),
    .ovf      (det_ovf)
  );

  assign ovf_now = det_ovf && (blank_cnt == '0);

  // A turn must outlast the blanking, or a channel would never be observed.
  a_turn_longer_than_blank: assert property (
    @(posedge clk) disable iff (!rst_n) turn_tick |-> blank_cnt == '0
  ) else $error("turn_tick within %0d clocks of the previous one", BLANK);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ch_sel    <= '0;
      restart   <= 1'b1;
      blank_cnt <= BL_W'(BLANK);
      sticky    <= 1'b0;
      adc_ovfl  <= '0;
    end else begin
      restart <= turn_tick;
      if (turn_tick) begin
        adc_ovfl[ch_sel] <= sticky | ovf_now;
        sticky           <= 1'b0;
        blank_cnt        <= BL_W'(BLANK);
        ch_sel           <= (ch_sel == CH_W'(N_CH - 1)) ? '0 : ch_sel + 1'b1;
      end else begin
        sticky <= sticky | ovf_now;
        if (blank_cnt != '0) blank_cnt <= blank_cnt - 1'b1;
      end
    end
  end

endmodule
