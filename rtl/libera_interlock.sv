// libera_interlock - machine-protection interlock of a beam position monitor.
//
// The unit raises its interlock output when the beam is outside a window
// in X or Y, or when an ADC of the BPM is saturated (which would make the
// reported position meaningless):
//
//   pos_x, pos_y (10 kHz) -> il_pos_detect x2 -> IL_POS_X, IL_POS_Y ---+
//   att[], att_limit, GS_DEP -> il_gain_enable -> pos_enable ----------+
//   adc[0..3] (ADC rate) -> il_adc_ovf_mux -> ADC1..4_OVFL             |
//                        -> il_ovf_filter -> il_ovf -------------------+
//                                               il_glue (with IL_ON) <-+
//                                                 -> il_monostable -> IL_OUT
//
// The position path filters each axis with a first-order IIR and compares
// it with Min/Max.  In gain-dependent mode the position interlock only
// counts while the summed attenuation is above a limit, i.e. at high beam
// current.  The saturation path runs a quasi-quadrature amplitude detector,
// shared between the four ADC channels one machine turn at a time, followed
// by a duration filter.  The monostable keeps IL_OUT active for 10 ms after
// the condition ends so that slow PLCs see it.
//
// The interlock line is an opto-coupled switch that is closed while all is
// well; il_switch_closed drives it and is low (open) when IL_OUT is active,
// during reset, and whenever the unit is not running.
//
// Interface: one clock, the ADC sample clock (about 115 MHz); pos_valid and
// turn_tick are one-clock strobes in that domain for the 10 kHz position
// samples and the machine revolution.  All settings come in cfg and may be
// changed at any time.  Reset is synchronous, active low.
module libera_interlock
  import il_pkg::*;
#(
  parameter int unsigned HOLD_CYCLES = 1_150_000,  // 10 ms at 115 MHz
  parameter int unsigned BLANK       = 16,
  parameter int unsigned N_DELAY     = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  il_cfg_t                     cfg,
  // fast acquisition positions
  input  logic                        pos_valid,
  input  pos_t                        pos_x,
  input  pos_t                        pos_y,
  // front-end attenuator settings
  input  att_t [N_ATT-1:0]            att,
  // raw ADC samples and revolution trigger
  input  logic [N_CH-1:0][ADC_W-1:0]  adc,
  input  logic                        turn_tick,
  // interlock output
  output logic                        il_out,
  output logic                        il_switch_closed,
  // status
  output logic                        il_pos_x,
  output logic                        il_pos_y,
  output logic                        att_gt_lim,
  output logic [N_CH-1:0]             adc_ovfl,
  output logic                        il_ovf,
  output pos_t                        pos_x_filt,
  output pos_t                        pos_y_filt,
  output logic [$clog2(N_CH)-1:0]     ch_sel,
  output logic [2*ADC_W-1:0]          amp_sq
);

  logic                  pos_enable;
  logic                  il_cond;

  il_pos_detect u_pos_x (
    .clk(clk), .rst_n(rst_n), .pos_valid(pos_valid), .pos(pos_x),
    .k(cfg.pos_k), .lim_min(cfg.x_min), .lim_max(cfg.x_max),
    .il_pos(il_pos_x), .pos_filt(pos_x_filt)
  );

  il_pos_detect u_pos_y (
    .clk(clk), .rst_n(rst_n), .pos_valid(pos_valid), .pos(pos_y),
    .k(cfg.pos_k), .lim_min(cfg.y_min), .lim_max(cfg.y_max),
    .il_pos(il_pos_y), .pos_filt(pos_y_filt)
  );

  il_gain_enable u_gain (
    .clk(clk), .rst_n(rst_n), .att(att), .att_limit(cfg.att_limit),
    .gs_dep(cfg.gs_dep), .att_gt_lim(att_gt_lim), .pos_enable(pos_enable)
  );

  il_adc_ovf_mux #(.BLANK(BLANK), .N_DELAY(N_DELAY)) u_ovf_mux (
    .clk(clk), .rst_n(rst_n), .adc(adc), .turn_tick(turn_tick),
    .k(cfg.amp_k), .adc_limit(cfg.adc_limit),
    .ch_sel(ch_sel), .adc_ovfl(adc_ovfl), .amp_sq(amp_sq)
  );

  il_ovf_filter u_ovf_filt (
    .clk(clk), .rst_n(rst_n), .adc_ovfl(adc_ovfl), .ovf_dur(cfg.ovf_dur),
    .il_ovf(il_ovf)
  );

  il_glue u_glue (
    .il_on(cfg.il_on), .il_pos_x(il_pos_x), .il_pos_y(il_pos_y),
    .pos_enable(pos_enable), .il_ovf(il_ovf), .il_cond(il_cond)
  );

  il_monostable #(.HOLD_CYCLES(HOLD_CYCLES)) u_mono (
    .clk(clk), .rst_n(rst_n), .trig(il_cond), .il_out(il_out)
  );

  assign il_switch_closed = ~il_out;

endmodule
