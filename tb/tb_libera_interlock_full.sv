// tb_libera_interlock_full - end-to-end test at the real timing.
//
// The interlock is built with all its defaults (10 ms hold at 115 MHz).
// Position samples come at 10 kHz (every 11 500 clocks) and a machine
// revolution lasts 400 clocks (about 3.5 us); the scenario is the one of
// il_e2e_scenario, so the 10 ms detection requirement and the 10 ms
// monostable extension are checked in real clock counts.
module tb_libera_interlock_full;
  import il_pkg::*;

  logic clk, rst_n, pos_valid, turn_tick;
  il_cfg_t cfg;
  pos_t pos_x, pos_y, pos_x_filt, pos_y_filt;
  att_t [N_ATT-1:0] att;
  logic [N_CH-1:0][ADC_W-1:0] adc;
  logic il_out, il_switch_closed, il_pos_x, il_pos_y, att_gt_lim, il_ovf;
  logic [N_CH-1:0] adc_ovfl;
  logic [$clog2(N_CH)-1:0] ch_sel;
  logic [2*ADC_W-1:0] amp_sq;

  libera_interlock dut (.*);

  il_e2e_scenario #(.HOLD(1_150_000), .POS_DIV(11_500), .TURN(400)) scen (.*);
endmodule
