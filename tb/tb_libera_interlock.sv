// tb_libera_interlock - end-to-end test of the interlock at reduced timing.
//
// The monostable hold is shortened to 400 clocks and a position sample is
// given every 16 clocks, so the whole scenario of il_e2e_scenario runs in
// a few tens of thousands of clocks.  Everything else is at its default.
module tb_libera_interlock;
  import il_pkg::*;
  localparam int HOLD = 400;

  logic clk, rst_n, pos_valid, turn_tick;
  il_cfg_t cfg;
  pos_t pos_x, pos_y, pos_x_filt, pos_y_filt;
  att_t [N_ATT-1:0] att;
  logic [N_CH-1:0][ADC_W-1:0] adc;
  logic il_out, il_switch_closed, il_pos_x, il_pos_y, att_gt_lim, il_ovf;
  logic [N_CH-1:0] adc_ovfl;
  logic [$clog2(N_CH)-1:0] ch_sel;
  logic [2*ADC_W-1:0] amp_sq;

  libera_interlock #(.HOLD_CYCLES(HOLD)) dut (.*);

  il_e2e_scenario #(.HOLD(HOLD), .POS_DIV(16), .TURN(64)) scen (.*);
endmodule
