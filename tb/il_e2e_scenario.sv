// il_e2e_scenario - end-to-end stimulus and checks for libera_interlock.
//
// Shared by the reduced-size and the full-size testbench: the caller
// instantiates the interlock and connects it to this module's ports, and
// passes the timing it was built with.  The clock stands for the ~115 MHz
// ADC clock; a position sample (10 kHz) is given every POS_DIV clocks and
// a revolution trigger every TURN clocks.  Four ADC tones of ~30 MHz are
// generated with per-channel amplitudes.
//
// The scenario walks through every mechanism of the interlock and counts
// each: output open during and after reset, X and Y window violations,
// a spike removed by the position filter, gain-dependent suppression and
// enabling, the IL_ON switch, ADC overflow on one channel reaching the
// output through the multiplexed detector, a short overflow blocked by the
// duration filter, and the monostable extension.  Detection latency is
// checked against the 10 ms (100 position samples) requirement, and the
// release after the condition ends against HOLD+1 clocks.
module il_e2e_scenario
  import il_pkg::*;
#(
  parameter int unsigned HOLD    = 400,
  parameter int unsigned POS_DIV = 16,
  parameter int unsigned TURN    = 64
) (
  output logic                       clk,
  output logic                       rst_n,
  output il_cfg_t                    cfg,
  output logic                       pos_valid,
  output pos_t                       pos_x,
  output pos_t                       pos_y,
  output att_t [N_ATT-1:0]           att,
  output logic [N_CH-1:0][ADC_W-1:0] adc,
  output logic                       turn_tick,
  input  logic                       il_out,
  input  logic                       il_switch_closed,
  input  logic                       il_pos_x,
  input  logic                       il_pos_y,
  input  logic                       att_gt_lim,
  input  logic [N_CH-1:0]            adc_ovfl,
  input  logic                       il_ovf,
  input  logic [$clog2(N_CH)-1:0]    ch_sel
);
  localparam real PI = 3.14159265358979;
  localparam int MM = 1_000_000;   // 1 mm in nm

  int checks = 0, failures = 0;
  longint cyc = 0;
  int amp [N_CH];
  pos_t x_val = 0, y_val = 0;

  // mechanism counters
  int n_reset_open = 0, n_pos_x = 0, n_pos_y = 0, n_spike = 0;
  int n_gain_sup = 0, n_gain_en = 0, n_il_off = 0, n_ovf = 0;
  int n_ovf_block = 0, n_mono = 0;
  bit [N_CH-1:0] ch_seen = '0;

  initial clk = 0;
  always #4 clk = ~clk;

  // Watchdog: generous bound on the whole scenario.
  localparam longint WD = 64'(40) * HOLD + 64'(4000) * POS_DIV + 64'(400) * TURN;
  initial begin
    wait (cyc > WD);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus generators
  always @(posedge clk) begin
    cyc <= cyc + 1;
    ch_seen[ch_sel] <= 1'b1;
  end
  always @(negedge clk) begin
    pos_valid = (cyc % POS_DIV) == 0;
    turn_tick = (cyc % TURN) == TURN - 1;
    pos_x = x_val;
    pos_y = y_val;
    for (int c = 0; c < int'(N_CH); c++)
      adc[c] = ADC_W'($rtoi(amp[c] * $sin(2.0 * PI * 30.0 / 115.0 * cyc + c)));
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL at cycle %0d: %s", cyc, what); end
  endtask

  task automatic samples(input int n);
    repeat (n * POS_DIV) @(negedge clk);
  endtask

  // wait until il_out has a value, return clocks waited (or -1)
  task automatic wait_out(input bit v, input longint limit, output longint n);
    n = 0;
    while (il_out != v && n < limit) begin @(negedge clk); n++; end
    if (il_out != v) n = -1;
  endtask

  // Position event on one axis: trip, latency, release and hold.
  task automatic pos_event(input bit axis_y, output bit ok);
    longint n, t0;
    ok = 1;
    if (axis_y) y_val = -2 * MM; else x_val = 2 * MM;
    wait_out(1, 100 * POS_DIV, n);
    check(n >= 0, "position interlock within 10 ms (100 samples)");
    if (n < 0) ok = 0;
    check(n <= 3 * POS_DIV, "position interlock within 3 samples with K = 1/2");
    check(!il_switch_closed, "switch open while interlock active");
    if (axis_y) y_val = 0; else x_val = 0;
    // hold: il_out falls HOLD+1 clocks after the axis flag
    while ((axis_y ? il_pos_y : il_pos_x) == 1'b1) @(negedge clk);
    t0 = cyc;
    wait_out(0, 64'(HOLD) + 10, n);
    check(n >= 0 && (cyc - t0) == longint'(HOLD) + 1, "monostable hold HOLD+1 clocks");
    if (n >= 0 && (cyc - t0) == longint'(HOLD) + 1) n_mono++;
    check(il_switch_closed, "switch closed after release");
  endtask

  initial begin
    longint n;
    bit ok;
    for (int c = 0; c < int'(N_CH); c++) amp[c] = 1000;
    rst_n = 0;
    cfg = '0;
    cfg.il_on     = 1'b1;
    cfg.gs_dep    = 1'b0;
    cfg.x_min     = -MM;  cfg.x_max = MM;
    cfg.y_min     = -MM;  cfg.y_max = MM;
    cfg.pos_k     = coef_t'(16'h4000);   // K = 1/2
    cfg.amp_k     = coef_t'(16'h2000);   // K = 1/4
    cfg.adc_limit = 15'd2000;
    cfg.ovf_dur   = 16'd8;
    cfg.att_limit = att_sum_t'(20);
    att[0] = 6'd5; att[1] = 6'd5;        // sum 10
    repeat (5) @(negedge clk);
    check(il_out && !il_switch_closed, "switch open during reset");
    rst_n = 1;
    @(negedge clk);
    check(il_out, "interlock still active straight after reset");
    if (il_out) n_reset_open++;

    // quiet beam: released after the hold
    wait_out(0, 64'(HOLD) + 4 * POS_DIV, n);
    check(n >= 0, "released with quiet beam");
    samples(4);
    check(!il_out && il_switch_closed, "no interlock with centred beam");

    // X and Y violations
    pos_event(0, ok); if (ok) n_pos_x++;
    pos_event(1, ok); if (ok) n_pos_y++;

    // one-sample spike of 5 mm on X, filter K = 1/8
    cfg.pos_k = coef_t'(16'h1000);
    samples(20);
    @(negedge clk);
    while ((cyc % POS_DIV) != 2) @(negedge clk);
    x_val = 5 * MM;
    samples(1);
    x_val = 0;
    samples(20);
    check(!il_out && !il_pos_x, "spike filtered out");
    if (!il_out) n_spike++;
    cfg.pos_k = coef_t'(16'h4000);

    // gain-dependent mode: low attenuation (low current) suppresses
    cfg.gs_dep = 1'b1;
    x_val = 2 * MM;
    samples(10);
    check(il_pos_x && !att_gt_lim, "X flagged, attenuation below limit");
    check(!il_out, "gain-dependent mode suppresses at low current");
    if (il_pos_x && !il_out) n_gain_sup++;
    att[0] = 6'd15; att[1] = 6'd15;      // sum 30 > 20
    wait_out(1, 64'(POS_DIV), n);
    check(n >= 0 && att_gt_lim, "interlock enabled when attenuation exceeds limit");
    if (n >= 0) n_gain_en++;
    x_val = 0;
    wait_out(0, 64'(HOLD) + 4 * POS_DIV, n);
    check(n >= 0, "release after gain-dependent trip");

    // IL_ON off: no interlock even with the beam out
    cfg.il_on = 1'b0;
    x_val = 2 * MM;
    samples(10);
    check(il_pos_x && !il_out, "IL_ON off disables interlock");
    if (il_pos_x && !il_out) n_il_off++;
    x_val = 0;
    samples(4);
    cfg.il_on = 1'b1;

    // ADC overflow on channel 2; beam centred, low attenuation with
    // gain-dependent mode on: overflow still trips
    att[0] = 6'd1; att[1] = 6'd1;
    samples(2);
    amp[2] = 3000;
    wait_out(1, 64'(6) * TURN + cfg.ovf_dur + 20, n);
    check(n >= 0, "ADC overflow trips interlock within 6 turns");
    check(adc_ovfl[2] && il_ovf, "ADC3 overflow flag and filtered overflow");
    check(adc_ovfl[0] == 0 && adc_ovfl[1] == 0 && adc_ovfl[3] == 0, "other channels clean");
    if (n >= 0) n_ovf++;
    amp[2] = 1000;
    wait_out(0, 64'(HOLD) + 8 * TURN + 100, n);
    check(n >= 0 && adc_ovfl == '0, "overflow clears after the channel is quiet");

    // short overflow: flags last at most 4 turns, duration set longer
    cfg.ovf_dur = 16'(5 * TURN);
    while (ch_sel != 2'd1) @(negedge clk);
    amp[2] = 3000;
    while (ch_sel != 2'd3) @(negedge clk);
    amp[2] = 1000;
    n = 0;
    repeat (10 * TURN) begin @(negedge clk); if (adc_ovfl[2]) n++; end
    check(n > 0, "overflow seen on ADC3");
    check(!il_ovf && !il_out, "short overflow blocked by duration filter");
    if (n > 0 && !il_out) n_ovf_block++;
    check(&ch_seen, "detector visited every channel");

    $display("mechanisms: reset_open=%0d pos_x=%0d pos_y=%0d spike_masked=%0d gain_suppress=%0d gain_enable=%0d il_off=%0d adc_ovf=%0d ovf_dur_block=%0d mono_hold=%0d",
             n_reset_open, n_pos_x, n_pos_y, n_spike, n_gain_sup, n_gain_en, n_il_off, n_ovf, n_ovf_block, n_mono);
    check(n_reset_open > 0, "reset_open happened");
    check(n_pos_x > 0, "pos_x happened");
    check(n_pos_y > 0, "pos_y happened");
    check(n_spike > 0, "spike_masked happened");
    check(n_gain_sup > 0, "gain_suppress happened");
    check(n_gain_en > 0, "gain_enable happened");
    check(n_il_off > 0, "il_off happened");
    check(n_ovf > 0, "adc_ovf happened");
    check(n_ovf_block > 0, "ovf_dur_block happened");
    check(n_mono > 0, "mono_hold happened");
    $display("cycles simulated: %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
