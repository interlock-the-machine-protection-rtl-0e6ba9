// tb_il_adc_ovf_mux - self-checking test of the multiplexed ADC overflow
// detection.
//
// Four ADC channels carry ~30 MHz tones (sampled at ~115 MHz) whose
// amplitudes are drawn at random, well below or well above the limit, and
// change every few turns.  A revolution trigger is given every TURN clocks.
// After each trigger the flag of the channel that was just watched must
// equal "its amplitude was above the limit", the other flags must keep
// their values, and the watched channel must advance by one.  Cases where
// a loud channel is followed by a quiet one are counted, to show that the
// blanking after a switch keeps the previous channel out of the next flag.
module tb_il_adc_ovf_mux;
  localparam int KF = 15;
  localparam int TURN = 64;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, turn_tick = 0;
  logic [3:0][15:0] adc = '0;
  logic [KF:0] k = 16'h2000;
  logic [14:0] adc_limit = 15'd2000;
  logic [1:0] ch_sel;
  logic [3:0] adc_ovfl;
  logic [31:0] amp_sq;
  int checks = 0, failures = 0;
  int amp [4] = '{1000, 1000, 1000, 1000};
  int n_loud_then_quiet = 0, n_flag_set = 0, n_flag_clr = 0;

  il_adc_ovf_mux dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t = 0;
  always @(negedge clk) begin
    t++;
    for (int c = 0; c < 4; c++)
      adc[c] = 16'($rtoi(amp[c] * $sin(2.0 * PI * 30.0 / 115.0 * t + c)));
  end

  initial begin
    logic [1:0] prev_ch;
    logic [3:0] prev_flags;
    bit prev_loud;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    prev_loud = 0;
    for (int turn = 0; turn < 400; turn++) begin
      if (turn % 4 == 0)
        for (int c = 0; c < 4; c++) amp[c] = $urandom_range(0, 1) ? 3000 : 1000;
      repeat (TURN - 1) @(negedge clk);
      prev_ch = ch_sel;
      prev_flags = adc_ovfl;
      turn_tick = 1;
      @(negedge clk);
      turn_tick = 0;
      // the first turn after reset starts mid-pipeline: skip its check
      if (turn > 0) begin
        checks++;
        if (adc_ovfl[prev_ch] != (amp[prev_ch] > int'(adc_limit))) begin
          failures++;
          $display("turn %0d ch %0d flag %0b amp %0d", turn, prev_ch, adc_ovfl[prev_ch], amp[prev_ch]);
        end
        if (adc_ovfl[prev_ch]) n_flag_set++; else n_flag_clr++;
        if (prev_loud && amp[prev_ch] <= int'(adc_limit)) n_loud_then_quiet++;
        for (int c = 0; c < 4; c++) if (c != int'(prev_ch)) begin
          checks++;
          if (adc_ovfl[c] != prev_flags[c]) begin failures++; $display("flag %0d changed", c); end
        end
        checks++;
        if (ch_sel != prev_ch + 2'd1) begin failures++; $display("channel did not advance"); end
      end
      prev_loud = amp[prev_ch] > int'(adc_limit);
    end
    checks++;
    if (n_loud_then_quiet == 0 || n_flag_set == 0 || n_flag_clr == 0) begin
      failures++; $display("coverage: %0d %0d %0d", n_loud_then_quiet, n_flag_set, n_flag_clr);
    end
    $display("loud->quiet switches %0d, flags set %0d, clear %0d", n_loud_then_quiet, n_flag_set, n_flag_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
