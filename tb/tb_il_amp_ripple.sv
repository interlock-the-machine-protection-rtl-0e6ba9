// tb_il_amp_ripple - amplitude-detector ripple with and without filtering.
//
// Reproduces the detector's characteristic workload: a tone of 2000 counts
// (amplitude square 4e6) sampled near quadrature, once at the typical
// 30 MHz / 115 MHz ratio and once clearly off quadrature (f/fs = 0.30).
// Two detectors see the same samples, one with K = 1.0 (unfiltered) and
// one with K = 1/4.  After settling, the testbench records minimum,
// maximum and mean of each output over 2000 samples and checks that both
// means are within 3 % of the amplitude square, that filtering reduces the
// peak-to-peak ripple, and that the filtered ripple stays within +-10 %.
// It also checks that the filtered output settles within 20 samples.
module tb_il_amp_ripple;
  localparam real PI = 3.14159265358979;
  localparam real A  = 2000.0;
  logic clk = 0, rst_n = 0, restart = 0;
  logic signed [15:0] adc = 0;
  logic [14:0] adc_limit = 15'd30000;
  logic [31:0] amp_raw, amp_filt;
  logic v_raw, v_filt, ovf_raw, ovf_filt;
  int checks = 0, failures = 0;

  il_quad_detector u_raw (
    .clk, .rst_n, .restart, .adc, .k(16'h8000), .adc_limit,
    .amp_sq(amp_raw), .amp_valid(v_raw), .ovf(ovf_raw));
  il_quad_detector u_filt (
    .clk, .rst_n, .restart, .adc, .k(16'h2000), .adc_limit,
    .amp_sq(amp_filt), .amp_valid(v_filt), .ovf(ovf_filt));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input real ratio);
    real a2, mn_r, mx_r, sum_r, mn_f, mx_f, sum_f;
    int settle;
    a2 = A * A;
    mn_r = 1e30; mx_r = 0; sum_r = 0; mn_f = 1e30; mx_f = 0; sum_f = 0;
    settle = -1;
    for (int i = 0; i < 2100; i++) begin
      @(negedge clk);
      adc = 16'($rtoi(A * $sin(2.0 * PI * ratio * i + 0.4)));
      if (settle < 0 && i > 4 && real'(amp_filt) > 0.9 * a2 && real'(amp_filt) < 1.1 * a2)
        settle = i - 4;
      if (i >= 100) begin
        if (real'(amp_raw) < mn_r) mn_r = real'(amp_raw);
        if (real'(amp_raw) > mx_r) mx_r = real'(amp_raw);
        if (real'(amp_filt) < mn_f) mn_f = real'(amp_filt);
        if (real'(amp_filt) > mx_f) mx_f = real'(amp_filt);
        sum_r += real'(amp_raw);
        sum_f += real'(amp_filt);
      end
    end
    $display("f/fs=%0.3f raw %0.0f..%0.0f mean %0.0f | filtered %0.0f..%0.0f mean %0.0f | settle %0d samples",
             ratio, mn_r, mx_r, sum_r / 2000.0, mn_f, mx_f, sum_f / 2000.0, settle);
    check(sum_r / 2000.0 > 0.97 * a2 && sum_r / 2000.0 < 1.03 * a2, "unfiltered mean near a^2");
    check(sum_f / 2000.0 > 0.97 * a2 && sum_f / 2000.0 < 1.03 * a2, "filtered mean near a^2");
    check(mx_f - mn_f < mx_r - mn_r, "filtering reduces ripple");
    check(mn_f > 0.9 * a2 && mx_f < 1.1 * a2, "filtered ripple within 10 %");
    check(settle >= 0 && settle <= 20, "filtered output settles within 20 samples");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(30.0 / 115.0);
    // start the second tone from reset so that settling is measured again
    @(negedge clk) rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0.30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
