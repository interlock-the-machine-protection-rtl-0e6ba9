// tb_il_quad_detector - self-checking test of the quasi-quadrature
// amplitude detector.
//
// A sine of about 30 MHz sampled at about 115 MHz (the typical operating
// point) is generated with random amplitude and phase.  The testbench
// keeps its own model of the chain (x[k]^2 + x[k-1]^2, then the
// first-order filter) and compares amp_sq every clock, three clocks after
// each sample, and the overflow flag one clock after that.  It also checks
// that the filtered value settles within 10 % of amplitude^2 with the
// filter coefficient 1/4, and that an amplitude above the limit sets ovf
// while one below does not.
module tb_il_quad_detector;
  localparam int KF = 15;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, restart = 0;
  logic signed [15:0] adc = 0;
  logic [KF:0] k = 16'h2000;
  logic [14:0] adc_limit = 15'd1900;
  logic [31:0] amp_sq;
  logic amp_valid, ovf;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_settled = 0;

  il_quad_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_q[$];     // x[k]^2 + x[k-1]^2 of the samples in flight
  bit     rs_q[$];
  longint ref_acc = 0;
  int prev = 0;

  task automatic run_tone(input real amp, input real ph, input int n, input bit rs);
    int s; longint sum;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      // compare the output belonging to the sample driven three clocks ago
      if (exp_q.size() == 3) begin
        longint e, x;
        bit c;
        // the filter used the coefficient of the last clock edge
        x = exp_q.pop_front();
        c = rs_q.pop_front();
        if (c) ref_acc = x <<< KF;
        else ref_acc = x * longint'(k) + ((ref_acc * longint'(32768 - k)) >>> KF);
        e = ref_acc >>> KF;
        checks++;
        if (!amp_valid || longint'(amp_sq) != e) begin
          failures++; $display("amp_sq %0d exp %0d", amp_sq, e);
        end
      end
      s = int'($rtoi(amp * $sin(2.0 * PI * 30.0 / 115.0 * i + ph)));
      adc = 16'(s);
      restart = rs && (i == 0);
      sum = longint'(s) * s + longint'(prev) * prev;
      exp_q.push_back(sum);
      rs_q.push_back(restart);
      prev = s;
    end
  endtask

  // ovf follows amp_sq > limit^2 one clock later
  logic [31:0] amp_d;
  logic [14:0] lim_d;
  always @(posedge clk) begin amp_d <= amp_sq; lim_d <= adc_limit; end
  always @(negedge clk) if (rst_n && exp_q.size() == 3) begin
    checks++;
    if (ovf != (amp_d > 32'(lim_d) * lim_d)) begin failures++; $display("ovf mismatch"); end
    if (ovf) n_ovf++;
  end

  initial begin
    real a;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // amplitude 2000 against limit 1900: overflow
    run_tone(2000.0, 0.3, 200, 1);
    checks++;
    if (amp_sq < 3_600_000 || amp_sq > 4_400_000) begin failures++; $display("not settled %0d", amp_sq); end
    else n_settled++;
    checks++; if (!ovf) begin failures++; $display("no overflow at A=2000"); end
    // amplitude 1500: no overflow after settling
    run_tone(1500.0, 1.1, 200, 0);
    checks++; if (ovf) begin failures++; $display("false overflow at A=1500"); end
    // random tones and coefficients
    for (int j = 0; j < 20; j++) begin
      k = 16'($urandom_range(1000, 32768));
      a = real'($urandom_range(100, 32000));
      adc_limit = 15'($urandom_range(100, 32000));
      run_tone(a, real'($urandom_range(0, 628)) / 100.0, 100, 1'($urandom));
    end
    checks++; if (n_ovf == 0 || n_settled == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
