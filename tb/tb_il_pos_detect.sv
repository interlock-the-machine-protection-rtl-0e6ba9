// tb_il_pos_detect - self-checking test of one axis of position detection.
//
// Feeds 10 kHz-style position strobes (one every 8 clocks here) into the
// detector with a window of [-1 mm, +1 mm] in nanometres.  A reference
// model runs the same first-order filter and window test; after each
// sample the filtered position and the flag are compared.  Covers: inside,
// below Min, above Max, exactly on a limit (not a violation), a one-sample
// spike removed by filtering, and the latency of two clocks from pos_valid
// to il_pos.
module tb_il_pos_detect;
  localparam int KF = 15;
  logic clk = 0, rst_n = 0, pos_valid = 0;
  logic signed [31:0] pos = 0, lim_min = -1_000_000, lim_max = 1_000_000;
  logic [KF:0] k = 16'h8000;
  logic il_pos;
  logic signed [31:0] pos_filt;
  int checks = 0, failures = 0;
  longint ref_acc = 0;
  int n_spike_masked = 0;

  il_pos_detect dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sample(input int x);
    longint y;
    bit exp_il;
    @(negedge clk);
    pos = x; pos_valid = 1;
    ref_acc = longint'(x) * longint'(k) + ((ref_acc * longint'(32768 - k)) >>> KF);
    y = ref_acc >>> KF;
    exp_il = (longint'(lim_min) > y) || (y > longint'(lim_max));
    @(negedge clk);
    pos_valid = 0;
    checks++;
    if (pos_filt != 32'(y)) begin failures++; $display("filt %0d exp %0d", pos_filt, y); end
    @(negedge clk);
    checks++;
    if (il_pos != exp_il) begin failures++; $display("il %0b exp %0b y=%0d", il_pos, exp_il, y); end
    repeat (5) @(negedge clk);
    checks++;
    if (il_pos != exp_il) begin failures++; $display("il not held"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // no filtering: direct window test
    k = 16'h8000;
    sample(0);           sample(999_999);
    sample(1_000_000);   // on the limit: inside
    sample(1_000_001);   // above Max
    sample(-1_000_000);  sample(-1_000_001); // below Min
    sample(0);
    // filtering with K = 1/8: a one-sample spike of 5 mm is masked
    k = 16'h1000;
    sample(0); sample(5_000_000);
    if (il_pos == 0) n_spike_masked++;
    sample(0); sample(0);
    // a sustained step of 2 mm trips after a few samples
    for (int i = 0; i < 40; i++) sample(2_000_000);
    checks++; if (!il_pos) begin failures++; $display("step not detected"); end
    // random traffic and random windows
    for (int i = 0; i < 500; i++) begin
      k = 16'($urandom_range(1, 32768));
      lim_min = -$signed($urandom_range(0, 3_000_000));
      lim_max = $signed($urandom_range(0, 3_000_000));
      sample($signed($urandom_range(0, 8_000_000)) - 4_000_000);
    end
    checks++; if (n_spike_masked != 1) begin failures++; $display("spike not masked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
