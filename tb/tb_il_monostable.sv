// tb_il_monostable - self-checking test of the retriggerable monostable.
//
// Runs the monostable with a short hold of 50 clocks.  A cycle-accurate
// reference (output = trigger seen in the last HOLD+1 clocks, counted from
// reset) is compared every clock while random pulse trains of 1 to 80
// clocks are applied.  Also checks explicitly that a one-clock trigger
// gives an output pulse of exactly HOLD+1 clocks.
module tb_il_monostable;
  localparam int HOLD = 50;
  logic clk = 0, rst_n = 0, trig = 0, il_out;
  int checks = 0, failures = 0;
  int since = 0;     // clocks since the last trig (or reset)
  int width;

  il_monostable #(.HOLD_CYCLES(HOLD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, sampled just before each edge
  always @(posedge clk) begin
    if (!rst_n || trig) since <= 0;
    else                since <= since + 1;
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (il_out != (since <= HOLD)) begin
      failures++;
      $display("t=%0t since=%0d il_out=%0b", $time, since, il_out);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (HOLD + 10) @(negedge clk);
    // single-clock pulse: measure the width
    trig = 1; @(negedge clk); trig = 0;
    width = 0;
    while (il_out) begin width++; @(negedge clk); end
    checks++;
    if (width != HOLD + 1) begin failures++; $display("width %0d", width); end
    // random traffic
    for (int i = 0; i < 300; i++) begin
      trig = 1'($urandom);
      repeat ($urandom_range(1, 80)) @(negedge clk);
    end
    trig = 0;
    repeat (HOLD + 5) @(negedge clk);
    checks++; if (il_out) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
