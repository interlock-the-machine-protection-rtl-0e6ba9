// tb_il_ovf_filter - self-checking test of the overflow duration filter.
//
// Random bursts of overflow flags on random channels are applied with a
// random required duration.  The reference counts consecutive clocks with
// any flag set and expects the output one clock after the count reaches
// the duration; it is compared every clock.
module tb_il_ovf_filter;
  logic clk = 0, rst_n = 0;
  logic [3:0] adc_ovfl = '0;
  logic [15:0] ovf_dur = 16'd5;
  logic il_ovf;
  int checks = 0, failures = 0;
  int run = 0;
  bit exp = 0;
  int n_pass = 0, n_block = 0;

  il_ovf_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    int r;
    r = (|adc_ovfl) ? run + 1 : 0;
    run <= r;
    exp <= rst_n && (|adc_ovfl) && (r >= int'(ovf_dur));
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (il_ovf != exp) begin failures++; $display("t=%0t run=%0d got %0b", $time, run, il_ovf); end
  end

  initial begin
    int len;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      ovf_dur = 16'($urandom_range(0, 20));
      len = $urandom_range(1, 30);
      if (len >= int'(ovf_dur)) n_pass++; else n_block++;
      for (int c = 0; c < len; c++) begin
        adc_ovfl = 4'($urandom_range(1, 15));
        @(negedge clk);
      end
      adc_ovfl = '0;
      repeat ($urandom_range(1, 10)) @(negedge clk);
    end
    checks++; if (n_pass == 0 || n_block == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
