// tb_il_gain_enable - self-checking test of the gain-dependent enable.
//
// Sweeps random attenuator settings, limits and both modes; the expected
// ATT>A and enable are worked out from the sum in the testbench.  Checks
// the one-clock latency of the registered comparison and that the
// continuous mode (GS_DEP = 0) always enables.
module tb_il_gain_enable;
  logic clk = 0, rst_n = 0;
  logic [1:0][5:0] att = '0;
  logic [6:0] att_limit = '0;
  logic gs_dep = 0;
  logic att_gt_lim, pos_enable;
  int checks = 0, failures = 0;
  int n_dep_on = 0, n_dep_off = 0;

  il_gain_enable dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum; bit gt, en;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      att[0] = 6'($urandom); att[1] = 6'($urandom);
      att_limit = 7'($urandom_range(0, 126));
      gs_dep = 1'($urandom);
      sum = int'(att[0]) + int'(att[1]);
      gt = sum > int'(att_limit);
      en = gs_dep ? gt : 1'b1;
      @(negedge clk);
      checks++;
      if (att_gt_lim != gt || pos_enable != en) begin
        failures++;
        $display("sum=%0d lim=%0d dep=%0b got %0b/%0b", sum, att_limit, gs_dep, att_gt_lim, pos_enable);
      end
      if (gs_dep && !gt) n_dep_off++;
      if (gs_dep && gt) n_dep_on++;
    end
    checks++;
    if (n_dep_on == 0 || n_dep_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
