// tb_iir_filter - self-checking test of the first-order IIR filter.
//
// Drives random samples with random coefficients (including K = 1.0, the
// pass-through case, and K = 0, the hold case) and compares every output
// with a reference model that keeps the same scaled accumulator
// y' = K*x + ((1-K)*y' >> 15) in 64-bit integers.  Also checks the one-clock
// latency (out_valid after in_valid), the clr load, and that a constant
// input is reached by the filter.
module tb_iir_filter;
  localparam int DW = 32;
  localparam int KF = 15;

  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  logic signed [DW-1:0] in_data = '0;
  logic [KF:0] k = '0;
  logic out_valid;
  logic signed [DW-1:0] out_data;
  int checks = 0, failures = 0;
  longint ref_acc = 0;   // y * 2**KF

  iir_filter #(.DATA_W(DW), .K_FRAC(KF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic signed [DW-1:0] x, input logic [KF:0] kk, input logic c);
    longint p_in, p_fb;
    @(negedge clk);
    in_data = x; k = kk; in_valid = 1; clr = c;
    if (c) ref_acc = longint'(x) <<< KF;
    else begin
      p_in = longint'(x) * longint'(kk);
      p_fb = ref_acc * longint'((1 << KF) - kk);
      ref_acc = p_in + (p_fb >>> KF);
    end
    @(negedge clk);
    in_valid = 0; clr = 0;
    checks++;
    if (!out_valid || out_data != DW'(ref_acc >>> KF)) begin
      failures++;
      $display("mismatch x=%0d k=%0d got=%0d exp=%0d v=%0b", x, kk, out_data, ref_acc >>> KF, out_valid);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("out_valid not a single pulse"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // K = 1.0 passes the sample straight through
    step(32'sd123456, 16'h8000, 0);
    checks++; if (out_data != 123456) failures++;
    // K = 0 holds the value
    step(-32'sd999, 16'h0000, 0);
    checks++; if (out_data != 123456) failures++;
    // clr loads directly
    step(-32'sd5000, 16'h0100, 1);
    checks++; if (out_data != -5000) failures++;
    // random samples and coefficients
    for (int i = 0; i < 2000; i++)
      step($signed($urandom_range(0, 2000000)) - 1000000, 16'($urandom_range(0, 32768)), 0);
    // convergence to a constant with K = 0.25
    for (int i = 0; i < 200; i++) step(32'sd1000000, 16'h2000, 0);
    checks++;
    if (out_data < 999990 || out_data > 1000000) begin
      failures++; $display("no convergence: %0d", out_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
