// il_quad_detector - quasi-quadrature amplitude detector with limit
// comparator, for finding ADC saturation.
//
// A saturated ADC cannot be seen in the position data: with all four
// electrodes clipped the computed position is simply the centre.  This
// detector works on the raw ADC-rate samples instead.  For a sine sampled
// about a quarter period apart, x[k]^2 + x[k-n]^2 is close to the squared
// amplitude, even when the sampling is not exactly in quadrature (with a
// ~30 MHz signal and a ~115 MHz clock, a quarter period is about one
// sample, hence N_DELAY = 1).  The remaining ripple is removed by a
// first-order IIR filter with coefficient k, and the result is compared
// with the square of the ADC limit: ovf is set while the filtered squared
// amplitude is above limit^2.  The principle, the delay-square-filter-
// compare chain and the comparison with the squared limit follow the
// source; the filter order, word lengths and pipelining are this design's.
//
// Timing: one sample per clock.  Squares, sum, filter and comparator are
// each one register stage, so a sample shows in ovf four clocks after it
// is presented (plus the delay line for the older sample).  restart, given
// with the first sample of a new signal, makes the filter load that
// sample's sum without filtering.
module il_quad_detector #(
  parameter int unsigned ADC_W   = il_pkg::ADC_W,
  parameter int unsigned N_DELAY = 1,
  parameter int unsigned K_FRAC  = il_pkg::K_FRAC,
  localparam int unsigned SQ_W   = 2 * ADC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    restart,
  input  logic signed [ADC_W-1:0] adc,
  input  logic        [K_FRAC:0]  k,
  input  logic        [ADC_W-2:0] adc_limit,
  output logic        [SQ_W-1:0]  amp_sq,
  output logic                    amp_valid,
  output logic                    ovf
);

  // Filter works on signed data; one extra bit keeps the sum positive.
  localparam int unsigned F_W = SQ_W + 1;

  logic signed [ADC_W-1:0] dly [N_DELAY];   // Z^-n
  logic        [SQ_W-1:0]  sq_now, sq_old;  // stage 1
  logic        [SQ_W-1:0]  sq_sum;          // stage 2
  logic        [1:0]       rs_pipe;         // restart alongside the data
  logic                    sum_valid;
  logic signed [F_W-1:0]   filt;
  logic        [SQ_W-1:0]  lim_sq;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_DELAY); i++) dly[i] <= '0;
      sq_now    <= '0;
      sq_old    <= '0;
      sq_sum    <= '0;
      rs_pipe   <= '0;
      sum_valid <= 1'b0;
    end else begin
      dly[0] <= adc;
      for (int i = 1; i < int'(N_DELAY); i++) dly[i] <= dly[i-1];
      sq_now    <= SQ_W'(adc * adc);
      sq_old    <= SQ_W'(dly[N_DELAY-1] * dly[N_DELAY-1]);
      sq_sum    <= sq_now + sq_old;
      rs_pipe   <= {rs_pipe[0], restart};
      sum_valid <= 1'b1;
    end
  end

  iir_filter #(.DATA_W(F_W), .K_FRAC(K_FRAC)) u_filter (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr      (rs_pipe[1]),
    .in_valid (sum_valid),
    .in_data  ($signed({1'b0, sq_sum})),
    .k        (k),
    .out_valid(amp_valid),
    .out_data (filt)
  );

  assign amp_sq = SQ_W'(filt);
  assign lim_sq = SQ_W'(adc_limit) * SQ_W'(adc_limit);

  always_ff @(posedge clk) begin
    if (!rst_n) ovf <= 1'b0;
    else        ovf <= amp_valid && (amp_sq > lim_sq);
  end

endmodule
