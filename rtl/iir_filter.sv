// iir_filter - first-order IIR low-pass, y[n] = K*x[n] + (1-K)*y[n-1].
//
// The structure is the one the interlock uses in front of its position
// comparators and behind its amplitude detector: the input is multiplied by
// K, the register output by 1-K, and the sum is stored in the register.  K
// is a run-time setting in unsigned fixed point with K_FRAC fraction bits,
// so K = 2**K_FRAC is 1.0 (no filtering) and smaller K filters harder.
// The register keeps K_FRAC extra fraction bits so that slow settling is not
// stopped short by rounding; out_data is the register truncated to DATA_W.
//
// Timing: a sample accepted with in_valid is in out_data one clock later,
// flagged by out_valid.  clr together with in_valid loads the sample
// without filtering (used when a shared filter moves to a new signal).
// Reset clears the register.  The fixed-point format, the extra precision
// and clr are this design's choices.
module iir_filter #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned K_FRAC = 15
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic        [K_FRAC:0]   k,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_data
);

  localparam int unsigned ACC_W = DATA_W + K_FRAC;     // register width
  localparam int unsigned PRD_W = ACC_W + K_FRAC + 2;  // product width

  localparam logic [K_FRAC:0] ONE = (K_FRAC+1)'(1) << K_FRAC;

  logic signed [ACC_W-1:0] acc;       // y scaled by 2**K_FRAC
  logic        [K_FRAC:0]  k_sat;     // K limited to 1.0
  logic        [K_FRAC:0]  one_m_k;   // 1-K
  logic signed [PRD_W-1:0] p_in;      // K*x, scaled by 2**K_FRAC
  logic signed [PRD_W-1:0] p_fb;      // (1-K)*y, scaled by 2**(2*K_FRAC)
  logic signed [PRD_W-1:0] sum;

  always_comb begin
    k_sat   = (k > ONE) ? ONE : k;
    one_m_k = ONE - k_sat;
    p_in    = PRD_W'(in_data) * $signed({1'b0, k_sat});
    p_fb    = PRD_W'(acc) * $signed({1'b0, one_m_k});
    sum     = p_in + (p_fb >>> K_FRAC);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (clr) acc <= ACC_W'(in_data) <<< K_FRAC;
        else     acc <= ACC_W'(sum);
      end
    end
  end

  assign out_data = DATA_W'(acc >>> K_FRAC);

endmodule
