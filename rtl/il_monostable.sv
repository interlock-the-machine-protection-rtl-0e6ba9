// il_monostable - retriggerable monostable on the interlock output.
//
// Programmable logic controllers that read the interlock line may miss
// pulses of a millisecond or less, so the output is held active for a fixed
// time (10 ms by default) after the interlock condition goes away.  A
// down-counter is reloaded with HOLD_CYCLES on every clock the condition
// is present; the output is active while the condition is present or the
// counter is not zero.  The 10 ms hold follows the source; counting it in
// ADC clocks (about 115 MHz) is this design's choice.
//
// Timing: il_out rises one clock after trig and falls HOLD_CYCLES+1 clocks
// after the last clock with trig.  During and straight after reset the
// output is active, so a unit that is not running reports an interlock.
module il_monostable #(
  parameter int unsigned CLK_HZ      = 115_000_000,
  parameter int unsigned HOLD_US     = 10_000,
  parameter int unsigned HOLD_CYCLES = CLK_HZ / 1_000_000 * HOLD_US
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic il_out
);

  localparam int unsigned CNT_W = $clog2(HOLD_CYCLES + 1);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= CNT_W'(HOLD_CYCLES);
      il_out <= 1'b1;
    end else if (trig) begin
      cnt    <= CNT_W'(HOLD_CYCLES);
      il_out <= 1'b1;
    end else if (cnt != '0) begin
      cnt    <= cnt - 1'b1;
      il_out <= 1'b1;
    end else begin
      il_out <= 1'b0;
    end
  end

endmodule
