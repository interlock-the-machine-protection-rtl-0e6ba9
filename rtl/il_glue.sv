// il_glue - interlock glue logic.
//
// Combines the interlock sources into one condition:
//   il_cond = IL_ON AND ( ((IL_POS_X OR IL_POS_Y) AND pos_enable) OR il_ovf )
// The position flags count only while the gain-dependent enable allows
// them; a filtered ADC overflow always counts, since a saturated ADC makes
// the computed position meaningless (it reads as a centred beam).  IL_ON is
// the single on/off switch.  The gate network follows the source.
// Purely combinational; the monostable behind it registers the result.
module il_glue (
  input  logic il_on,
  input  logic il_pos_x,
  input  logic il_pos_y,
  input  logic pos_enable,
  input  logic il_ovf,
  output logic il_cond
);

  logic pos_any, pos_gated;

  always_comb begin
    pos_any   = il_pos_x | il_pos_y;
    pos_gated = pos_any & pos_enable;
    il_cond   = il_on & (pos_gated | il_ovf);
  end

endmodule
