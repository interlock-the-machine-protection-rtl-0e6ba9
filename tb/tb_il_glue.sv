// tb_il_glue - exhaustive test of the interlock glue logic.
//
// All 32 input combinations are applied and compared with
// IL_ON and ((IL_POS_X or IL_POS_Y) and enable or overflow).
module tb_il_glue;
  logic il_on, il_pos_x, il_pos_y, pos_enable, il_ovf, il_cond;
  int checks = 0, failures = 0;

  il_glue dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    for (int v = 0; v < 32; v++) begin
      {il_on, il_pos_x, il_pos_y, pos_enable, il_ovf} = 5'(v);
      #1;
      exp = 0;
      if (il_on) begin
        if (il_ovf) exp = 1;
        if (pos_enable && (il_pos_x || il_pos_y)) exp = 1;
      end
      checks++;
      if (il_cond != exp) begin failures++; $display("v=%b got %b", v[4:0], il_cond); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
