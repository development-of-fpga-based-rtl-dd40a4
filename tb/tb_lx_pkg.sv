// tb_lx_pkg - checks the lamp-drive function and encodings of lx_pkg.
// lamp() must give 0 for OFF, 1 for ON and the flash phase for FLASH; the
// state encodings must be distinct. Self-checking, prints TB_RESULT.
module tb_lx_pkg;
  import lx_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int ph = 0; ph < 2; ph++) begin
      check(lamp(ASP_OFF, ph[0]) == 1'b0, "OFF lamp");
      check(lamp(ASP_ON, ph[0]) == 1'b1, "ON lamp");
      check(lamp(ASP_FLASH, ph[0]) == ph[0], "FLASH lamp follows phase");
    end
    check(POS_RAISED != POS_LOWERED45 && POS_LOWERED45 != POS_HORIZONTAL, "barrier positions distinct");
    check(int'(LX_INFORM_DMF) == 10 && int'(LX_INIT) == 0, "state encoding");
    check($bits(road_aspect_t) == 6 && $bits(rail_aspect_t) == 4, "aspect struct widths");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
