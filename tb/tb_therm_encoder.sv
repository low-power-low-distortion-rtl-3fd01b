// Self-checking test of the thermometer encoder: every 4-bit level -8..+7
// must give level+8 ones packed from bit 0, per the encoder table
// (+7 -> all 15, 0 -> 8, -7 -> 1, -8 -> none).
module tb_therm_encoder;
  import dsdac_pkg::*;
  level_t level;
  elem_t  thermo;
  int checks = 0, failures = 0;

  therm_encoder dut (.level, .thermo);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int lv = -8; lv <= 7; lv++) begin
      elem_t exp_t;
      level = level_t'(lv);
      #1;
      exp_t = '0;
      for (int i = 0; i < lv + 8; i++) exp_t[i] = 1'b1;
      checks++;
      if (thermo !== exp_t) begin
        failures++;
        $display("level %0d: got %b expected %b", lv, thermo, exp_t);
      end
    end
    // spot checks straight from the table
    level = 4'sd7;  #1; checks++; if (thermo != 15'h7fff) failures++;
    level = 4'sd0;  #1; checks++; if (thermo != 15'h00ff) failures++;
    level = -4'sd7; #1; checks++; if (thermo != 15'h0001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
