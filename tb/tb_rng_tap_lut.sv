// tb_rng_tap_lut: checks every row of the tap table against an independently
// written list of tap positions (bit numbers, 0 = least significant).
module tb_rng_tap_lut;
  import rng_pkg::*;

  int checks = 0;
  int failures = 0;

  tap_sel_t sel;
  word_t    mask;

  rng_tap_lut dut (.sel(sel), .mask(mask));

  int unsigned pos [8][4] = '{
    '{31, 30, 28, 0}, '{31, 30, 4, 3}, '{31, 29, 7, 2}, '{31, 29, 6, 3},
    '{31, 28, 5, 4},  '{31, 28, 5, 3}, '{31, 25, 14, 6}, '{31, 30, 15, 1}
  };

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      logic [31:0] exp;
      sel = tap_sel_t'(r);
      #1;
      exp = '0;
      for (int k = 0; k < 4; k++) exp |= 32'd1 << pos[r][k];
      checks++;
      if (mask !== exp) begin
        failures++;
        $display("row %0d: mask %h expected %h", r, mask, exp);
      end
      checks++;
      if ($countones(mask) != 4) begin
        failures++;
        $display("row %0d: %0d taps", r, $countones(mask));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
