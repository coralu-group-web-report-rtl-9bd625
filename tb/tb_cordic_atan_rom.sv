// tb_cordic_atan_rom: self-checking test of the elementary angle table.
//
// For each of the 16 addresses compares the table entry with
// round(256 * atan(2^-i)) computed here in floating point.
module tb_cordic_atan_rom;
  import cordic_pkg::*;
  iter_t addr;
  word_t angle;
  int checks = 0, failures = 0;

  cordic_atan_rom dut (.addr, .angle);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      real r;
      int  expect_v;
      addr = iter_t'(i);
      #1;
      r = $atan(2.0 ** (-i)) * 256.0;
      expect_v = $rtoi(r + 0.5);
      checks++;
      if (int'(angle) != expect_v) begin
        failures++;
        $display("FAIL i=%0d angle=%0d expected %0d", i, angle, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
