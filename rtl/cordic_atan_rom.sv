// cordic_atan_rom: elementary rotation angles of the circular CORDIC system.
//
// Returns atan(2^-i) in Q7.8 radians for the iteration number i, that is
// round(256 * atan(2^-i)). The table is a constant selection on the address
// rather than a clocked memory, so the angle is available in the same cycle as
// the iteration number, as the design does to avoid the timing trouble of a
// registered ROM. Entries from i = 9 on round to zero. Purely combinational.
module cordic_atan_rom
  import cordic_pkg::*;
(
  input  iter_t addr,   // iteration number i
  output word_t angle   // atan(2^-i), Q7.8 radians
);
  always_comb begin
    unique case (addr)
      4'd0:    angle = 16'sd201;  // 0.785398
      4'd1:    angle = 16'sd119;  // 0.463648
      4'd2:    angle = 16'sd63;   // 0.244979
      4'd3:    angle = 16'sd32;   // 0.124355
      4'd4:    angle = 16'sd16;   // 0.062419
      4'd5:    angle = 16'sd8;    // 0.031240
      4'd6:    angle = 16'sd4;    // 0.015624
      4'd7:    angle = 16'sd2;    // 0.007812
      4'd8:    angle = 16'sd1;    // 0.003906
      default: angle = 16'sd0;    // below half an LSB
    endcase
  end

  // The constants above are scaled for eight fraction bits.
  initial assert (FRAC == 8 && WIDTH == 16)
    else $error("cordic_atan_rom: table is built for Q7.8");
endmodule
