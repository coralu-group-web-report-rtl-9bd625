// tb_cordic_shifter: self-checking test of the slice-and-concatenate shifter.
//
// Applies every shift amount 0..15 to corner values and random words and
// compares the result with an arithmetic right shift computed here by
// repeated halving of the signed value (rounding toward minus infinity).
module tb_cordic_shifter;
  localparam int unsigned W = 16;
  logic [W-1:0] din, dout;
  logic [3:0]   shamt;
  int checks = 0, failures = 0;

  cordic_shifter #(.WIDTH(W), .SH_W(4)) dut (.din, .shamt, .dout);

  function automatic logic [W-1:0] ref_shift(input logic [W-1:0] v, input int k);
    int x = int'($signed(v));
    for (int n = 0; n < k; n++) x = (x < 0) ? -((-x + 1) / 2) : x / 2;
    return W'(x);
  endfunction

  task automatic check_one(input logic [W-1:0] v, input int k);
    din = v; shamt = 4'(k);
    #1;
    checks++;
    if (dout !== ref_shift(v, k)) begin
      failures++;
      $display("FAIL din=%h shamt=%0d dout=%h expected %h", v, k, dout, ref_shift(v, k));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] corners [5] = '{16'h0000, 16'hFFFF, 16'h8000, 16'h7FFF, 16'hA5C3};
    foreach (corners[i]) for (int k = 0; k < 16; k++) check_one(corners[i], k);
    repeat (2000) check_one(W'($urandom), int'($urandom_range(0, 15)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
