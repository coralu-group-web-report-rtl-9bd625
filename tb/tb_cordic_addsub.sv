// tb_cordic_addsub: self-checking test of the adder/subtractor.
//
// Drives corner operands (zero, all ones, most negative and most positive
// numbers) and random operands in both modes, and compares s with a + b or
// a - b computed here modulo 2^16.
module tb_cordic_addsub;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, s;
  logic         add;
  int checks = 0, failures = 0;

  cordic_addsub #(.WIDTH(W)) dut (.a, .b, .add, .s);

  task automatic check_one(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tadd);
    int unsigned ref_val;
    a = ta; b = tb_; add = tadd;
    #1;
    ref_val = tadd ? (int'(ta) + int'(tb_)) : (int'(ta) - int'(tb_) + 65536);
    checks++;
    if (s !== W'(ref_val)) begin
      failures++;
      $display("FAIL a=%h b=%h add=%b s=%h expected %h", ta, tb_, tadd, s, W'(ref_val));
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
    logic [W-1:0] corners [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF, 16'h00C9};
    foreach (corners[i]) foreach (corners[j]) begin
      check_one(corners[i], corners[j], 1'b1);
      check_one(corners[i], corners[j], 1'b0);
    end
    repeat (2000) check_one(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
