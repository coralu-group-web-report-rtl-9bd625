// tb_cordic_ctrl: self-checking test of the sequencing state machine.
//
// Runs several operations and checks, cycle by cycle, that load is high only
// in the cycle start is taken, that run and busy are high for exactly NITER
// cycles with iter counting 0..NITER-1, that done follows NITER + 1 clocks
// after start for one cycle, and that a start raised while busy is ignored.
module tb_cordic_ctrl;
  import cordic_pkg::*;
  localparam int unsigned NITER = ITERATIONS;
  logic  clk = 0, rst_n = 1, start = 0;
  logic  load, run, busy, done;
  iter_t iter;
  int checks = 0, failures = 0;

  cordic_ctrl #(.NITER(NITER)) dut (.clk, .rst_n, .start, .load, .run, .iter, .busy, .done);

  always #5 clk = ~clk;

  task automatic expect_sig(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s = %b, expected %b at %0t", what, got, want, $time);
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
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_sig("idle load", load, 1'b0);
    expect_sig("idle busy", busy, 1'b0);
    expect_sig("idle done", done, 1'b0);
    for (int op = 0; op < 4; op++) begin
      start = 1;
      #1 expect_sig("load with start", load, 1'b1);
      @(negedge clk);
      start = (op % 2 == 1);  // odd operations keep start high while busy
      for (int i = 0; i < int'(NITER); i++) begin
        expect_sig("run", run, 1'b1);
        expect_sig("busy", busy, 1'b1);
        expect_sig("load while busy", load, 1'b0);
        expect_sig("done early", done, 1'b0);
        checks++;
        if (int'(iter) != i) begin
          failures++;
          $display("FAIL iter=%0d expected %0d", iter, i);
        end
        @(negedge clk);
      end
      start = 0;
      expect_sig("done", done, 1'b1);
      expect_sig("run after last", run, 1'b0);
      expect_sig("busy in done", busy, 1'b0);
      @(negedge clk);
      expect_sig("done pulse ends", done, 1'b0);
      repeat (op) @(negedge clk);
      expect_sig("stays idle", busy, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
