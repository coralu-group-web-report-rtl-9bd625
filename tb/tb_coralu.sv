// tb_coralu: end-to-end test of the CORDIC rotation unit at its default size.
//
// Runs many rotations: unit vectors pre-scaled by 1/K (giving cos and sin of
// the angle), random vectors and random angles across the convergence range,
// and the corner angles 0 and +-1.739 rad. Each result is compared bit for bit
// with a reference model of the shift-add iteration written here with plain
// integer arithmetic, and, for the pre-scaled unit vectors, with cos and sin
// from floating point to within 6 LSB. It also checks that done arrives
// exactly ITERATIONS + 1 clocks after start, that busy covers the iterations,
// and counts how often each mechanism happened: rotation with d = +1,
// rotation with d = -1, and a start request ignored while busy. A mechanism
// that never happened counts as a failure.
module tb_coralu;
  import cordic_pkg::*;
  logic  clk = 0, rst_n = 1, start = 0;
  word_t x_in = '0, y_in = '0, z_in = '0;
  word_t x_out, y_out, z_out;
  logic  busy, done;
  int checks = 0, failures = 0;
  int n_dpos = 0, n_dneg = 0, n_ignored = 0;

  coralu dut (.clk, .rst_n, .start, .x_in, .y_in, .z_in, .busy, .done,
              .x_out, .y_out, .z_out);

  always #5 clk = ~clk;

  // Count elementary rotations by direction, from the sign of the angle
  // register seen at the output while an iteration is performed.
  always @(posedge clk) if (rst_n && busy) begin
    if (z_out[WIDTH-1]) n_dneg++;
    else                n_dpos++;
  end

  function automatic int asr(input int v, input int k);
    return v >>> k;
  endfunction

  function automatic int wrap16(input int v);
    return int'($signed(16'(v)));
  endfunction

  // Reference model: the rotation-mode circular CORDIC recurrence in Q7.8.
  task automatic model(input int x0, input int y0, input int z0,
                       output int xr, output int yr, output int zr);
    int x = x0, y = y0, z = z0, xn, yn;
    for (int i = 0; i < int'(ITERATIONS); i++) begin
      int a = $rtoi($atan(2.0 ** (-i)) * 256.0 + 0.5);
      if (z < 0) begin
        xn = x + asr(y, i); yn = y - asr(x, i); z = z + a;
      end else begin
        xn = x - asr(y, i); yn = y + asr(x, i); z = z - a;
      end
      x = wrap16(xn); y = wrap16(yn); z = wrap16(z);
    end
    xr = x; yr = y; zr = z;
  endtask

  task automatic rotate(input int x0, input int y0, input int z0, input bit trig,
                        input bit poke_start);
    int xr, yr, zr, cyc;
    @(negedge clk);
    x_in = word_t'(x0); y_in = word_t'(y0); z_in = word_t'(z0);
    start = 1;
    @(negedge clk);
    start = poke_start;
    cyc = 1;
    while (!done) begin
      if (poke_start && busy) n_ignored++;
      @(negedge clk);
      cyc++;
      if (cyc > 100) break;
    end
    start = 0;
    checks++;
    if (cyc != int'(ITERATIONS) + 1) begin
      failures++;
      $display("FAIL latency %0d clocks, expected %0d", cyc, ITERATIONS + 1);
    end
    model(x0, y0, z0, xr, yr, zr);
    checks++;
    if (int'(x_out) != xr || int'(y_out) != yr || int'(z_out) != zr) begin
      failures++;
      $display("FAIL in (%0d,%0d,%0d): out (%0d,%0d,%0d) expected (%0d,%0d,%0d)",
               x0, y0, z0, x_out, y_out, z_out, xr, yr, zr);
    end
    if (trig) begin
      real ang = real'(z0) / 256.0;
      int  ec  = $rtoi($floor($cos(ang) * 256.0 + 0.5));
      int  es  = $rtoi($floor($sin(ang) * 256.0 + 0.5));
      checks++;
      if ((int'(x_out) - ec) > 6 || (ec - int'(x_out)) > 6 ||
          (int'(y_out) - es) > 6 || (es - int'(y_out)) > 6) begin
        failures++;
        $display("FAIL trig z=%0d: cos %0d (exp %0d) sin %0d (exp %0d)",
                 z0, x_out, ec, y_out, es);
      end
    end
    // the result holds after done
    @(negedge clk);
    checks++;
    if (int'(x_out) != xr || int'(y_out) != yr || int'(z_out) != zr || busy) begin
      failures++;
      $display("FAIL result not held after done");
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // cos/sin via x0 = 1/K
    rotate(155, 0, 0, 1'b1, 1'b0);
    rotate(155, 0, 445, 1'b1, 1'b0);
    rotate(155, 0, -445, 1'b1, 1'b0);
    rotate(155, 0, 268, 1'b1, 1'b1);   // ~60 degrees, start held high
    for (int n = 0; n < 300; n++)
      rotate(155, 0, int'($urandom_range(0, 890)) - 445, 1'b1, n % 7 == 0);
    // arbitrary vectors, kept small enough not to overflow Q7.8 after gain
    for (int n = 0; n < 300; n++)
      rotate(int'($urandom_range(0, 6000)) - 3000, int'($urandom_range(0, 6000)) - 3000,
             int'($urandom_range(0, 890)) - 445, 1'b0, 1'b0);
    $display("mechanisms: d=+1 rotations %0d, d=-1 rotations %0d, ignored starts %0d",
             n_dpos, n_dneg, n_ignored);
    checks += 3;
    if (n_dpos == 0)    begin failures++; $display("FAIL no d=+1 rotation"); end
    if (n_dneg == 0)    begin failures++; $display("FAIL no d=-1 rotation"); end
    if (n_ignored == 0) begin failures++; $display("FAIL no start ignored while busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
