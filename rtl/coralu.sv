// coralu: bit-parallel iterative CORDIC unit, rotation mode, circular system.
//
// Rotates the vector (x_in, y_in) by the angle z_in (radians) using only
// shifts and additions. Each clock performs one elementary rotation i:
//   d = -1 if z < 0 else +1
//   x <- x - d * (y >>> i)
//   y <- y + d * (x >>> i)
//   z <- z - d * atan(2^-i)
// for i = 0 .. ITERATIONS-1, with all three updates computed from the old
// register values. Three adder/subtractors, two shifters, a constant angle
// table and three registers form the data path; a counter state machine
// supplies i. All words are 16-bit Q7.8 two's complement.
//
// The result carries the CORDIC gain K = prod sqrt(1 + 2^-2i), about 1.6468
// for nine iterations; the unit does not remove it. To get cos and sin of z_in
// directly, start from x_in = 1/K (155 in Q7.8) and y_in = 0. The rotation
// converges for |z_in| up to the sum of the elementary angles, about
// 1.739 rad (99.7 degrees); z_out is then the residual angle, close to zero.
//
// Interface: pulse start (or hold it) while idle; busy is high during the
// iterations; done is high for one cycle, ITERATIONS + 1 clocks after start
// was taken, while x_out, y_out and z_out hold the result. The outputs keep
// the result until the next start. The shift-add data path, word format and
// one-iteration-per-clock structure follow the design; the iteration count,
// handshake and reset are this design's choices.
module coralu
  import cordic_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,   // asynchronous, active low
  input  logic  start,
  input  word_t x_in,
  input  word_t y_in,
  input  word_t z_in,    // rotation angle, Q7.8 radians
  output logic  busy,
  output logic  done,
  output word_t x_out,
  output word_t y_out,
  output word_t z_out
);
  logic  load, run, en;
  iter_t iter;
  word_t x_q, y_q, z_q;
  word_t x_sh, y_sh, atan_i;
  word_t x_nx, y_nx, z_nx;
  word_t x_d, y_d, z_d;
  logic  z_neg;   // d = -1

  cordic_ctrl u_ctrl (
    .clk, .rst_n, .start, .load, .run, .iter, .busy, .done
  );

  cordic_shifter #(.WIDTH(WIDTH), .SH_W(ITER_W)) u_shx (.din(x_q), .shamt(iter), .dout(x_sh));
  cordic_shifter #(.WIDTH(WIDTH), .SH_W(ITER_W)) u_shy (.din(y_q), .shamt(iter), .dout(y_sh));
  cordic_atan_rom u_rom (.addr(iter), .angle(atan_i));

  assign z_neg = z_q[WIDTH-1];

  // d = +1: x - y', y + x', z - atan ; d = -1: x + y', y - x', z + atan
  cordic_addsub #(.WIDTH(WIDTH)) u_addx (.a(x_q), .b(y_sh),   .add(z_neg),  .s(x_nx));
  cordic_addsub #(.WIDTH(WIDTH)) u_addy (.a(y_q), .b(x_sh),   .add(!z_neg), .s(y_nx));
  cordic_addsub #(.WIDTH(WIDTH)) u_addz (.a(z_q), .b(atan_i), .add(z_neg),  .s(z_nx));

  assign en  = load | run;
  assign x_d = load ? x_in : x_nx;
  assign y_d = load ? y_in : y_nx;
  assign z_d = load ? z_in : z_nx;

  cordic_reg #(.WIDTH(WIDTH)) u_regx (.clk, .rst_n, .en, .d(x_d), .q(x_q));
  cordic_reg #(.WIDTH(WIDTH)) u_regy (.clk, .rst_n, .en, .d(y_d), .q(y_q));
  cordic_reg #(.WIDTH(WIDTH)) u_regz (.clk, .rst_n, .en, .d(z_d), .q(z_q));

  assign x_out = x_q;
  assign y_out = y_q;
  assign z_out = z_q;
endmodule
