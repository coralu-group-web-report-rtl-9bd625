// cordic_addsub: two's-complement adder/subtractor of the CORDIC data path.
//
// s = a + b when add is 1, s = a - b when add is 0. The result wraps modulo
// 2^WIDTH; no overflow flag is produced, because the data path is sized so that
// a rotation in the convergence range cannot overflow. The unit is purely
// combinational. The data path uses three of them: for x, for y and for the
// angle accumulator z. Subtraction is done as a + ~b + 1 so that a single adder
// with an inverting input does both operations, as an FPGA add/sub primitive
// does; that structure is this design's choice.
module cordic_addsub #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             add,   // 1: a + b, 0: a - b
  output logic [WIDTH-1:0] s
);
  logic [WIDTH-1:0] b_op;
  logic             cin;

  always_comb begin
    b_op = add ? b : ~b;
    cin  = ~add;
    s    = a + b_op + WIDTH'(cin);
  end
endmodule
