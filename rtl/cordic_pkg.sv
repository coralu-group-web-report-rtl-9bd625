// cordic_pkg: shared number format and types of the CORDIC rotation unit.
//
// The data path carries 16-bit two's-complement fixed-point words with one
// sign bit, seven integer bits and eight fraction bits (Q7.8), as the design
// specifies. Angles in z use the same format and are in radians, so 1.0 rad is
// 256. The number of iterations is this design's own choice: nine, because the
// elementary angle atan(2^-i) rounds to zero in Q7.8 from i = 9 on, so further
// iterations would rotate x and y without being accounted for in z.
package cordic_pkg;
  localparam int unsigned WIDTH      = 16;  // data path width
  localparam int unsigned FRAC       = 8;   // fraction bits
  localparam int unsigned ITERATIONS = 9;   // elementary rotations per operation
  localparam int unsigned ITER_W     = 4;   // width of the iteration counter

  typedef logic signed [WIDTH-1:0] word_t;
  typedef logic [ITER_W-1:0]       iter_t;

  // States of the sequencing state machine.
  typedef enum logic [1:0] {
    S_IDLE = 2'd0,  // waiting for start
    S_RUN  = 2'd1,  // one elementary rotation per clock
    S_DONE = 2'd2   // result valid for one cycle
  } state_t;
endpackage
