// cordic_shifter: arithmetic right shift by the current iteration number.
//
// For every possible shift amount k the result is formed directly as the slice
// din[WIDTH-1:k] with k copies of the sign bit concatenated in front of it; the
// shift amount then selects one of those candidates. This is the slice-and-
// concatenate shifter the design describes. A shift amount of WIDTH or more
// returns all sign bits. Purely combinational.
module cordic_shifter #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned SH_W  = 4    // width of the shift amount
) (
  input  logic [WIDTH-1:0] din,
  input  logic [SH_W-1:0]  shamt,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] cand [WIDTH];

  assign cand[0] = din;
  for (genvar k = 1; k < WIDTH; k++) begin : g_slice
    assign cand[k] = {{k{din[WIDTH-1]}}, din[WIDTH-1:k]};
  end

  always_comb begin
    if (int'(shamt) < int'(WIDTH)) dout = cand[shamt];
    else                           dout = {WIDTH{din[WIDTH-1]}};
  end
endmodule
