// cordic_reg: data path register of the CORDIC unit (x, y and z).
//
// A plain bank of D flip-flops with a load enable: q takes d on a rising clock
// edge when en is 1 and holds otherwise. The asynchronous active-low reset to
// zero is this design's choice. One clock of latency from d to q.
module cordic_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,  // asynchronous, active low
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
