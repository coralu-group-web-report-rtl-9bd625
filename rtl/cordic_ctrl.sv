// cordic_ctrl: sequencing state machine of the iterative CORDIC unit.
//
// In S_IDLE a start request asserts load for one cycle, which copies the
// operands into the x, y and z registers, and the counter is cleared. In S_RUN
// the state machine asserts run every cycle and increments the iteration
// counter iter; iter gives both the shift amount of the x and y shifters and
// the address of the angle table. After ITERATIONS cycles of S_RUN it enters
// S_DONE for one cycle, asserting done, and returns to S_IDLE. A start while
// busy is ignored.
//
// Timing: start sampled high in S_IDLE at edge 0; iterations at edges
// 1..ITERATIONS; done is high during the cycle after edge ITERATIONS, i.e. the
// result is valid ITERATIONS + 1 clocks after start. The counter and the
// one-rotation-per-clock schedule follow the design; the state encoding, the
// done pulse and the start handshake are this design's choices.
module cordic_ctrl
  import cordic_pkg::*;
#(
  parameter int unsigned NITER = ITERATIONS
) (
  input  logic  clk,
  input  logic  rst_n,   // asynchronous, active low
  input  logic  start,   // request an operation (sampled in S_IDLE)
  output logic  load,    // load operand registers this cycle
  output logic  run,     // perform one elementary rotation this cycle
  output iter_t iter,    // current iteration number i
  output logic  busy,    // an operation is in progress
  output logic  done     // result valid (one-cycle pulse)
);
  state_t state_q, state_d;
  iter_t  iter_q,  iter_d;

  always_comb begin
    state_d = state_q;
    iter_d  = iter_q;
    unique case (state_q)
      S_IDLE: if (start) begin
        state_d = S_RUN;
        iter_d  = '0;
      end
      S_RUN: begin
        if (int'(iter_q) == int'(NITER) - 1) state_d = S_DONE;
        else                                 iter_d  = iter_q + 1'b1;
      end
      S_DONE:  state_d = S_IDLE;
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      iter_q  <= '0;
    end else begin
      state_q <= state_d;
      iter_q  <= iter_d;
    end
  end

  assign load = (state_q == S_IDLE) && start;
  assign run  = (state_q == S_RUN);
  assign iter = iter_q;
  assign busy = (state_q == S_RUN);
  assign done = (state_q == S_DONE);

  initial assert (NITER >= 1 && NITER <= (1 << ITER_W))
    else $error("cordic_ctrl: NITER out of range");
endmodule
