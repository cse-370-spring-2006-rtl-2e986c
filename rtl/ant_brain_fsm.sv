// ant_brain_fsm: the ant's brain, a four-state Moore machine that keeps the
// wall on the ant's right.
//
// States (encoding {X, Y}):
//   S0 (00) lost               -> go forward
//   S1 (01) right antenna only -> go forward
//   S2 (10) break in the wall  -> turn right
//   S3 (11) left antenna       -> turn left
// The next-state logic is the minimised sum of products for this encoding,
//   X+ = L.Y + L.X' + X'.Y.R'     Y+ = X.Y + X'.R + X'.L
// and the outputs are F = X', TL = X.Y, TR = X.Y'. These equations, the
// state table behind them and the encoding follow the original design.
// When the exit input is 1 the machine returns to S0, its reset state.
//
// Design choices of this implementation: the state register is two D
// flip-flops with a synchronous active-high reset to S0; it only loads
// when `en` is high (the step controller raises it once per ant step, in
// the sense phase, after the previous move has taken effect); `clear`
// forces S0 when a new run starts.
//
// Timing: outputs depend on the state register only (Moore) and are valid
// the whole time the machine sits in a state.
module ant_brain_fsm
  import ant_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         en,          // load the next state this cycle
  input  logic         clear,       // synchronous return to S0
  input  logic         ant_l,       // left antenna touching a wall
  input  logic         ant_r,       // right antenna touching a wall
  input  logic         at_exit,     // current cell is an exit cell
  output brain_state_e state,
  output logic         forward,     // F
  output logic         turn_left,   // TL
  output logic         turn_right   // TR
);

  logic sx, sy;      // state bits, X and Y of the minimised equations
  logic nx, ny;

  assign {sx, sy} = state;

  always_comb begin
    nx = (ant_l & sy) | (ant_l & ~sx) | (~sx & sy & ~ant_r);
    ny = (sx & sy) | (~sx & ant_r) | (~sx & ant_l);
    if (at_exit) begin
      {nx, ny} = S0_LOST;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      state <= S0_LOST;
    end else if (en) begin
      state <= brain_state_e'({nx, ny});
    end
  end

  assign forward    = ~sx;
  assign turn_left  = sx & sy;
  assign turn_right = sx & ~sy;

endmodule
