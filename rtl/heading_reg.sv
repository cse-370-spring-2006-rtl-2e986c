// heading_reg: the ant's heading, a 4-bit one-hot rotating shift register.
//
// N=0001, W=0010, S=0100, E=1000. A right turn rotates the register right
// (N -> E -> S -> W -> N), a left turn rotates it left (N -> W -> S -> E ->
// N). The encoding and the rotate directions follow the original design.
//
// Design choices of this implementation: synchronous active-high reset to
// north; a `load` input (highest priority) sets the heading when a run
// starts; a cycle with both turn inputs high leaves the heading unchanged
// (the brain never asks for both).
//
// Timing: the new heading is visible one clock after the turn request.
// An assertion checks that the register stays one-hot (given a one-hot
// load value).
module heading_reg
  import ant_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     load,
  input  heading_e load_heading,
  input  logic     turn_left,
  input  logic     turn_right,
  output heading_e heading
);

  always_ff @(posedge clk) begin
    if (rst) begin
      heading <= HEAD_N;
    end else if (load) begin
      heading <= load_heading;
    end else if (turn_right && !turn_left) begin
      heading <= heading_e'({heading[0], heading[3:1]});
    end else if (turn_left && !turn_right) begin
      heading <= heading_e'({heading[2:0], heading[3]});
    end
  end

  // The heading is always exactly one of the four compass codes.
  a_heading_onehot: assert property (@(posedge clk) disable iff (rst)
    !load |-> $onehot(heading))
    else $error("heading register is not one-hot: %b", heading);

endmodule
