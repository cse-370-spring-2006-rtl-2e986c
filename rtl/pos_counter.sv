// pos_counter: one coordinate of the ant's position, an up/down counter
// with preload.
//
// The design uses two of them, X (up = east, down = west) and Y (up =
// north, down = south). The counter moves only on a forward step: it
// counts up when `step` and `up` are both high, down when `step` and
// `down` are both high, and loads `preload_value` when `preload` is high.
// The 7-bit width, the preload, increment and decrement functions and the
// forward/direction inputs follow the original design.
//
// Design choices of this implementation: synchronous active-high reset to
// 0; preload has priority; `up` and `down` both high leave the count
// unchanged; the count wraps modulo 2^WIDTH (the maze border walls keep
// the ant from reaching the edge).
//
// Timing: the new count is visible one clock after the request.
module pos_counter #(
  parameter int unsigned WIDTH = 7
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             preload,
  input  logic [WIDTH-1:0] preload_value,
  input  logic             step,
  input  logic             up,
  input  logic             down,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
    end else if (preload) begin
      count <= preload_value;
    end else if (step && up && !down) begin
      count <= count + 1'b1;
    end else if (step && down && !up) begin
      count <= count - 1'b1;
    end
  end

endmodule
