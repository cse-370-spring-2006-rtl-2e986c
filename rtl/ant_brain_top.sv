// ant_brain_top: an electronic ant that finds its way out of a grid maze by
// keeping the wall on its right.
//
// Datapath and control as in the original partition:
//   maze_sram       128 x 128 cells, one byte each, addressed by {Y, X}
//   antennae_logic  cell walls + heading -> left/right antenna
//   ant_brain_fsm   four-state Moore brain -> forward / turn left / right
//   heading_reg     one-hot heading, rotated by the turns
//   pos_counter x2  X (east/west) and Y (north/south), stepped by forward
//   ant_step_ctrl   two-clock step (sense, then move), start and exit
// The X counter counts up on forward while heading east and down while
// heading west; the Y counter up while heading north and down while heading
// south. These connections follow the original design; the step controller
// and the memory port sharing are choices of this implementation.
//
// Interface:
//   mem_*   maze load/read-back port, served only while the ant is not
//           running (writes are ignored during a run); mem_rdata shows the
//           cell at mem_addr when idle, at the ant's position when running
//   start   begins a run from (start_x, start_y) facing start_heading
//   done    the ant has stepped into an exit cell and stopped
// Timing: one ant step (one brain state) takes two clocks after `start`.
// Synchronous active-high reset.
module ant_brain_top
  import ant_pkg::*;
#(
  parameter int unsigned COORD_W = 7
) (
  input  logic                 clk,
  input  logic                 rst,
  // maze memory port
  input  logic                 mem_we,
  input  logic [2*COORD_W-1:0] mem_addr,
  input  cell_t                mem_wdata,
  output cell_t                mem_rdata,
  // run control
  input  logic                 start,
  input  logic [COORD_W-1:0]   start_x,
  input  logic [COORD_W-1:0]   start_y,
  input  heading_e             start_heading,
  // ant status
  output logic [COORD_W-1:0]   ant_x,
  output logic [COORD_W-1:0]   ant_y,
  output heading_e             heading,
  output brain_state_e         brain_state,
  output logic                 forward,
  output logic                 turn_left,
  output logic                 turn_right,
  output logic                 ant_l,
  output logic                 ant_r,
  output logic                 running,
  output logic                 done
);

  logic                 preload, sense_en, move_en, at_exit;
  logic [2*COORD_W-1:0] sram_addr;
  cell_t                maze_cell;

  // Memory: the ant owns the address while it runs.
  assign sram_addr = running ? {ant_y, ant_x} : mem_addr;

  maze_sram #(
    .ADDR_W(2 * COORD_W),
    .DATA_W(CELL_W)
  ) u_sram (
    .clk  (clk),
    .we   (mem_we && !running),
    .addr (sram_addr),
    .wdata(mem_wdata),
    .rdata(maze_cell)
  );

  assign mem_rdata = maze_cell;
  assign at_exit   = maze_cell[BIT_EXIT];

  antennae_logic u_antennae (
    .maze_cell   (maze_cell),
    .heading(heading),
    .ant_l  (ant_l),
    .ant_r  (ant_r)
  );

  ant_step_ctrl u_ctrl (
    .clk     (clk),
    .rst     (rst),
    .start   (start),
    .at_exit (at_exit),
    .preload (preload),
    .sense_en(sense_en),
    .move_en (move_en),
    .running (running),
    .done    (done)
  );

  ant_brain_fsm u_brain (
    .clk       (clk),
    .rst       (rst),
    .en        (sense_en),
    .clear     (preload),
    .ant_l     (ant_l),
    .ant_r     (ant_r),
    .at_exit   (at_exit),
    .state     (brain_state),
    .forward   (forward),
    .turn_left (turn_left),
    .turn_right(turn_right)
  );

  heading_reg u_heading (
    .clk         (clk),
    .rst         (rst),
    .load        (preload),
    .load_heading(start_heading),
    .turn_left   (turn_left && move_en),
    .turn_right  (turn_right && move_en),
    .heading     (heading)
  );

  pos_counter #(.WIDTH(COORD_W)) u_x (
    .clk          (clk),
    .rst          (rst),
    .preload      (preload),
    .preload_value(start_x),
    .step         (forward && move_en),
    .up           (heading == HEAD_E),
    .down         (heading == HEAD_W),
    .count        (ant_x)
  );

  pos_counter #(.WIDTH(COORD_W)) u_y (
    .clk          (clk),
    .rst          (rst),
    .preload      (preload),
    .preload_value(start_y),
    .step         (forward && move_en),
    .up           (heading == HEAD_N),
    .down         (heading == HEAD_S),
    .count        (ant_y)
  );

endmodule
