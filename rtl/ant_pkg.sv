// ant_pkg: types and constants shared by the ant-brain design.
//
// The maze is a square grid of cells. Each cell is one byte of the maze
// memory, addressed by {Y, X}: X is the ant's column (grows to the east),
// Y its row (grows to the north). The cell byte flags the walls around the
// cell and whether it is an exit cell; the bit positions below are the ones
// of the maze format (bit 0 "no wall" is informational and never decoded).
//
// The heading is one-hot, N=0001, W=0010, S=0100, E=1000, so that a turn
// to the right is a rotate right of the four bits and a turn to the left a
// rotate left.
//
// The brain state encoding S0=00, S1=01, S2=10, S3=11 is the one the
// next-state equations were minimised for.
package ant_pkg;

  // Bit positions inside a maze cell byte.
  localparam int unsigned CELL_W      = 8;
  localparam int unsigned BIT_NO_WALL = 0;
  localparam int unsigned BIT_NORTH   = 1;
  localparam int unsigned BIT_WEST    = 2;
  localparam int unsigned BIT_SOUTH   = 3;
  localparam int unsigned BIT_EAST    = 4;
  localparam int unsigned BIT_EXIT    = 5;

  typedef logic [CELL_W-1:0] cell_t;

  // One-hot heading held in the rotating heading register.
  typedef enum logic [3:0] {
    HEAD_N = 4'b0001,
    HEAD_W = 4'b0010,
    HEAD_S = 4'b0100,
    HEAD_E = 4'b1000
  } heading_e;

  // Brain states with their minimised encoding {X, Y}.
  typedef enum logic [1:0] {
    S0_LOST       = 2'b00,  // lost: go forward
    S1_RIGHT_WALL = 2'b01,  // right antenna touching: go forward
    S2_BREAK      = 2'b10,  // break in wall: turn right
    S3_LEFT_WALL  = 2'b11   // left antenna touching: turn left
  } brain_state_e;

endpackage
