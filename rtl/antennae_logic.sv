// antennae_logic: turns the maze cell the ant stands in, and the ant's
// heading, into the two antenna signals of the brain.
//
// An antenna touches when there is a wall straight ahead or a wall on its
// own side of the ant. With NW, WW, SW, EW the north/west/south/east wall
// bits of the cell and N, W, S, E the one-hot heading:
//   R = NW(N+W) + WW(W+S) + SW(S+E) + EW(E+N)
//   L = NW(N+E) + WW(W+N) + SW(S+W) + EW(E+S)
// so both antennae touch for a wall in front, only R for a wall on the
// right and only L for a wall on the left. The equations (four 2-input
// ORs, eight 2-input ANDs and two 4-input ORs) and the cell bit positions
// follow the original design.
//
// Purely combinational; no clock.
module antennae_logic
  import ant_pkg::*;
(
  input  cell_t    maze_cell,     // maze cell byte at the ant's position
  input  heading_e heading,  // one-hot heading
  output logic     ant_l,
  output logic     ant_r
);

  logic nw, ww, sw, ew;
  logic hn, hw, hs, he;

  assign nw = maze_cell[BIT_NORTH];
  assign ww = maze_cell[BIT_WEST];
  assign sw = maze_cell[BIT_SOUTH];
  assign ew = maze_cell[BIT_EAST];

  assign {he, hs, hw, hn} = heading;

  assign ant_r = (nw & (hn | hw)) | (ww & (hw | hs)) | (sw & (hs | he)) | (ew & (he | hn));
  assign ant_l = (nw & (hn | he)) | (ww & (hw | hn)) | (sw & (hs | hw)) | (ew & (he | hs));

endmodule
