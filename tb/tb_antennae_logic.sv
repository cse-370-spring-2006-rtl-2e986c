// tb_antennae_logic: exhaustive check of the antenna decoder.
//
// All 64 combinations of the six flag bits that matter (four walls, exit,
// no-wall) times the four headings. The reference works with compass
// directions as numbers 0..3 clockwise from north: an antenna touches when
// the wall straight ahead, or the wall on its own side, is present.
module tb_antennae_logic;
  timeunit 1ns;
  timeprecision 1ps;
  import ant_pkg::*;

  cell_t    maze_cell;
  heading_e heading;
  logic     ant_l, ant_r;
  int checks = 0, failures = 0;

  antennae_logic dut (.*);

  // Wall bit of the cell for compass direction d (0 N, 1 E, 2 S, 3 W).
  function automatic logic wall(cell_t c, int d);
    case (d % 4)
      0: return c[1];
      1: return c[4];
      2: return c[3];
      default: return c[2];
    endcase
  endfunction

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    heading_e hs [4] = '{HEAD_N, HEAD_E, HEAD_S, HEAD_W};
    for (int d = 0; d < 4; d++) begin
      for (int c = 0; c < 64; c++) begin
        logic exp_l, exp_r;
        maze_cell = cell_t'(c);
        heading = hs[d];
        exp_r = wall(maze_cell, d) | wall(maze_cell, d + 1);
        exp_l = wall(maze_cell, d) | wall(maze_cell, d + 3);
        #1;
        checks += 2;
        if (ant_l !== exp_l || ant_r !== exp_r) begin
          failures++;
          $display("FAIL heading %s cell %08b: L=%0d R=%0d expected L=%0d R=%0d",
                   heading.name(), maze_cell, ant_l, ant_r, exp_l, exp_r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
