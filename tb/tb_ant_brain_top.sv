// tb_ant_brain_top: end-to-end test of the ant at full size (128 x 128
// maze, every parameter at its default).
//
// Mazes are built in the testbench as a grid of solid wall cells, then
// converted to the cell-byte format (a cell flags a wall on each side whose
// neighbour is solid, bit 0 when it has none, bit 5 on exit cells) and
// written through the memory port. Two maze shapes are used:
//   * a random perfect maze of 42 x 42 rooms, rooms two cells wide with
//     one-cell-thick walls (pitch 3), the exit a two-cell gap in the north
//     border; all walls hang together, so the maze has no islands;
//   * an open room with only border walls and the same kind of exit gap.
// Each run preloads a start position and heading and lets the ant go. A
// reference ant kept by the testbench (state table written by state name,
// antennae worked out from the solid-cell grid with compass numbers)
// advances in lock step: after every sense clock the brain state, after
// every move clock the position and heading are compared, and the run must
// end with the done flag in exactly 2 * steps - 1 clocks after start. The
// reference ant must never enter a wall cell and must reach the exit.
//
// Mechanisms counted (each must occur at least once): every arc of the
// state table, forward steps in each compass direction, left and right
// turns, preloads, exits, and memory writes ignored during a run.
module tb_ant_brain_top;
  timeunit 1ns;
  timeprecision 1ps;
  import ant_pkg::*;

  localparam int unsigned CW   = 7;
  localparam int          N    = 1 << CW;     // 128
  localparam int          ROOMS = 42;          // rooms per side, pitch 3
  localparam int          MAX_STEPS = 200000;

  logic clk = 1'b0;
  logic rst;
  logic mem_we;
  logic [2*CW-1:0] mem_addr;
  cell_t mem_wdata, mem_rdata;
  logic start;
  logic [CW-1:0] start_x, start_y;
  heading_e start_heading;
  logic [CW-1:0] ant_x, ant_y;
  heading_e heading;
  brain_state_e brain_state;
  logic forward, turn_left, turn_right, ant_l, ant_r, running, done;

  int checks = 0, failures = 0;
  longint cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  ant_brain_top dut (.*);

  // ---------------------------------------------------------------- maze
  bit   solid [N][N];      // [x][y]
  bit   is_exit [N][N];
  cell_t image [N*N];

  // coverage counters
  int arc [4][4];          // [from][to]
  int moves [4];           // forward steps by compass number
  int n_tl = 0, n_tr = 0, n_preload = 0, n_exit = 0, n_ignored_write = 0;

  // Compass numbers: 0 N, 1 E, 2 S, 3 W (clockwise).
  function automatic int dx(int d);
    return (d == 1) ? 1 : (d == 3) ? -1 : 0;
  endfunction
  function automatic int dy(int d);
    return (d == 0) ? 1 : (d == 2) ? -1 : 0;
  endfunction
  function automatic heading_e onehot(int d);
    case (d)
      0: return HEAD_N;
      1: return HEAD_E;
      2: return HEAD_S;
      default: return HEAD_W;
    endcase
  endfunction

  function automatic bit blocked(int x, int y);
    if (x < 0 || y < 0 || x >= N || y >= N) return 1'b1;
    return solid[x][y];
  endfunction

  task automatic maze_open_room(int exit_x);
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        solid[x][y] = (x == 0) || (y == 0) || (x >= N - 2) || (y >= N - 2);
        is_exit[x][y] = 1'b0;
      end
    for (int i = 0; i < 2; i++) begin
      solid[exit_x + i][N - 2] = 1'b0;
      is_exit[exit_x + i][N - 2] = 1'b1;
    end
  endtask

  // Random perfect maze by depth-first search over the rooms.
  task automatic maze_perfect(int exit_room);
    bit visited [ROOMS][ROOMS];
    int stack_x [ROOMS*ROOMS];
    int stack_y [ROOMS*ROOMS];
    int sp;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        solid[x][y] = (x % 3 == 0) || (y % 3 == 0) || (x >= N - 2) || (y >= N - 2);
        is_exit[x][y] = 1'b0;
      end
    foreach (visited[i, j]) visited[i][j] = 1'b0;
    sp = 0;
    stack_x[0] = 0; stack_y[0] = 0; visited[0][0] = 1'b1;
    while (sp >= 0) begin
      int cx, cy, cand, pick, dsel;
      int opts [4];
      cx = stack_x[sp]; cy = stack_y[sp];
      cand = 0;
      for (int d = 0; d < 4; d++) begin
        int nx, ny;
        nx = cx + dx(d); ny = cy + dy(d);
        if (nx >= 0 && ny >= 0 && nx < ROOMS && ny < ROOMS && !visited[nx][ny]) begin
          opts[cand] = d; cand++;
        end
      end
      if (cand == 0) begin
        sp--;
      end else begin
        int nx, ny;
        pick = $urandom_range(0, cand - 1);
        dsel = opts[pick];
        nx = cx + dx(dsel); ny = cy + dy(dsel);
        // knock out the two wall cells between the rooms
        if (dx(dsel) != 0) begin
          int wx;
          wx = 3 * ((dx(dsel) > 0) ? nx : cx);
          solid[wx][3*cy + 1] = 1'b0; solid[wx][3*cy + 2] = 1'b0;
        end else begin
          int wy;
          wy = 3 * ((dy(dsel) > 0) ? ny : cy);
          solid[3*cx + 1][wy] = 1'b0; solid[3*cx + 2][wy] = 1'b0;
        end
        visited[nx][ny] = 1'b1;
        sp++; stack_x[sp] = nx; stack_y[sp] = ny;
      end
    end
    // exit: gap in the north border above room exit_room of the top row
    for (int i = 1; i <= 2; i++) begin
      solid[3*exit_room + i][N - 2] = 1'b0;
      is_exit[3*exit_room + i][N - 2] = 1'b1;
    end
  endtask

  // Convert the solid-cell grid to cell bytes and write them to the memory.
  task automatic load_maze();
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        cell_t c;
        c = '0;
        c[1] = blocked(x, y + 1);   // north
        c[2] = blocked(x - 1, y);   // west
        c[3] = blocked(x, y - 1);   // south
        c[4] = blocked(x + 1, y);   // east
        c[0] = (c[4:1] == 4'b0000);
        c[5] = is_exit[x][y];
        image[y*N + x] = c;
      end
    for (int a = 0; a < N*N; a++) begin
      mem_we = 1'b1; mem_addr = (2*CW)'(a); mem_wdata = image[a];
      @(posedge clk); #1;
    end
    mem_we = 1'b0;
    // read back a sample through the port
    for (int i = 0; i < 256; i++) begin
      int a;
      a = $urandom_range(0, N*N - 1);
      mem_addr = (2*CW)'(a); #1;
      checks++;
      if (mem_rdata !== image[a]) begin
        failures++;
        $display("FAIL maze read-back at %0d: %0h expected %0h", a, mem_rdata, image[a]);
      end
    end
  endtask

  // Reference state table.
  function automatic int ref_next(int s, bit l, bit r);
    case (s)
      0: return l ? 3 : (r ? 1 : 0);   // lost
      1: return l ? 3 : (r ? 1 : 2);   // right antenna
      2: return 0;                     // break in wall
      default: return l ? 3 : 1;       // left antenna
    endcase
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One run from (sx, sy) facing compass direction sd.
  task automatic run_ant(string name, int sx, int sy, int sd);
    int x, y, d, s, steps, ns;
    bit l, r, ended;
    longint t0;
    x = sx; y = sy; d = sd; s = 0; steps = 0; ended = 0;
    start_x = CW'(sx); start_y = CW'(sy); start_heading = onehot(sd);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    t0 = cycles;
    n_preload++;
    check("preload x", ant_x, sx);
    check("preload y", ant_y, sy);
    check("preload heading", heading, onehot(sd));
    check("preload state", brain_state, 0);
    while (!ended && steps < MAX_STEPS) begin
      // sense clock
      steps++;
      if (is_exit[x][y]) begin
        @(posedge clk); #1;
        check("done at exit", done, 1);
        check("stopped at exit", running, 0);
        check("state after exit", brain_state, 0);
        check("clocks to exit", cycles - t0, 2 * steps - 1);
        n_exit++;
        ended = 1;
      end else begin
        l = blocked(x + dx(d), y + dy(d)) || blocked(x + dx((d + 3) % 4), y + dy((d + 3) % 4));
        r = blocked(x + dx(d), y + dy(d)) || blocked(x + dx((d + 1) % 4), y + dy((d + 1) % 4));
        check("antenna L", ant_l, l);
        check("antenna R", ant_r, r);
        ns = ref_next(s, l, r);
        arc[s][ns]++;
        s = ns;
        if (steps == 3) begin
          // a write attempt while running must be ignored
          mem_we = 1'b1; mem_addr = {CW'(y), CW'(x)}; mem_wdata = 8'hFF;
        end
        @(posedge clk); #1;
        if (mem_we) begin
          mem_we = 1'b0;
          n_ignored_write++;
        end
        check("brain state", brain_state, s);
        check("running", running, 1);
        // move clock
        case (s)
          0, 1: begin
            x += dx(d); y += dy(d);
            moves[d]++;
            if (blocked(x, y)) begin
              failures++;
              $display("FAIL %s: reference ant walked into a wall at %0d,%0d", name, x, y);
              ended = 1;
            end
          end
          2: begin d = (d + 1) % 4; n_tr++; end
          default: begin d = (d + 3) % 4; n_tl++; end
        endcase
        check("outputs F/TL/TR", {forward, turn_left, turn_right},
              (s < 2) ? 3'b100 : (s == 2) ? 3'b001 : 3'b010);
        @(posedge clk); #1;
        check("x", ant_x, x);
        check("y", ant_y, y);
        check("heading", heading, onehot(d));
      end
    end
    if (!ended) begin
      failures++;
      $display("FAIL %s: no exit after %0d steps", name, steps);
    end
    $display("%s: start (%0d,%0d) heading %s, exit after %0d steps, %0d clocks",
             name, sx, sy, onehot(sd).name(), steps, cycles - t0);
    // the write attempted during the run must not have landed
    mem_addr = (2*CW)'(0); #1;
    for (int i = 0; i < N*N; i++) begin
      mem_addr = (2*CW)'(i); #1;
      if (mem_rdata !== image[i]) begin
        failures++;
        $display("FAIL %s: memory changed at %0d", name, i);
        break;
      end
    end
    checks++;
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (arc[i, j]) arc[i][j] = 0;
    foreach (moves[i]) moves[i] = 0;
    rst = 1'b1; mem_we = 1'b0; mem_addr = '0; mem_wdata = '0; start = 1'b0;
    start_x = '0; start_y = '0; start_heading = HEAD_N;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check("idle after reset", {running, done}, 0);

    // open room: lost walk, corner spin, wall following to the exit gap
    maze_open_room(60);
    load_maze();
    run_ant("open room, centre", 64, 40, 0);
    run_ant("open room, by west wall", 1, 30, 0);

    // random perfect mazes at full size
    maze_perfect(20);
    load_maze();
    run_ant("maze A, bottom-left room", 1, 1, 0);
    run_ant("maze A, middle room", 3*21 + 2, 3*21 + 1, 1);
    maze_perfect(5);
    load_maze();
    run_ant("maze B, right room", 3*40 + 1, 3*10 + 2, 2);

    $display("arcs S0->S0 %0d S0->S1 %0d S0->S3 %0d S1->S1 %0d S1->S2 %0d S1->S3 %0d",
             arc[0][0], arc[0][1], arc[0][3], arc[1][1], arc[1][2], arc[1][3]);
    $display("arcs S2->S0 %0d S3->S1 %0d S3->S3 %0d", arc[2][0], arc[3][1], arc[3][3]);
    $display("moves N %0d E %0d S %0d W %0d, turns left %0d right %0d",
             moves[0], moves[1], moves[2], moves[3], n_tl, n_tr);
    $display("preloads %0d exits %0d ignored writes %0d", n_preload, n_exit, n_ignored_write);
    // every mechanism must have happened
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        bit legal;
        legal = (i == 0 && j inside {0, 1, 3}) || (i == 1 && j inside {1, 2, 3}) ||
                (i == 2 && j == 0) || (i == 3 && j inside {1, 3});
        checks++;
        if (legal && arc[i][j] == 0) begin
          failures++; $display("FAIL arc S%0d->S%0d never taken", i, j);
        end
        if (!legal && arc[i][j] != 0) begin
          failures++; $display("FAIL arc S%0d->S%0d taken", i, j);
        end
      end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (moves[i] == 0) begin failures++; $display("FAIL no move in direction %0d", i); end
    end
    checks++;
    if (n_tl == 0 || n_tr == 0 || n_preload == 0 || n_exit == 0 || n_ignored_write == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
