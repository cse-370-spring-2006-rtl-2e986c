# Ant brain: a wall-following maze walker in SystemVerilog

An electronic ant stands somewhere in a 128 × 128 grid maze and has to find
the way out. It cannot see the maze. It has two antennae that tell it whether
it is touching a wall on the left, on the right, or (both at once) straight
ahead, and three actions: step forward one cell, turn left 90°, turn right
90°. Its strategy is the classic right-hand rule: keep the wall on your
right. In a maze with no islands (every wall connected to the outer border)
this walks the ant along the border of its connected wall until it
reaches an exit in that border.

The interesting part is how little hardware the brain needs: a four-state
Moore machine with two flip-flops, three sum-of-products next-state and
output equations, and a handful of gates that turn the maze memory and the
ant's heading into the two antenna signals. Everything else is plain
datapath: two 7-bit up/down counters for the position, a 4-bit rotating
register for the heading, and the maze memory.

## Block diagram

```
                 +-----------------+   cell byte   +----------------+  L, R
 {Y,X} --------->|   maze_sram     |-------------->| antennae_logic |-------+
   ^             | 16384 x 8 bits  |    exit bit   +----------------+       |
   |             +-----------------+------+              ^ N W S E          v
   |                                      |              |           +---------------+
 +-----------+  Forward,East,West,Preload |        +-------------+    | ant_brain_fsm |
 | X counter |<---------------------------+--------| heading_reg |<---|  F  TL  TR    |
 +-----------+                            |        +-------------+    +---------------+
 +-----------+  Forward,North,South,Preload            ^ TL, TR            ^ en (sense)
 | Y counter |<---------------------------+            | (move)            |
 +-----------+                            |     +-----------------------------+
                                          +---->|        ant_step_ctrl        |
                                                | IDLE -> SENSE <-> MOVE -> DONE
                                                +-----------------------------+
```

| Module | File | What it is |
|---|---|---|
| `ant_brain_top` | `rtl/ant_brain_top.sv` | the whole ant, top level |
| `ant_brain_fsm` | `rtl/ant_brain_fsm.sv` | the brain, 4-state Moore FSM |
| `antennae_logic` | `rtl/antennae_logic.sv` | cell walls + heading → L, R |
| `heading_reg` | `rtl/heading_reg.sv` | one-hot rotating heading |
| `pos_counter` | `rtl/pos_counter.sv` | 7-bit up/down counter with preload, used for X and Y |
| `maze_sram` | `rtl/maze_sram.sv` | maze memory, one byte per cell |
| `ant_step_ctrl` | `rtl/ant_step_ctrl.sv` | step sequencer, start and exit handling |
| `ant_pkg` | `rtl/ant_pkg.sv` | shared types: heading, brain state, cell bit positions |

## The maze in memory

The maze is 128 × 128 cells. X is the column and grows to the east, Y is the
row and grows to the north; (0,0) is the south-west corner. Cell (X, Y) is
the byte at address `{Y, X}` (14 bits, Y in the upper seven).

| Bit | Value | Meaning |
|---|---|---|
| 0 | `00000001` | no wall around this cell (informational, not decoded) |
| 1 | `00000010` | north wall |
| 2 | `00000100` | west wall |
| 3 | `00001000` | south wall |
| 4 | `00010000` | east wall |
| 5 | `00100000` | exit cell |

A cell can have several walls. A wall between two cells should be
flagged in both of them. Bits 6 and 7 are unused.

## The antennae

The ant stands in one cell and faces one of four directions. The heading is
one-hot: N = `0001`, W = `0010`, S = `0100`, E = `1000`. An antenna touches
when there is a wall straight ahead or a wall on its own side:

```
R = NW·(N+W) + WW·(W+S) + SW·(S+E) + EW·(E+N)
L = NW·(N+E) + WW·(W+N) + SW·(S+W) + EW·(E+S)
```

(NW, WW, SW, EW are the cell's wall bits; N, W, S, E the heading bits.)
Facing north, for example, R is the north or the east wall and L the north
or the west wall. So `L'R'` means no wall, `L'R` a wall on the right, `LR'` a
wall on the left and `LR` a wall in front. This takes four 2-input ORs,
eight 2-input ANDs and two 4-input ORs.

The one-hot code is chosen so that turning is a rotation: a right turn
(N → E → S → W) rotates the register right, a left turn rotates it left.

## The brain

| State | Code {X,Y} | Meaning | Output |
|---|---|---|---|
| S0 | 00 | lost | forward (F) |
| S1 | 01 | right antenna touching, following the wall | forward (F) |
| S2 | 10 | break in the wall | turn right (TR) |
| S3 | 11 | left antenna touching | turn left (TL) |

| State | L R = 00 | 01 | 10 | 11 |
|---|---|---|---|---|
| S0 | S0 | S1 | S3 | S3 |
| S1 | S2 | S1 | S3 | S3 |
| S2 | S0 | S0 | S0 | S0 |
| S3 | S1 | S1 | S3 | S3 |

An exit cell sends the brain back to S0 whatever the antennae say. In words:
a lost ant walks straight on. When the right antenna touches, it follows the
wall. When the wall on its right ends, it turns right and walks on (lost
again until it feels the wall). Anything on the left, or a wall ahead, makes
it turn left until the left antenna is free. With the encoding above the
logic reduces to:

```
X+ = L·Y + L·X' + X'·Y·R'      F  = X'
Y+ = X·Y + X'·R + X'·L         TL = X·Y
                               TR = X·Y'
```

`ant_brain_fsm` implements exactly these equations on two D flip-flops. The
table is what its testbench checks against.

## One step takes two clocks: sense, then move

This is the point that needs the most care. The brain is a Moore machine, so
its action depends only on its state. If the position, heading and brain
state were all updated on the same clock edge, the brain would choose its
next state from the cell the ant stood in *before* the current action.
For example, a lost ant (S0, forward) facing a wall would still step
forward through it on the edge that takes it to S3.

`ant_step_ctrl` therefore splits every ant step into two clocks:

1. **SENSE**: the maze memory is read at `{Y, X}` (asynchronous read). The
   antennae are decoded and the brain loads its next state (`sense_en`). If
   the cell is an exit cell, the run ends here.
2. **MOVE**: the brain's output for its new state is applied. On F the X
   or Y counter steps according to the heading. On TL or TR the heading
   register rotates (`move_en`).

So the brain always decides from what the antennae feel after the previous
action. One brain state therefore lasts two clocks. A run of *n* sense
phases, the last one on the exit cell, takes exactly 2n − 1 clocks from the
`start` edge to `done`.

Why the actions are safe: S0 and S1 step forward. The brain reaches them only
when the last sensing showed no wall ahead. The one exception is S2 → S0,
which needs no sensing: S2 is entered when the right side was clear, and
after the right turn that clear side is straight ahead.

## Start and exit

After reset the ant is idle. `start` (one clock, in idle or after a finished
run) loads `start_x`, `start_y` and `start_heading` into the counters and the
heading register and puts the brain in S0. The first sense phase follows
on the next clock. When the ant steps into a cell with the exit bit, the next
sense phase raises `done`, drops `running`, returns the brain to S0 and stops
the ant. `start` while running is ignored.

## Using the top level

`ant_brain_top #(COORD_W = 7)`: `COORD_W` is the width of X and Y. The maze
is 2^COORD_W × 2^COORD_W cells. All registers use a synchronous,
active-high `rst`.

| Port | Dir | Width | Use |
|---|---|---|---|
| `mem_we`, `mem_addr`, `mem_wdata` | in | 1, 14, 8 | write maze cells while idle; writes during a run are ignored |
| `mem_rdata` | out | 8 | cell at `mem_addr` when idle, at the ant when running |
| `start`, `start_x`, `start_y`, `start_heading` | in | 1, 7, 7, 4 | begin a run |
| `ant_x`, `ant_y`, `heading` | out | 7, 7, 4 | where the ant is and where it faces |
| `brain_state`, `forward`, `turn_left`, `turn_right` | out | 2, 1, 1, 1 | brain state and outputs |
| `ant_l`, `ant_r` | out | 1, 1 | antennae at the current cell and heading |
| `running`, `done` | out | 1, 1 | run in progress; exit reached |

Load all 16384 cells (one per clock), then pulse `start` and wait for
`done`.

### Simulating

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, from the folder that holds
`rtl/` and `tb/`:

```
verilator --binary --timing -y rtl rtl/ant_pkg.sv tb/tb_ant_brain_top.sv --top-module tb_ant_brain_top
./obj_dir/Vtb_ant_brain_top
```

Substitute any of `tb_ant_brain_fsm`, `tb_antennae_logic`,
`tb_heading_reg`, `tb_pos_counter`, `tb_maze_sram`, `tb_ant_step_ctrl`. All
run in well under a second.

## How it was verified

* `tb_ant_brain_fsm`: every state × L × R × exit combination, plus the
  outputs, hold with `en` low, and `clear`. The check is against the state
  table above, not the equations.
* `tb_antennae_logic`: all 64 flag combinations × 4 headings, against a
  model that works with compass numbers (front, front+1 = right,
  front−1 = left).
* `tb_heading_reg`, `tb_pos_counter`: random turns, loads, steps and wraps
  against integer models.
* `tb_maze_sram`: full 16384-word fill and read-back, then random overwrites.
* `tb_ant_step_ctrl`: the IDLE/SENSE/MOVE/DONE sequence, ignored starts,
  restart from done.
* `tb_ant_brain_top`: end to end at full size (all parameters at their
  defaults). The testbench builds mazes as grids of solid wall cells,
  converts them to the byte format and loads them through the memory port:
  an open room and two random "perfect" mazes of 42 × 42 rooms. The rooms are
  two cells wide, the walls one cell thick, and the exit is a two-cell gap
  in the north border. A reference ant in the testbench has its own state
  table and derives its antennae from the solid-cell grid. It runs in lock
  step with the hardware and is compared after every sense and every move.
  The test also checks the 2n − 1 clock count, that the reference ant never
  enters a wall, and that each run reaches the exit (up to about 9300 steps
  in a random maze). It counts every legal arc of the state table, forward
  steps in all four directions, both turns, preloads, exits and
  ignored writes, and fails if any of them never happens.

## Limits of the strategy, and what the maze must look like

The hardware does exactly what the state table says. The right-hand rule
built from it only works in mazes with these properties, and the testbench
mazes are built to have them:

* **No islands.** A wall not connected to the border can trap the ant in a
  loop.
* **Corridors at least two cells wide.** A cell with walls on both its left
  and its right gives `LR`, the same as a wall in front, so the ant would
  turn instead of walking through a one-cell corridor.
* **Walls at least one cell thick, as solid cells.** After the turn at a
  break in the wall (S2 → S0), the ant expects to feel the wall again on its
  right after one step. A wall drawn only as a flag on cell edges that ends
  in a thin tip gives nothing to feel, and the ant walks off lost.

## Design choices and departures

Things the source design leaves open, and the choices made here:

* The sense/move split, the step controller, the `start` preload of the
  heading, and the memory-port sharing are this implementation's own. The
  source names a memory controller, start-up handling and a done flag, but
  gives no details.
* The maze memory is an array with asynchronous read and synchronous write.
  The source only calls it an SRAM.
* Reset is synchronous and active high on every register. The brain resets
  to S0 and the heading to north.
* Counters wrap modulo 128. The border walls keep the ant off the edges.
* The state diagram labels the S3 → S1 arc with "R". The state table
  (and the equations) take S3 to S1 whenever L = 0, whatever R is. This
  design follows the table.
* The cell format lists the west wall as bit 2 and the east wall as bit 4.
  An accompanying example (`00001100` = "south and east") does not agree
  with that list. This design follows the list.

Not built:

* **Crumbs.** In an extended version, the ant eats a crumb in each cell it
  visits, writes the crumbs back to the maze memory and shows them on a
  monitor. There is no crumb encoding, write-back protocol or display
  interface to build that from.
