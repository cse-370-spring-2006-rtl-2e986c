// ant_step_ctrl: sequencer that paces the ant, handles its start and stops
// it at the exit.
//
// One ant step takes two clocks:
//   SENSE  the maze cell at the ant's position is read, the antennae are
//          decoded and the brain loads its next state (sense_en = 1);
//          if the cell is an exit cell the run ends (DONE)
//   MOVE   the brain's output (forward, turn left or turn right) is
//          applied to the position counters and the heading (move_en = 1)
// so the brain always chooses its next state from what the antennae feel
// after the previous move. A run starts with `start` in IDLE or DONE: the
// controller pulses `preload` (counters, heading and brain are set to the
// start position, start heading and S0) and begins with a SENSE.
//
// The original design names a controller for the memory, the start and the
// exit and a done flag, but gives no details; this sequencing is a choice
// of this implementation. Synchronous active-high reset to IDLE.
module ant_step_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic start,      // begin a run (ignored while running)
  input  logic at_exit,    // current cell is an exit cell
  output logic preload,    // load start position/heading, clear the brain
  output logic sense_en,   // brain state register load enable
  output logic move_en,    // position/heading update enable
  output logic running,
  output logic done        // done flag: the ant has reached an exit
);

  typedef enum logic [1:0] {IDLE, SENSE, MOVE, DONE} phase_e;

  phase_e phase, phase_next;

  always_comb begin
    phase_next = phase;
    unique case (phase)
      IDLE, DONE: if (start) phase_next = SENSE;
      SENSE:      phase_next = at_exit ? DONE : MOVE;
      MOVE:       phase_next = SENSE;
      default:    phase_next = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= IDLE;
    end else begin
      phase <= phase_next;
    end
  end

  assign preload  = (phase == IDLE || phase == DONE) && start;
  assign sense_en = (phase == SENSE);
  assign move_en  = (phase == MOVE);
  assign running  = (phase == SENSE) || (phase == MOVE);
  assign done     = (phase == DONE);

  // Sense and move never share a clock, and a move always follows a sense.
  a_phase_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(sense_en && move_en));
  a_move_after_sense: assert property (@(posedge clk) disable iff (rst)
    move_en |-> $past(sense_en));

endmodule
