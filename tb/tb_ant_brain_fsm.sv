// tb_ant_brain_fsm: exhaustive check of the ant brain against its state
// table.
//
// For every state, every antenna pair and both values of the exit input the
// brain is first driven into the state, then given one enabled clock; the
// new state and the Moore outputs are compared with a reference table
// written out state by state (not with the minimised equations). The test
// also checks that `en` low holds the state and that `clear` returns to S0.
module tb_ant_brain_fsm;
  timeunit 1ns;
  timeprecision 1ps;
  import ant_pkg::*;

  logic clk = 1'b0;
  logic rst, en, clear, ant_l, ant_r, at_exit;
  brain_state_e state;
  logic forward, turn_left, turn_right;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ant_brain_fsm dut (.*);

  // Reference state table: next state for state s and antennae l, r.
  function automatic brain_state_e ref_next(brain_state_e s, logic l, logic r, logic ex);
    if (ex) return S0_LOST;
    case (s)
      S0_LOST:       return l ? S3_LEFT_WALL : (r ? S1_RIGHT_WALL : S0_LOST);
      S1_RIGHT_WALL: return l ? S3_LEFT_WALL : (r ? S1_RIGHT_WALL : S2_BREAK);
      S2_BREAK:      return S0_LOST;
      default:       return l ? S3_LEFT_WALL : S1_RIGHT_WALL;
    endcase
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic check_outputs();
    check("F",  forward,    (state == S0_LOST) || (state == S1_RIGHT_WALL));
    check("TL", turn_left,  state == S3_LEFT_WALL);
    check("TR", turn_right, state == S2_BREAK);
  endtask

  task automatic step(logic l, logic r, logic ex);
    ant_l = l; ant_r = r; at_exit = ex; en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
  endtask

  // Drive the brain into state s from S0.
  task automatic goto_state(brain_state_e s);
    clear = 1'b1; @(posedge clk); #1; clear = 1'b0;
    case (s)
      S1_RIGHT_WALL: step(0, 1, 0);
      S2_BREAK:      begin step(0, 1, 0); step(0, 0, 0); end
      S3_LEFT_WALL:  step(1, 1, 0);
      default:       ;
    endcase
    check("reach state", state, s);
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; clear = 1'b0; ant_l = 0; ant_r = 0; at_exit = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check("reset state", state, S0_LOST);
    for (int si = 0; si < 4; si++) begin
      for (int v = 0; v < 8; v++) begin
        brain_state_e s, exp;
        s = brain_state_e'(si[1:0]);
        goto_state(s);
        check_outputs();
        exp = ref_next(s, v[1], v[0], v[2]);
        step(v[1], v[0], v[2]);
        check($sformatf("next of %s L=%0d R=%0d exit=%0d", s.name(), v[1], v[0], v[2]), state, exp);
        check_outputs();
      end
      // hold when not enabled
      goto_state(brain_state_e'(si[1:0]));
      ant_l = 1; ant_r = 0; at_exit = 0; en = 1'b0;
      repeat (3) @(posedge clk);
      #1 check("hold", state, si[1:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
