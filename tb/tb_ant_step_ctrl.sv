// tb_ant_step_ctrl: checks the step sequence of the controller.
//
// After reset the controller must idle; `start` must pulse preload for one
// cycle and then alternate sense and move phases, one clock each; an exit
// seen in a sense phase must end the run with the done flag, and a new
// start from done must begin a new run. Starts while running are ignored.
module tb_ant_step_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0;
  logic rst, start, at_exit;
  logic preload, sense_en, move_en, running, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ant_step_ctrl dut (.*);

  task automatic expect_out(string what, logic p, logic s, logic m, logic r, logic d);
    checks++;
    if ({preload, sense_en, move_en, running, done} !== {p, s, m, r, d}) begin
      failures++;
      $display("FAIL %s: pre=%0d sense=%0d move=%0d run=%0d done=%0d, expected %0d%0d%0d%0d%0d",
               what, preload, sense_en, move_en, running, done, p, s, m, r, d);
    end
  endtask

  task automatic run(int steps);
    start = 1; #1;
    expect_out("start", 1, 0, 0, 0, done);
    @(posedge clk); #1;
    start = 0;
    for (int i = 0; i < steps; i++) begin
      at_exit = (i == steps - 1);
      start = (i == 1);   // ignored while running
      #1 expect_out("sense", 0, 1, 0, 1, 0);
      @(posedge clk); #1;
      start = 0;
      if (i != steps - 1) begin
        expect_out("move", 0, 0, 1, 1, 0);
        @(posedge clk); #1;
      end
    end
    at_exit = 0;
    expect_out("done", 0, 0, 0, 0, 1);
    repeat (3) @(posedge clk);
    #1 expect_out("done hold", 0, 0, 0, 0, 1);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; at_exit = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    at_exit = 1;   // an exit flag while idle must not matter
    repeat (3) @(posedge clk);
    #1 expect_out("idle", 0, 0, 0, 0, 0);
    at_exit = 0;
    run(5);
    run(1);
    run(17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
