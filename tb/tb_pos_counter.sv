// tb_pos_counter: random preloads and steps of a 7-bit counter against an
// integer model, including wrap-around at both ends.
module tb_pos_counter;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int unsigned W = 7;

  logic clk = 1'b0;
  logic rst, preload, step, up, down;
  logic [W-1:0] preload_value, count;
  int checks = 0, failures = 0;
  int model;

  always #5 clk = ~clk;

  pos_counter dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; preload = 0; step = 0; up = 0; down = 0; preload_value = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    model = 0;
    checks++;
    if (count !== '0) begin failures++; $display("FAIL reset count"); end
    for (int i = 0; i < 5000; i++) begin
      preload = ($urandom_range(0, 49) == 0);
      preload_value = W'($urandom);
      step = $urandom_range(0, 3) != 0;
      up = $urandom_range(0, 1);
      down = $urandom_range(0, 1);
      @(posedge clk); #1;
      if (preload) model = preload_value;
      else if (step && up && !down) model = (model + 1) % (1 << W);
      else if (step && down && !up) model = (model + (1 << W) - 1) % (1 << W);
      checks++;
      if (count !== W'(model)) begin
        failures++;
        $display("FAIL step %0d: count %0d expected %0d", i, count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
