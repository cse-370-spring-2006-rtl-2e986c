// tb_heading_reg: random turns and loads against a compass-number model.
//
// The model keeps the heading as 0..3 clockwise from north (a right turn
// adds one, a left turn subtracts one) and maps it to the one-hot code
// N=0001, W=0010, S=0100, E=1000 for the comparison.
module tb_heading_reg;
  timeunit 1ns;
  timeprecision 1ps;
  import ant_pkg::*;

  logic clk = 1'b0;
  logic rst, load, turn_left, turn_right;
  heading_e load_heading, heading;
  int checks = 0, failures = 0;
  int model;
  int n_left = 0, n_right = 0, n_load = 0;

  always #5 clk = ~clk;

  heading_reg dut (.*);

  function automatic heading_e to_onehot(int d);
    case (d % 4)
      0: return HEAD_N;
      1: return HEAD_E;
      2: return HEAD_S;
      default: return HEAD_W;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; turn_left = 0; turn_right = 0; load_heading = HEAD_S;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    model = 0;
    checks++;
    if (heading !== HEAD_N) begin failures++; $display("FAIL reset heading"); end
    for (int i = 0; i < 2000; i++) begin
      int op, ld;
      op = $urandom_range(0, 9);
      ld = $urandom_range(0, 3);
      load = (op == 0);
      load_heading = to_onehot(ld);
      turn_left = (op inside {1, 2, 3, 9});
      turn_right = (op inside {4, 5, 6, 9});
      @(posedge clk); #1;
      if (load) begin model = ld; n_load++; end
      else if (turn_left && !turn_right) begin model = (model + 3) % 4; n_left++; end
      else if (turn_right && !turn_left) begin model = (model + 1) % 4; n_right++; end
      checks++;
      if (heading !== to_onehot(model)) begin
        failures++;
        $display("FAIL step %0d op %0d: heading %b expected %b", i, op, heading, to_onehot(model));
      end
    end
    $display("loads %0d left turns %0d right turns %0d", n_load, n_left, n_right);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
