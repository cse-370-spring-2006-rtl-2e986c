// tb_maze_sram: fills the full 16384 x 8 memory with an address-derived
// pattern, reads it all back (asynchronous read), then overwrites random
// words and checks that only those change.
module tb_maze_sram;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int unsigned AW = 14;

  logic clk = 1'b0;
  logic we;
  logic [AW-1:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [1 << AW];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  maze_sram dut (.*);

  function automatic logic [7:0] pattern(int a);
    return 8'((a * 37) ^ (a >> 7));
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = '0; wdata = '0;
    for (int a = 0; a < (1 << AW); a++) begin
      we = 1; addr = AW'(a); wdata = pattern(a); model[a] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int a = 0; a < (1 << AW); a++) begin
      addr = AW'(a); #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d: %0h expected %0h", a, rdata, model[a]);
      end
    end
    for (int i = 0; i < 500; i++) begin
      int a;
      a = $urandom_range(0, (1 << AW) - 1);
      we = 1; addr = AW'(a); wdata = 8'($urandom); model[a] = wdata;
      @(posedge clk); #1;
      we = 0; addr = AW'($urandom_range(0, (1 << AW) - 1)); #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        $display("FAIL read %0d: %0h expected %0h", addr, rdata, model[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
