// maze_sram: the maze memory, one byte per grid cell.
//
// With COORD_W = 7 it holds the 128 x 128 maze as 16384 8-bit words,
// addressed by {Y, X}. Each word holds the wall and exit flags of one cell
// (see ant_pkg). Size, word width and address order follow the original
// design.
//
// Design choices of this implementation: a single-port memory written as
// an array, with an asynchronous read (like a static RAM chip: data follow
// the address within the cycle) and a synchronous write on the clock edge
// when `we` is high. The contents are not reset; the maze is written
// through the port before a run.
module maze_sram #(
  parameter int unsigned ADDR_W = 14,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[addr] <= wdata;
    end
  end

  assign rdata = mem[addr];

endmodule
