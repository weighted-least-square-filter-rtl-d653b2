// frame_ram: simple dual-port memory used for the frame arrays.
//
// One write port and one read port on the same clock; the read is synchronous
// (data appears the cycle after rd_en) and returns the old word when the same
// address is written in that cycle. This is the shape that maps onto UltraRAM
// or block RAM; the source binds its large frame arrays to UltraRAM. Contents
// are not reset: the filter writes every word before reading it.
module frame_ram #(
  parameter int DEPTH = 126336,   // one bank: half of a 672 x 376 frame
  parameter int WIDTH = 48
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
