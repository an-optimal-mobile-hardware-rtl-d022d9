// mv_ram: motion vector memory of the IME unit.
//
// Keeps the best integer motion vector of every prediction unit already searched in
// the current frame, so the searcher can form the median predictor of a new PU from
// its left, above and above-left neighbours. Entries are addressed by PU index in a
// uniform PU grid (row * columns + column); the default depth covers a 1920x1080 frame
// tiled with 8x8 PUs (240 x 135 = 32,400 entries), and therefore any coarser tiling.
//
// Interface: one synchronous read port (rd_data valid the cycle after rd_en) and one
// write port. The memory is not reset: the searcher reads only neighbours that exist
// in the frame, which have been written before when PUs are searched in raster order.
// Its role (neighbour vectors for the median start point) follows the search method;
// the grid addressing, the 8-bit vector components and the depth are this design's choice.
module mv_ram
  import ime_pkg::*;
#(
  parameter int DEPTH = 32400,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output mv_t           rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  mv_t           wr_data
);

  mv_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
