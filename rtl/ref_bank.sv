// ref_bank: one Ref_Ram block of the reference memory.
//
// The reference search window is split by picture row over four banks: bank b holds
// the rows y with y mod 4 = b, so the four rows of any 4x4 block, wherever it starts
// vertically, come from four different banks in the same cycle. Inside a bank a
// word is 32 bits, four horizontally adjacent pixels x = 4c..4c+3 of one row.
//
// So that a block may start at any column (integer motion vectors are not 4-aligned)
// the word is kept as four byte lanes with their own read addresses: lane l holds the
// pixels with x mod 4 = l. Reading lane l at the word that holds pixel x0 + ((l-x0) mod 4)
// gives the four pixels x0..x0+3 in one cycle, in rotated lane order. The lane split is
// this design's own choice; the four banks and the 32-bit, 4-pixel word follow the
// reference memory organisation of the IME unit.
//
// Interface: wr_en/wr_addr/wr_row write a whole 32-bit word (all four lanes at one
// address; word address = bank_row * WPR + c). rd_addr[l] is lane l's read address;
// rd_row[8*l +: 8] is lane l's pixel one cycle later. The memory is not reset.
module ref_bank
  import ime_pkg::*;
#(
  parameter int DEPTH = 2304,                // 48 bank rows x 48 words (192x192 window)
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               wr_en,
  input  logic [AW-1:0]      wr_addr,
  input  row_t               wr_row,
  input  logic               rd_en,
  input  logic [3:0][AW-1:0] rd_addr,
  output row_t               rd_row
);

  for (genvar l = 0; l < 4; l++) begin : g_lane
    pix_t lane_mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_en) lane_mem[wr_addr] <= wr_row[PIX_W*l +: PIX_W];
      if (rd_en) rd_row[PIX_W*l +: PIX_W] <= lane_mem[rd_addr[l]];
    end
  end

endmodule
