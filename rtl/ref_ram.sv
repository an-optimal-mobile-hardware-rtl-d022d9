// ref_ram: the reference memory of the IME unit.
//
// It holds the reference search window of the current PU (WIN x WIN pixels; the PU's
// co-located position is at window offset (SR, SR)) in four ref_bank instances, one per
// picture row mod 4, and contains the address generation (ref_addr_gen). After a
// search point arrives, it delivers the reference 4x4 block of every block of the PU,
// one per cycle, in the same raster order as cur_ram.
//
// Timing: start in cycle T; the address generator registers block 0's addresses at
// the end of T and the banks read them at the end of T+1, so block k is on blk in
// cycle T+2+k. The first block takes two cycles, every further block one: 16x16 + 1
// cycles to read all blocks of a 64x64 PU. The bank outputs come out rotated (bank
// b holds block row (b - y0) mod 4, lane l pixel (l - x0) mod 4); a multiplexer
// layer driven by the delayed offsets puts them back in row-major order.
//
// Interface: host write port by window coordinates: wr_y (row 0..WIN-1) and wr_c
// (word column, pixels 4*wr_c .. 4*wr_c+3, pixel i in wr_row[8*i +: 8]).
// Read side: start, mv, w4, h4 as for ref_addr_gen; blk_valid/blk_first/blk_last/blk.
// Four banks of 4-pixel 32-bit words and the 2-cycle first access follow the IME
// reference memory; the 192x192 window, its host write port and the un-rotation
// multiplexers are this design's choice.
module ref_ram
  import ime_pkg::*;
#(
  parameter int WIN = 192,
  parameter int WPR = WIN/4,
  parameter int AW  = $clog2(WPR*WIN/4),
  parameter int YW  = $clog2(WIN),
  parameter int CWW = $clog2(WPR)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [YW-1:0]     wr_y,
  input  logic [CWW-1:0]    wr_c,
  input  row_t              wr_row,
  input  logic              start,
  input  mv_t               mv,
  input  logic [DIM4_W-1:0] w4,
  input  logic [DIM4_W-1:0] h4,
  output logic              blk_valid,
  output logic              blk_first,
  output logic              blk_last,
  output blk_t              blk
);

  localparam int DEPTH = WPR*WIN/4;

  logic                    a_valid, a_first, a_last;
  logic [3:0][3:0][AW-1:0] a_addr;
  logic [1:0]              a_xo, a_yo, d_xo, d_yo;
  row_t [3:0]              bank_row;
  logic [AW-1:0]           wr_addr;

  ref_addr_gen #(.WIN(WIN), .WPR(WPR), .AW(AW)) u_agen (
    .clk, .rst_n, .start, .mv, .w4, .h4,
    .addr_valid(a_valid), .first(a_first), .last(a_last),
    .addr(a_addr), .xo(a_xo), .yo(a_yo)
  );

  assign wr_addr = AW'(32'(wr_y >> 2) * WPR + 32'(wr_c));

  for (genvar b = 0; b < 4; b++) begin : g_bank
    ref_bank #(.DEPTH(DEPTH), .AW(AW)) u_bank (
      .clk,
      .wr_en   (wr_en && wr_y[1:0] == 2'(b)),
      .wr_addr (wr_addr),
      .wr_row  (wr_row),
      .rd_en   (a_valid),
      .rd_addr (a_addr[b]),
      .rd_row  (bank_row[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_valid <= 1'b0;
      blk_first <= 1'b0;
      blk_last  <= 1'b0;
      d_xo      <= '0;
      d_yo      <= '0;
    end else begin
      blk_valid <= a_valid;
      blk_first <= a_valid && a_first;
      blk_last  <= a_valid && a_last;
      d_xo      <= a_xo;
      d_yo      <= a_yo;
    end
  end

  // Un-rotate: block row r from bank (yo + r) mod 4, pixel i from lane (xo + i) mod 4.
  always_comb begin
    for (int r = 0; r < 4; r++) begin
      logic [1:0] b;
      b = d_yo + 2'(r);
      for (int i = 0; i < 4; i++) begin
        logic [1:0] l;
        l = d_xo + 2'(i);
        blk[ROW_W*r + PIX_W*i +: PIX_W] = bank_row[b][PIX_W*l +: PIX_W];
      end
    end
  end

endmodule
