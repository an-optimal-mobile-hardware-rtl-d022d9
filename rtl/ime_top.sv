// ime_top: integer motion estimation (IME) unit for HEVC.
//
// For one prediction unit (PU) of the current frame it finds the integer motion
// vector, within +-64 pixels, whose reference block has the smallest sum of absolute
// differences (SAD), using the Rotating-W-Diamond fast search instead of a full search.
// Five blocks make it up:
//   isearch  search controller: picks the points, keeps the best SAD and vector
//   ref_ram  reference search window (192x192 pixels) in four row-interleaved banks
//            plus address generation; one reference 4x4 block per cycle
//   cur_ram  current PU, one 4x4 block per 128-bit word; one block per cycle
//   sad_unit four SAD cores and an adder tree (16 absolute differences per cycle)
//            and the PU accumulator
//   mv_ram   vectors of the PUs already searched, for the median predictor
//
// Operation: the host loads the reference window (the PU's co-located position at
// window offset (64, 64)) and the current PU, then pulses start with the PU's grid
// position and size. Each search point costs n_blocks + 2 cycles from request to SAD
// (258 cycles for a 64x64 PU) plus one cycle of decision. done pulses with best_mv
// and best_sad; the vector is also stored in mv_ram for later PUs.
// PUs must be searched in raster order of the PU grid for the median predictor to see
// searched neighbours. The host must not write the memories while busy.
// The partition into these five blocks and their connections follow the IME block
// structure; the host load ports, the window size and the search_state monitor output
// are this design's choice.
module ime_top
  import ime_pkg::*;
#(
  parameter int WIN        = 192,            // reference window edge: 64 + 128
  parameter int CUR_DEPTH  = 256,            // 4x4 blocks of a 64x64 PU
  parameter int MV_DEPTH   = 32400,          // 1920x1080 in 8x8 PUs
  parameter int MAX_ROUNDS = 16,
  parameter int GW         = 8,
  parameter int CUR_AW     = $clog2(CUR_DEPTH),
  parameter int YW         = $clog2(WIN),
  parameter int CWW        = $clog2(WIN/4)
) (
  input  logic              clk,
  input  logic              rst_n,
  // current PU load
  input  logic              cur_wr_en,
  input  logic [CUR_AW-1:0] cur_wr_addr,
  input  blk_t              cur_wr_blk,
  // reference window load
  input  logic              ref_wr_en,
  input  logic [YW-1:0]     ref_wr_y,
  input  logic [CWW-1:0]    ref_wr_c,
  input  row_t              ref_wr_row,
  // search command
  input  logic              start,
  input  logic [GW-1:0]     pu_col,
  input  logic [GW-1:0]     pu_row,
  input  logic [GW-1:0]     pu_cols,
  input  logic [DIM4_W-1:0] w4,
  input  logic [DIM4_W-1:0] h4,
  output logic              busy,
  output logic              done,
  output mv_t               best_mv,
  output sad_t              best_sad,
  output is_state_t         search_state    // current search stage, for monitoring
);

  localparam int MV_AW = $clog2(MV_DEPTH);

  logic               mv_rd_en, mv_wr_en;
  logic [MV_AW-1:0]   mv_rd_addr, mv_wr_addr;
  mv_t                mv_rd_data, mv_wr_data, sad_mv;
  logic               ref_rd, cur_rd, sad_done;
  logic [2*DIM4_W-2:0] n_blocks;
  sad_t               sad;
  logic               r_valid, r_first, r_last, c_valid;
  blk_t               r_blk, c_blk;
  logic [DIM4_W-1:0]  s_w4, s_h4;

  isearch #(.MV_DEPTH(MV_DEPTH), .MV_AW(MV_AW), .GW(GW), .MAX_ROUNDS(MAX_ROUNDS)) u_isearch (
    .clk, .rst_n,
    .start, .pu_col, .pu_row, .pu_cols, .w4, .h4,
    .busy, .done, .best_mv, .best_sad, .state_o(search_state),
    .pu_w4(s_w4), .pu_h4(s_h4),
    .mv_rd_en, .mv_rd_addr, .mv_rd_data,
    .mv_wr_en, .mv_wr_addr, .mv_wr_data,
    .ref_rd, .cur_rd, .sad_mv, .n_blocks,
    .sad_done, .sad_in(sad)
  );

  mv_ram #(.DEPTH(MV_DEPTH), .AW(MV_AW)) u_mv_ram (
    .clk,
    .rd_en(mv_rd_en), .rd_addr(mv_rd_addr), .rd_data(mv_rd_data),
    .wr_en(mv_wr_en), .wr_addr(mv_wr_addr), .wr_data(mv_wr_data)
  );

  ref_ram #(.WIN(WIN)) u_ref_ram (
    .clk, .rst_n,
    .wr_en(ref_wr_en), .wr_y(ref_wr_y), .wr_c(ref_wr_c), .wr_row(ref_wr_row),
    .start(ref_rd), .mv(sad_mv), .w4(s_w4), .h4(s_h4),
    .blk_valid(r_valid), .blk_first(r_first), .blk_last(r_last), .blk(r_blk)
  );

  cur_ram #(.DEPTH(CUR_DEPTH), .AW(CUR_AW)) u_cur_ram (
    .clk, .rst_n,
    .wr_en(cur_wr_en), .wr_addr(cur_wr_addr), .wr_blk(cur_wr_blk),
    .rd_start(cur_rd), .n_blocks((CUR_AW+1)'(n_blocks)),
    .blk_valid(c_valid), .blk(c_blk)
  );

  sad_unit u_sad (
    .clk, .rst_n,
    .blk_valid(r_valid), .blk_first(r_first), .blk_last(r_last),
    .ref_blk(r_blk), .cur_blk(c_blk),
    .sad_done, .sad
  );

  // The two memories must deliver matching blocks in the same cycle.
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n) r_valid == c_valid);

endmodule
