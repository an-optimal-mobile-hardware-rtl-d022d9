// ime_pkg: types and constants shared by the integer motion estimation (IME) unit.
//
// Pixels are 8-bit luma samples. A 4x4 pixel block travels as 128 bits, row-major:
// pixel (column i, row j) sits in bits [8*(4*j+i) +: 8]. A motion vector is a pair of
// signed 8-bit components in integer-pixel units; the search range of 128x128 means
// components in [-SR, +SR] with SR = 64. The PU size, block order and SAD width follow
// from a largest prediction unit (PU) of 64x64 pixels, the largest HEVC PU.
package ime_pkg;

  localparam int PIX_W    = 8;            // luma sample width
  localparam int MV_W     = 8;            // one motion vector component
  localparam int SR       = 64;           // search range +-64 (128x128 window of positions)
  localparam int BLK_W    = 16*PIX_W;     // one 4x4 block = 128 bits
  localparam int ROW_W    = 4*PIX_W;      // one 4-pixel row = 32 bits
  localparam int SAD_W    = 20;           // 64*64*255 = 1,044,480 < 2^20
  localparam int DIM4_W   = 5;            // PU edge in 4-pixel units, 1..16

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [BLK_W-1:0] blk_t;
  typedef logic [ROW_W-1:0] row_t;
  typedef logic [SAD_W-1:0] sad_t;

  typedef struct packed {
    logic signed [MV_W-1:0] x;
    logic signed [MV_W-1:0] y;
  } mv_t;

  // Rotating-W-Diamond pattern: 5 rings of 8 points at distances 1, 2, 4, 8, 16.
  // Even rings use the square orientation, odd rings the diamond (45-degree rotated)
  // orientation. Point p (0..7) of ring r:
  localparam int PAT_RINGS  = 5;
  localparam int PAT_POINTS = 8*PAT_RINGS;   // 40

  function automatic mv_t pattern_offset(input logic [5:0] idx);
    int r, p, d, h;
    mv_t o;
    r = int'(idx) / 8;
    p = int'(idx) % 8;
    d = 1 << r;
    h = (r % 2 == 1) ? d/2 : d;      // corner reach: full for square, half for diamond
    case (p)
      0: begin o.x = MV_W'( d); o.y = MV_W'( 0); end
      1: begin o.x = MV_W'( h); o.y = MV_W'( h); end
      2: begin o.x = MV_W'( 0); o.y = MV_W'( d); end
      3: begin o.x = MV_W'(-h); o.y = MV_W'( h); end
      4: begin o.x = MV_W'(-d); o.y = MV_W'( 0); end
      5: begin o.x = MV_W'(-h); o.y = MV_W'(-h); end
      6: begin o.x = MV_W'( 0); o.y = MV_W'(-d); end
      default: begin o.x = MV_W'( h); o.y = MV_W'(-h); end
    endcase
    return o;
  endfunction

  // Ring distance of pattern point idx.
  function automatic int pattern_dist(input logic [5:0] idx);
    return 1 << (int'(idx) / 8);
  endfunction

  // Raster search: grid of 20 pixels, points at -60..+60 on each axis (7x7 = 49).
  localparam int RASTER_STEP = 20;
  localparam int RASTER_N    = 7;
  localparam int RASTER_MIN  = -60;
  // Termination distance rule of the first stage: above this, do the raster search.
  localparam int RASTER_DIST = 5;

  // Search stages reported by the searcher.
  typedef enum logic [3:0] {
    S_IDLE, S_START_POINT, S_WAIT_SAD, S_SAD_MV_MEDIAN, S_FIRST_SEARCH,
    S_SEARCH_NEIGHBOR, S_SEARCH_SCAN20, S_SECOND_SEARCH, S_DONE
  } is_state_t;

endpackage
