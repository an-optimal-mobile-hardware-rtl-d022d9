// ref_addr_gen: address generation of the reference memory.
//
// Given a search point (motion vector) and the PU size, it walks the PU's 4x4 blocks
// in raster order, one per cycle, and works out for each block the addresses of the
// four reference banks (one block row each) and, inside each bank, of the four byte
// lanes (see ref_bank). For block (bx, by) the block's top-left reference pixel is
//   x0 = SR + mv.x + 4*bx,  y0 = SR + mv.y + 4*by   (window coordinates, SR = 64).
// Bank b serves block row r = (b - y0) mod 4, i.e. picture row y0 + r, at bank row
// (y0 + r) >> 2; lane l serves pixel column x0 + ((l - x0) mod 4), at word column
// that >> 2. Stepping to the next block adds 1 to the word column (or 1 to the bank
// row at the end of a block row), so the per-PU bases are computed once and the block
// counters are added.
//
// Interface: a one-cycle start with mv, w4, h4 (PU width and height in 4-pixel units)
// begins a walk. Outputs are registered: the addresses of block k, with addr_valid,
// first/last flags and the sub-word offsets xo = x0 mod 4, yo = y0 mod 4 that the
// data path needs to un-rotate the bank outputs, appear k+1 cycles after start.
// A start during a walk restarts it. The caller keeps mv within [-SR, +SR].
// A registered address stage that steps every cycle follows the reference memory's
// 2-cycle first access; the bank/lane address arithmetic is this design's own.
module ref_addr_gen
  import ime_pkg::*;
#(
  parameter int WIN = 192,                   // window edge: 64 (PU) + 128 (range)
  parameter int WPR = WIN/4,                 // words per bank row
  parameter int AW  = $clog2(WPR*WIN/4)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  mv_t                  mv,
  input  logic [DIM4_W-1:0]    w4,
  input  logic [DIM4_W-1:0]    h4,
  output logic                 addr_valid,
  output logic                 first,
  output logic                 last,
  output logic [3:0][3:0][AW-1:0] addr,     // [bank][lane]
  output logic [1:0]           xo,
  output logic [1:0]           yo
);

  localparam int CW = $clog2(WIN) + 1;

  // Latched walk state
  logic                active;
  logic [DIM4_W-1:0]   bx, by, w4_q, h4_q;
  logic [3:0][CW-1:0]  rbase_q, cbase_q;    // per bank row base, per lane column base
  logic [1:0]          xo_q, yo_q;

  // Bases of the point presented at start
  logic [CW-1:0]       x0s, y0s;
  logic [3:0][CW-1:0]  rbase_s, cbase_s;

  always_comb begin
    x0s = CW'(SR) + CW'(signed'(mv.x));
    y0s = CW'(SR) + CW'(signed'(mv.y));
    for (int k = 0; k < 4; k++) begin
      logic [1:0] dy, dx;                   // (k - y0) mod 4, (k - x0) mod 4
      dy = 2'(k) - y0s[1:0];
      dx = 2'(k) - x0s[1:0];
      rbase_s[k] = (y0s + CW'(dy)) >> 2;
      cbase_s[k] = (x0s + CW'(dx)) >> 2;
    end
  end

  // Block presented this cycle
  logic                issue;
  logic [DIM4_W-1:0]   cbx, cby, cw4, ch4;
  logic [3:0][CW-1:0]  crb, ccb;
  logic [1:0]          cxo, cyo;

  always_comb begin
    issue = start || active;
    if (start) begin
      cbx = '0; cby = '0; cw4 = w4; ch4 = h4;
      crb = rbase_s; ccb = cbase_s; cxo = x0s[1:0]; cyo = y0s[1:0];
    end else begin
      cbx = bx; cby = by; cw4 = w4_q; ch4 = h4_q;
      crb = rbase_q; ccb = cbase_q; cxo = xo_q; cyo = yo_q;
    end
  end

  logic is_last;
  assign is_last = (cbx == cw4 - 1'b1) && (cby == ch4 - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      bx         <= '0;
      by         <= '0;
      w4_q       <= '0;
      h4_q       <= '0;
      rbase_q    <= '0;
      cbase_q    <= '0;
      xo_q       <= '0;
      yo_q       <= '0;
      addr_valid <= 1'b0;
      first      <= 1'b0;
      last       <= 1'b0;
      addr       <= '0;
      xo         <= '0;
      yo         <= '0;
    end else begin
      addr_valid <= issue;
      first      <= start;
      last       <= issue && is_last;
      if (issue) begin
        for (int b = 0; b < 4; b++)
          for (int l = 0; l < 4; l++)
            addr[b][l] <= AW'(32'(crb[b] + CW'(cby)) * WPR + 32'(ccb[l] + CW'(cbx)));
        xo <= cxo;
        yo <= cyo;
        // advance
        w4_q <= cw4; h4_q <= ch4; rbase_q <= crb; cbase_q <= ccb; xo_q <= cxo; yo_q <= cyo;
        active <= !is_last;
        if (cbx == cw4 - 1'b1) begin
          bx <= '0;
          by <= cby + 1'b1;
        end else begin
          bx <= cbx + 1'b1;
          by <= cby;
        end
      end
    end
  end

endmodule
