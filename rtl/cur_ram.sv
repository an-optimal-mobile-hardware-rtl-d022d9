// cur_ram: current-PU memory with its read address controller.
//
// The current prediction unit (PU) is cut into 4x4 pixel blocks and each block is one
// 128-bit word, so a whole block is read in a single cycle and a 64x64 PU (16x16
// blocks) streams out in 256 cycles. Blocks are stored in raster order inside the PU:
// block (bx, by) of a PU that is W4 blocks wide lives at address by*W4 + bx.
//
// Interface:
//   wr_en/wr_addr/wr_blk  host write port, one block per cycle.
//   rd_start, n_blocks    a one-cycle rd_start begins a stream of n_blocks blocks
//                         (PU width/4 times height/4, 1..DEPTH).
//   blk_valid/blk         block k of the stream, valid k+1 cycles after rd_start.
// Timing: synchronous read, one block per cycle, address incremented every cycle.
// A rd_start while a stream runs restarts the stream. The memory is not reset.
// The 128-bit block word, the 256-word depth and the one-block-per-cycle counter follow
// the IME memory organisation; the raster block order and the port protocol are this
// design's choice.
module cur_ram
  import ime_pkg::*;
#(
  parameter int DEPTH = 256,                 // 64x64 PU = 16x16 blocks
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  blk_t          wr_blk,
  input  logic          rd_start,
  input  logic [AW:0]   n_blocks,
  output logic          blk_valid,
  output blk_t          blk
);

  blk_t          mem [DEPTH];
  logic [AW:0]   cnt;        // next block to read
  logic [AW:0]   len;
  logic          active;
  logic [AW-1:0] rd_addr;
  logic          rd_en;

  assign rd_en   = rd_start || (active && cnt < len);
  assign rd_addr = rd_start ? '0 : cnt[AW-1:0];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_blk;
    if (rd_en) blk <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      cnt       <= '0;
      len       <= '0;
      blk_valid <= 1'b0;
    end else begin
      blk_valid <= rd_en;
      if (rd_start) begin
        active <= (n_blocks > 1);
        cnt    <= (AW+1)'(1);
        len    <= n_blocks;
      end else if (active) begin
        cnt <= cnt + 1'b1;
        if (cnt + 1'b1 >= len) active <= 1'b0;
      end
    end
  end

endmodule
