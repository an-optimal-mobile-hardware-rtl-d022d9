// sad_unit: the SAD processing unit of the IME datapath.
//
// Four sad_core instances, one per block row, work on a whole 4x4 block at once:
// 16 absolute differences per cycle. An adder tree sums the four row SADs into the
// block SAD, and an accumulator adds the block SADs of one prediction unit (PU).
// A 64x64 PU is therefore 256 blocks and 256 accumulate cycles.
//
// Interface: blk_valid qualifies ref_blk/cur_blk (4x4 blocks, row-major, 128 bits).
// blk_first marks the first block of a PU (the accumulator restarts), blk_last the last.
// One cycle after the last block is accepted, sad_done pulses for one cycle and
// sad holds the PU SAD until the next PU finishes.
// Timing: block data enter combinationally; the accumulator is the only register, so
// sad_done follows the last block by exactly one cycle.
// The four cores, the adder tree and one block per cycle (256 cycles per 64x64 PU)
// follow the method; the first/last flags, the 20-bit SAD width and the asynchronous
// active-low reset are this design's choice.
module sad_unit
  import ime_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic blk_valid,
  input  logic blk_first,
  input  logic blk_last,
  input  blk_t ref_blk,
  input  blk_t cur_blk,
  output logic sad_done,
  output sad_t sad
);

  logic [3:0][9:0] row_sad;
  logic [11:0]     blk_sad;
  sad_t            acc;

  for (genvar r = 0; r < 4; r++) begin : g_core
    sad_core u_core (
      .ref_row (ref_blk[ROW_W*r +: ROW_W]),
      .cur_row (cur_blk[ROW_W*r +: ROW_W]),
      .sad     (row_sad[r])
    );
  end

  assign blk_sad = (12'(row_sad[0]) + 12'(row_sad[1])) + (12'(row_sad[2]) + 12'(row_sad[3]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      sad      <= '0;
      sad_done <= 1'b0;
    end else begin
      sad_done <= 1'b0;
      if (blk_valid) begin
        acc <= (blk_first ? '0 : acc) + SAD_W'(blk_sad);
        if (blk_last) begin
          sad      <= (blk_first ? '0 : acc) + SAD_W'(blk_sad);
          sad_done <= 1'b1;
        end
      end
    end
  end

endmodule
