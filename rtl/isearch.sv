// isearch: integer search controller (Rotating-W-Diamond search) of the IME unit.
//
// A state machine that chooses the search points, has their SAD computed by the
// reference/current memories and the SAD unit, and keeps the point of smallest SAD.
//   START_POINT     reads the left, above and above-left neighbours' motion vectors
//                   from the MV memory (missing neighbours count as (0,0)) and sends
//                   the co-located point (0,0) for a SAD.
//   SAD_MV_MEDIAN   sends the component-wise median of the three neighbour vectors;
//                   the better of the two becomes the start point.
//   FIRST_SEARCH    the 40-point Rotating-W-Diamond pattern around the start point:
//                   rings at distance 1, 2, 4, 8 and 16, 8 points each, alternately
//                   square and 45-degree-rotated diamond (ime_pkg::pattern_offset).
//                   The ring distance of the best point decides what follows:
//                   0 ends the search; 1 or 2 runs SEARCH_NEIGHBOR; above 5 runs
//                   SEARCH_SCAN20; 4 goes straight to the second stage.
//   SEARCH_NEIGHBOR the 8 points around the best point.
//   SEARCH_SCAN20   raster search on a 20-pixel grid over the search range
//                   (-60..+60 on both axes, 49 points).
//   SECOND_SEARCH   rounds of the same pattern around the current best point, with the
//                   neighbour search after a best point at distance 1 or 2 and no raster
//                   search, until a round leaves the best point where it started
//                   (or MAX_ROUNDS rounds have run).
//   WAIT_SAD        waits for each SAD and keeps the candidate if its SAD is strictly
//                   smaller than the best so far.
// Points outside the search range [-SR, +SR] are skipped without a SAD.
// At the end the best vector is written to the MV memory at the PU's index and
// reported with its SAD.
//
// The pattern geometry, the neighbour set, the raster origin, the handling of a best
// point at distance 4 and the round limit are this design's own reading of the
// algorithm; the state sequence and the decision rules follow it.
//
// Interface and timing: start (one cycle) with the PU's grid position (pu_col, pu_row),
// the grid width pu_cols and the PU size w4 x h4 in 4x4 blocks. For every SAD the
// controller pulses ref_rd with sad_mv valid, then cur_rd one cycle later (the current
// memory has one cycle less read latency than the reference memory), and holds n_blocks.
// It then waits for sad_done/sad_in. done pulses for one cycle with best_mv/best_sad,
// which stay valid until the next start. busy is high from start until done.
// pu_w4/pu_h4 give the PU size latched at start, for the reference address generator.
module isearch
  import ime_pkg::*;
#(
  parameter int MV_DEPTH   = 32400,
  parameter int MV_AW      = $clog2(MV_DEPTH),
  parameter int GW         = 8,              // PU grid coordinate width
  parameter int MAX_ROUNDS = 16              // limit of second-stage rounds
) (
  input  logic               clk,
  input  logic               rst_n,
  // command
  input  logic               start,
  input  logic [GW-1:0]      pu_col,
  input  logic [GW-1:0]      pu_row,
  input  logic [GW-1:0]      pu_cols,
  input  logic [DIM4_W-1:0]  w4,
  input  logic [DIM4_W-1:0]  h4,
  output logic               busy,
  output logic               done,
  output mv_t                best_mv,
  output sad_t               best_sad,
  output is_state_t          state_o,
  output logic [DIM4_W-1:0]  pu_w4,         // PU size of the running search
  output logic [DIM4_W-1:0]  pu_h4,
  // MV memory
  output logic               mv_rd_en,
  output logic [MV_AW-1:0]   mv_rd_addr,
  input  mv_t                mv_rd_data,
  output logic               mv_wr_en,
  output logic [MV_AW-1:0]   mv_wr_addr,
  output mv_t                mv_wr_data,
  // SAD request / result
  output logic               ref_rd,
  output logic               cur_rd,
  output mv_t                sad_mv,
  output logic [2*DIM4_W-2:0] n_blocks,      // w4*h4, at most 256
  input  logic               sad_done,
  input  sad_t               sad_in
);

  is_state_t state, ret_state;

  logic [GW-1:0]      cols_q;
  logic [DIM4_W-1:0]  w4_q, h4_q;
  logic [MV_AW-1:0]   pu_idx;
  logic [2:0]         rd_cnt;
  logic               avl_l, avl_a, avl_la;
  mv_t                mv_l, mv_a, mv_la;
  logic               med_sent;

  logic               have_best;
  mv_t                center, nb_center;
  logic [4:0]         best_dis, cand_dis;
  logic [5:0]         pidx;
  logic [3:0]         nidx;
  logic [2:0]         rx, ry;
  logic [$clog2(MAX_ROUNDS+1)-1:0] rounds;

  assign state_o  = state;
  assign pu_w4    = w4_q;
  assign pu_h4    = h4_q;
  assign n_blocks = (2*DIM4_W-1)'(w4_q) * (2*DIM4_W-1)'(h4_q);

  function automatic logic in_range(input mv_t m);
    return (int'(m.x) >= -SR) && (int'(m.x) <= SR) && (int'(m.y) >= -SR) && (int'(m.y) <= SR);
  endfunction

  function automatic mv_t mv_add(input mv_t a, input mv_t b);
    mv_t s;
    s.x = a.x + b.x;
    s.y = a.y + b.y;
    return s;
  endfunction

  function automatic logic signed [MV_W-1:0] med3(input logic signed [MV_W-1:0] a,
                                                  input logic signed [MV_W-1:0] b,
                                                  input logic signed [MV_W-1:0] c);
    logic signed [MV_W-1:0] lo, hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    if (c < lo)      return lo;
    else if (c > hi) return hi;
    else             return c;
  endfunction

  // Candidate of the current search state (combinational).
  mv_t cand_pat, cand_nb, cand_ras, median;
  always_comb begin
    cand_pat   = mv_add(center, pattern_offset(pidx));
    cand_nb    = mv_add(nb_center, pattern_offset({3'd0, nidx[2:0]}));
    cand_ras.x = MV_W'(RASTER_MIN + RASTER_STEP * int'(rx));
    cand_ras.y = MV_W'(RASTER_MIN + RASTER_STEP * int'(ry));
    median.x   = med3(mv_l.x, mv_a.x, mv_la.x);
    median.y   = med3(mv_l.y, mv_a.y, mv_la.y);
  end

  // Address of the neighbours in the MV grid.
  logic [MV_AW-1:0] idx_l, idx_a, idx_la;
  assign idx_l  = pu_idx - 1'b1;
  assign idx_a  = pu_idx - MV_AW'(cols_q);
  assign idx_la = pu_idx - MV_AW'(cols_q) - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ret_state <= S_IDLE;
      cols_q <= '0; w4_q <= '0; h4_q <= '0; pu_idx <= '0;
      rd_cnt <= '0; avl_l <= 1'b0; avl_a <= 1'b0; avl_la <= 1'b0;
      mv_l <= '0; mv_a <= '0; mv_la <= '0; med_sent <= 1'b0;
      have_best <= 1'b0; best_mv <= '0; best_sad <= '0; best_dis <= '0; cand_dis <= '0;
      center <= '0; nb_center <= '0; pidx <= '0; nidx <= '0; rx <= '0; ry <= '0;
      rounds <= '0;
      busy <= 1'b0; done <= 1'b0;
      mv_rd_en <= 1'b0; mv_rd_addr <= '0;
      mv_wr_en <= 1'b0; mv_wr_addr <= '0; mv_wr_data <= '0;
      ref_rd <= 1'b0; cur_rd <= 1'b0; sad_mv <= '0;
    end else begin
      done     <= 1'b0;
      mv_rd_en <= 1'b0;
      mv_wr_en <= 1'b0;
      ref_rd   <= 1'b0;
      cur_rd   <= ref_rd;

      unique case (state)
        S_IDLE: if (start) begin
          cols_q <= pu_cols;
          w4_q   <= w4;      h4_q  <= h4;
          pu_idx <= MV_AW'(32'(pu_row) * 32'(pu_cols) + 32'(pu_col));
          avl_l  <= (pu_col != 0);
          avl_a  <= (pu_row != 0);
          avl_la <= (pu_col != 0) && (pu_row != 0);
          rd_cnt <= '0;
          have_best <= 1'b0;
          med_sent  <= 1'b0;
          rounds    <= '0;
          busy      <= 1'b1;
          state     <= S_START_POINT;
        end

        // Read MV_L, MV_A, MV_LA (one per cycle, data one cycle later), then SAD of (0,0).
        S_START_POINT: begin
          rd_cnt <= rd_cnt + 1'b1;
          // mv_rd_en/mv_rd_addr are registered, so a read issued in step n
          // returns its data in step n+2.
          case (rd_cnt)
            3'd0: begin mv_rd_en <= avl_l;  mv_rd_addr <= idx_l;  end
            3'd1: begin mv_rd_en <= avl_a;  mv_rd_addr <= idx_a;  end
            3'd2: begin mv_rd_en <= avl_la; mv_rd_addr <= idx_la;
                        mv_l <= avl_l ? mv_rd_data : '0; end
            3'd3: mv_a <= avl_a ? mv_rd_data : '0;
            default: begin
              mv_la     <= avl_la ? mv_rd_data : '0;
              ref_rd    <= 1'b1;
              sad_mv    <= '0;
              cand_dis  <= '0;
              ret_state <= S_SAD_MV_MEDIAN;
              state     <= S_WAIT_SAD;
            end
          endcase
        end

        S_WAIT_SAD: if (sad_done) begin
          if (!have_best || sad_in < best_sad) begin
            best_mv  <= sad_mv;
            best_sad <= sad_in;
            best_dis <= cand_dis;
          end
          have_best <= 1'b1;
          state     <= ret_state;
        end

        S_SAD_MV_MEDIAN: begin
          if (!med_sent && median != '0 && in_range(median)) begin
            med_sent  <= 1'b1;
            ref_rd    <= 1'b1;
            sad_mv    <= median;
            cand_dis  <= '0;
            ret_state <= S_SAD_MV_MEDIAN;
            state     <= S_WAIT_SAD;
          end else begin
            // best point so far is the start point of the first search stage
            center   <= best_mv;
            best_dis <= '0;
            pidx     <= '0;
            state    <= S_FIRST_SEARCH;
          end
        end

        S_FIRST_SEARCH, S_SECOND_SEARCH: begin
          if (pidx < 6'(PAT_POINTS)) begin
            pidx <= pidx + 1'b1;
            if (in_range(cand_pat)) begin
              ref_rd    <= 1'b1;
              sad_mv    <= cand_pat;
              cand_dis  <= 5'(pattern_dist(pidx));
              ret_state <= state;
              state     <= S_WAIT_SAD;
            end
          end else if (best_dis == 0) begin
            state <= S_DONE;
          end else if (best_dis <= 2) begin
            nb_center <= best_mv;
            nidx      <= '0;
            state     <= S_SEARCH_NEIGHBOR;
          end else if (state == S_FIRST_SEARCH && best_dis > 5'(RASTER_DIST)) begin
            rx    <= '0;
            ry    <= '0;
            state <= S_SEARCH_SCAN20;
          end else if (32'(rounds) == MAX_ROUNDS) begin
            state <= S_DONE;
          end else begin
            rounds   <= rounds + 1'b1;
            center   <= best_mv;
            best_dis <= '0;
            pidx     <= '0;
            state    <= S_SECOND_SEARCH;
          end
        end

        S_SEARCH_NEIGHBOR: begin
          if (nidx < 4'd8) begin
            nidx <= nidx + 1'b1;
            if (in_range(cand_nb)) begin
              ref_rd    <= 1'b1;
              sad_mv    <= cand_nb;
              cand_dis  <= '0;
              ret_state <= S_SEARCH_NEIGHBOR;
              state     <= S_WAIT_SAD;
            end
          end else if (32'(rounds) == MAX_ROUNDS) begin
            state <= S_DONE;
          end else begin
            rounds   <= rounds + 1'b1;
            center   <= best_mv;
            best_dis <= '0;
            pidx     <= '0;
            state    <= S_SECOND_SEARCH;
          end
        end

        S_SEARCH_SCAN20: begin
          if (ry < 3'(RASTER_N)) begin
            if (rx == 3'(RASTER_N - 1)) begin
              rx <= '0;
              ry <= ry + 1'b1;
            end else begin
              rx <= rx + 1'b1;
            end
            ref_rd    <= 1'b1;
            sad_mv    <= cand_ras;
            cand_dis  <= '0;
            ret_state <= S_SEARCH_SCAN20;
            state     <= S_WAIT_SAD;
          end else begin
            rounds   <= rounds + 1'b1;
            center   <= best_mv;
            best_dis <= '0;
            pidx     <= '0;
            state    <= S_SECOND_SEARCH;
          end
        end

        S_DONE: begin
          mv_wr_en   <= 1'b1;
          mv_wr_addr <= pu_idx;
          mv_wr_data <= best_mv;
          done       <= 1'b1;
          busy       <= 1'b0;
          state      <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // A SAD result is only expected while waiting for one, and requests are one-cycle pulses.
  a_done_in_wait: assert property (@(posedge clk) disable iff (!rst_n) sad_done |-> state == S_WAIT_SAD);
  a_req_pulse:    assert property (@(posedge clk) disable iff (!rst_n) ref_rd |=> !ref_rd);

endmodule
