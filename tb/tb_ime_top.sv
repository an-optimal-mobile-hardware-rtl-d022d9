// tb_ime_top: end-to-end test of the IME unit at its default sizes (192x192 reference
// window, 64x64 PUs, 1080p MV memory).
// A 4x3 grid of PUs is searched in raster order. For each PU the testbench loads a
// reference window (a paraboloid, optionally with a texture) and a current PU cut from
// that window at a chosen true displacement, then starts the search. An untimed model
// of the Rotating-W-Diamond search with SADs computed directly from the same pictures
// predicts the vector, the SAD and the number of SAD evaluations.
// Also checked: each SAD takes n_blocks+2 cycles from request to result (258 for a
// 64x64 PU); the whole search takes exactly 7 + (n_blocks+4) per point + 1 per skipped
// point + 1 per pattern round, neighbour or raster search; and every search mechanism
// happened at least once: median start, zero start, early stop in the first stage,
// neighbour search, raster search, second-stage rounds, points skipped outside the
// search range, and PU sizes other than 64x64.
module tb_ime_top;
  import ime_pkg::*;
  import rwd_model_pkg::*;

  localparam int WIN = 192;

  byte unsigned win [WIN][WIN];     // [y][x]
  byte unsigned cur [64][64];       // [y][x]

  class pic_model extends rwd_model;
    int pw, ph;
    virtual function int cost(int x, int y);
      int s = 0;
      for (int j = 0; j < ph; j++)
        for (int i = 0; i < pw; i++) begin
          int a = int'(cur[j][i]), b = int'(win[SR + y + j][SR + x + i]);
          s += a > b ? a - b : b - a;
        end
      return s;
    endfunction
  endclass

  logic clk = 0, rst_n = 0;
  logic cur_wr_en = 0, ref_wr_en = 0, start = 0;
  logic [7:0] cur_wr_addr;
  blk_t cur_wr_blk;
  logic [7:0] ref_wr_y;
  logic [5:0] ref_wr_c;
  row_t ref_wr_row;
  logic [7:0] pu_col, pu_row, pu_cols;
  logic [4:0] w4, h4;
  logic busy, done;
  mv_t best_mv;
  sad_t best_sad;
  is_state_t search_state;

  int checks = 0, failures = 0, cyc = 0;
  int n_req = 0, n_lat_bad = 0, t_req = 0, cur_n = 0;
  int dut_neighbor = 0, dut_raster = 0;
  int n_small_pu = 0;
  is_state_t prev_state = S_IDLE;
  pic_model m;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  ime_top dut (.*);

  // Observe SAD requests and results inside the unit, and search-stage entries.
  always @(negedge clk) begin
    if (dut.ref_rd) begin n_req++; t_req = cyc; end
    if (dut.sad_done && cyc - t_req != cur_n + 2) n_lat_bad++;
    if (search_state == S_SEARCH_NEIGHBOR && prev_state != S_SEARCH_NEIGHBOR && prev_state != S_WAIT_SAD)
      dut_neighbor++;
    if (search_state == S_SEARCH_SCAN20 && prev_state != S_SEARCH_SCAN20 && prev_state != S_WAIT_SAD)
      dut_raster++;
    prev_state = search_state;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Picture: paraboloid centred at (cx, cy) plus an optional texture.
  task automatic make_window(int cx, int cy, int tex);
    for (int y = 0; y < WIN; y++)
      for (int x = 0; x < WIN; x++) begin
        int v = ((x - cx) * (x - cx) + (y - cy) * (y - cy)) >> 7;
        if (tex > 0) v += (((x * 7) ^ (y * 13)) % tex);
        win[y][x] = byte'(v > 255 ? 255 : v);
      end
  endtask

  task automatic load_pu(int tx, int ty, int pw, int ph);
    for (int y = 0; y < 64; y++)
      for (int x = 0; x < 64; x++)
        cur[y][x] = (x < pw && y < ph) ? win[SR + ty + y][SR + tx + x] : 8'd0;
    for (int y = 0; y < WIN; y++)
      for (int c = 0; c < WIN/4; c++) begin
        @(negedge clk);
        ref_wr_en = 1; ref_wr_y = 8'(y); ref_wr_c = 6'(c);
        for (int i = 0; i < 4; i++) ref_wr_row[8*i +: 8] = win[y][4*c + i];
      end
    for (int by = 0; by < ph/4; by++)
      for (int bx = 0; bx < pw/4; bx++) begin
        @(negedge clk);
        ref_wr_en = 0;
        cur_wr_en = 1; cur_wr_addr = 8'(by * (pw/4) + bx);
        for (int j = 0; j < 4; j++)
          for (int i = 0; i < 4; i++) cur_wr_blk[32*j + 8*i +: 8] = cur[4*by + j][4*bx + i];
      end
    @(negedge clk);
    ref_wr_en = 0; cur_wr_en = 0;
  endtask

  int res_x [3][4], res_y [3][4];
  // per PU: true displacement, paraboloid centre, texture, PU size
  int cfg [12][7] = '{
    '{ 0,   0,  96,  96,  0, 64, 64},   // exact co-located match: early stop
    '{ 1,   0,  60, 100,  0, 64, 64},   // best at distance 1: neighbour search
    '{40, -30, 100,  90,  0, 64, 64},   // far: raster search
    '{ 3,   5,  90, 110,  8, 32, 32},
    '{40, -30,  80,  80,  0, 64, 64},
    '{40, -30, 110,  70,  0, 64, 64},   // neighbours agree: median start
    '{ 2,   2,  96,  96, 12, 16,  8},
    '{-60, 60,  96,  96,  0, 64, 64},   // near the range edge: points skipped
    '{ 7,  -9,  70,  60,  4, 64, 64},
    '{-20, 30, 100, 100,  0,  8,  4},
    '{ 1,   1,  90,  90,  0, 64, 64},
    '{64, -64,  96,  96,  0, 64, 64}};

  initial begin
    m = new();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 4; c++) begin
        automatic int k = r*4 + c;
        automatic int lx = 0, ly = 0, ax = 0, ay = 0, lax = 0, lay = 0, t0, reqs;
        make_window(cfg[k][2], cfg[k][3], cfg[k][4]);
        load_pu(cfg[k][0], cfg[k][1], cfg[k][5], cfg[k][6]);
        if (cfg[k][5] != 64 || cfg[k][6] != 64) n_small_pu++;
        m.pw = cfg[k][5]; m.ph = cfg[k][6];
        if (c > 0) begin lx = res_x[r][c-1]; ly = res_y[r][c-1]; end
        if (r > 0) begin ax = res_x[r-1][c]; ay = res_y[r-1][c]; end
        if (r > 0 && c > 0) begin lax = res_x[r-1][c-1]; lay = res_y[r-1][c-1]; end
        m.run(lx, ly, ax, ay, lax, lay);
        cur_n = (cfg[k][5] / 4) * (cfg[k][6] / 4);
        @(negedge clk);
        start = 1; pu_col = 8'(c); pu_row = 8'(r); pu_cols = 8'd4;
        w4 = 5'(cfg[k][5] / 4); h4 = 5'(cfg[k][6] / 4);
        reqs = n_req; t0 = cyc;
        @(negedge clk);
        start = 0;
        while (!done) @(negedge clk);
        checks++;
        if (int'(best_mv.x) != m.best_x || int'(best_mv.y) != m.best_y || int'(best_sad) != m.best_sad) begin
          failures++;
          $display("FAIL PU %0d mv=(%0d,%0d) sad=%0d, model (%0d,%0d) sad=%0d", k,
                   int'(best_mv.x), int'(best_mv.y), best_sad, m.best_x, m.best_y, m.best_sad);
        end
        checks++;
        if (n_req - reqs != m.evals) begin
          failures++; $display("FAIL PU %0d: %0d SADs, model %0d", k, n_req - reqs, m.evals);
        end
        // search time: 7 fixed cycles (command, three MV reads, median decision, result)
        // + (n_blocks + 4) per SAD point + 1 per skipped point + 1 per control step
        checks++;
        if (cyc - t0 != 7 + m.evals * (cur_n + 4) + m.skips + m.ctl) begin
          failures++;
          $display("FAIL PU %0d took %0d cycles, expected %0d", k, cyc - t0,
                   7 + m.evals * (cur_n + 4) + m.skips + m.ctl);
        end
        $display("PU %0d true (%0d,%0d) found (%0d,%0d) sad %0d, %0d SADs, %0d cycles",
                 k, cfg[k][0], cfg[k][1], int'(best_mv.x), int'(best_mv.y), best_sad, n_req - reqs, cyc - t0);
        res_x[r][c] = m.best_x; res_y[r][c] = m.best_y;
      end
    checks++;
    if (n_lat_bad != 0) begin failures++; $display("FAIL %0d SADs with wrong latency", n_lat_bad); end
    checks += 2;
    if (dut_neighbor != m.n_neighbor) begin failures++; $display("FAIL neighbour searches %0d, model %0d", dut_neighbor, m.n_neighbor); end
    if (dut_raster != m.n_raster) begin failures++; $display("FAIL raster searches %0d, model %0d", dut_raster, m.n_raster); end
    $display("mechanisms: median-start %0d zero-start %0d early-stop %0d neighbour %0d raster %0d second-rounds %0d skipped %0d small-PU %0d",
             m.n_median_win, m.n_zero_win, m.n_early_stop, dut_neighbor, dut_raster, m.n_second, m.skips, n_small_pu);
    checks += 8;
    if (m.n_median_win == 0) begin failures++; $display("FAIL median start never happened"); end
    if (m.n_zero_win == 0)   begin failures++; $display("FAIL zero start never happened"); end
    if (m.n_early_stop == 0) begin failures++; $display("FAIL early stop never happened"); end
    if (dut_neighbor == 0)   begin failures++; $display("FAIL neighbour search never happened"); end
    if (dut_raster == 0)     begin failures++; $display("FAIL raster search never happened"); end
    if (m.n_second == 0)     begin failures++; $display("FAIL second search never happened"); end
    if (m.skips == 0)        begin failures++; $display("FAIL no point outside the range"); end
    if (n_small_pu == 0)     begin failures++; $display("FAIL no small PU"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
