// tb_ime_1080p: the 1080p workload. Two full rows of 64x64 PUs of a 1920x1080 frame
// (30 PUs per row, 60 in all) are searched in raster order with the unit at its
// default parameters. The reference frame is a smooth synthetic picture (two sine
// patterns plus a small ripple); the current frame is the reference moved by a global motion of (5, -3)
// pixels, so the true vector is known. Reference pixels outside the frame repeat the
// nearest edge pixel. Each PU's vector, SAD and number of SAD points are checked
// against the untimed search model, with SADs computed directly from the pictures,
// and the exact search time against 7 + 260 per point + 1 per skipped point + 1 per
// control step. At the end it prints the average cycles per PU and the frame rate
// this gives at 148 MHz for a 510-PU 1080p frame, and checks that at least half of the
// PUs found the true motion.
module tb_ime_1080p;
  import ime_pkg::*;
  import rwd_model_pkg::*;

  localparam int WIN = 192, FW = 1920, FH = 1080, ROWS = 2, COLS = FW / 64;
  localparam int GX = 5, GY = -3;

  byte unsigned win [WIN][WIN];
  byte unsigned cur [64][64];

  class pic_model extends rwd_model;
    virtual function int cost(int x, int y);
      int s = 0;
      for (int j = 0; j < 64; j++)
        for (int i = 0; i < 64; i++) begin
          int a = int'(cur[j][i]), b = int'(win[SR + y + j][SR + x + i]);
          s += a > b ? a - b : b - a;
        end
      return s;
    endfunction
  endclass

  // Reference frame pixel, edge-replicated outside the frame.
  function automatic byte unsigned refpix(int x, int y);
    real v;
    x = x < 0 ? 0 : (x >= FW ? FW - 1 : x);
    y = y < 0 ? 0 : (y >= FH ? FH - 1 : y);
    v = 128.0 + 60.0 * $sin(x / 37.0) * $cos(y / 29.0) + 25.0 * $sin((x + 2 * y) / 23.0);
    return byte'(int'(v) + ((x * 3 + y * 5) % 3));
  endfunction

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

  int checks = 0, failures = 0, cyc = 0, n_req = 0, n_true = 0;
  longint search_cycles = 0;
  pic_model m;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (dut.ref_rd) n_req++;

  ime_top dut (.*);

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_pu(int c, int r);
    int x0 = 64 * c - SR, y0 = 64 * r - SR;
    for (int y = 0; y < WIN; y++)
      for (int x = 0; x < WIN; x++) win[y][x] = refpix(x0 + x, y0 + y);
    // current frame = reference moved by (GX, GY): cur(X, Y) = ref(X + GX, Y + GY)
    for (int y = 0; y < 64; y++)
      for (int x = 0; x < 64; x++) cur[y][x] = win[SR + GY + y][SR + GX + x];
    for (int y = 0; y < WIN; y++)
      for (int wc = 0; wc < WIN/4; wc++) begin
        @(negedge clk);
        ref_wr_en = 1; ref_wr_y = 8'(y); ref_wr_c = 6'(wc);
        for (int i = 0; i < 4; i++) ref_wr_row[8*i +: 8] = win[y][4*wc + i];
      end
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      ref_wr_en = 0;
      cur_wr_en = 1; cur_wr_addr = 8'(a);
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++) cur_wr_blk[32*j + 8*i +: 8] = cur[4*(a/16) + j][4*(a%16) + i];
    end
    @(negedge clk);
    ref_wr_en = 0; cur_wr_en = 0;
  endtask

  int res_x [ROWS][COLS], res_y [ROWS][COLS];

  initial begin
    m = new();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        automatic int lx = 0, ly = 0, ax = 0, ay = 0, lax = 0, lay = 0, t0, reqs, expc;
        load_pu(c, r);
        if (c > 0) begin lx = res_x[r][c-1]; ly = res_y[r][c-1]; end
        if (r > 0) begin ax = res_x[r-1][c]; ay = res_y[r-1][c]; end
        if (r > 0 && c > 0) begin lax = res_x[r-1][c-1]; lay = res_y[r-1][c-1]; end
        m.run(lx, ly, ax, ay, lax, lay);
        @(negedge clk);
        start = 1; pu_col = 8'(c); pu_row = 8'(r); pu_cols = 8'(COLS); w4 = 5'd16; h4 = 5'd16;
        reqs = n_req; t0 = cyc;
        @(negedge clk);
        start = 0;
        while (!done) @(negedge clk);
        search_cycles += cyc - t0;
        expc = 7 + m.evals * 260 + m.skips + m.ctl;
        checks += 3;
        if (int'(best_mv.x) != m.best_x || int'(best_mv.y) != m.best_y || int'(best_sad) != m.best_sad) begin
          failures++;
          $display("FAIL PU (%0d,%0d) mv=(%0d,%0d) sad=%0d, model (%0d,%0d) sad=%0d", c, r,
                   int'(best_mv.x), int'(best_mv.y), best_sad, m.best_x, m.best_y, m.best_sad);
        end
        if (n_req - reqs != m.evals) begin
          failures++; $display("FAIL PU (%0d,%0d): %0d SAD points, model %0d", c, r, n_req - reqs, m.evals);
        end
        if (cyc - t0 != expc) begin
          failures++; $display("FAIL PU (%0d,%0d): %0d cycles, expected %0d", c, r, cyc - t0, expc);
        end
        if (m.best_x == GX && m.best_y == GY) n_true++;
        res_x[r][c] = m.best_x; res_y[r][c] = m.best_y;
      end
    $display("%0d PUs, %0d found the true motion (%0d,%0d); average %0d cycles per 64x64 PU",
             ROWS * COLS, n_true, GX, GY, search_cycles / (ROWS * COLS));
    $display("at 148 MHz: %0d frames/s for 510 PUs per 1080p frame (target 30)",
             148000000 / (510 * (search_cycles / (ROWS * COLS))));
    // the picture is smooth enough that the search should find the global motion
    checks++;
    if (n_true < ROWS * COLS / 2) begin failures++; $display("FAIL true motion found for only %0d PUs", n_true); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
