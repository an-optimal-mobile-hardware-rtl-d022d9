// tb_isearch: the search controller against the untimed Rotating-W-Diamond model.
// The SAD path is replaced by a responder that answers each request n_blocks+2 cycles
// after ref_rd with a synthetic cost surface: a V-shaped bowl around a per-PU target
// plus a deterministic ripple that creates local minima. PUs are searched in raster
// order of a 5x4 grid so that the median predictor sees real neighbour vectors.
// Checked: final vector and SAD, number of SAD requests, the vector written back to the
// MV memory and its address, cur_rd one cycle after ref_rd, and that every search
// branch (median start, zero start, early stop, neighbour, raster, second stage) ran.
module tb_isearch;
  import ime_pkg::*;
  import rwd_model_pkg::*;

  class surf_model extends rwd_model;
    int tx, ty, ripple;
    virtual function int cost(int x, int y);
      int dx = x > tx ? x - tx : tx - x;
      int dy = y > ty ? y - ty : ty - y;
      return 40 * (dx + dy) + ((((x + 70) * 13) ^ ((y + 70) * 29)) % (ripple + 1));
    endfunction
  endclass

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] pu_col, pu_row, pu_cols;
  logic [4:0] w4, h4, pw4, ph4;
  logic busy, done;
  mv_t best_mv;
  sad_t best_sad;
  is_state_t st;
  logic mv_rd_en, mv_wr_en;
  logic [14:0] mv_rd_addr, mv_wr_addr;
  mv_t mv_rd_data, mv_wr_data, sad_mv;
  logic ref_rd, cur_rd, sad_done = 0;
  logic [8:0] n_blocks;
  sad_t sad_in;

  int checks = 0, failures = 0, cyc = 0, n_req = 0;
  mv_t mvmem [32400];
  surf_model m;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  isearch dut (
    .clk, .rst_n, .start, .pu_col, .pu_row, .pu_cols, .w4, .h4,
    .busy, .done, .best_mv, .best_sad, .state_o(st), .pu_w4(pw4), .pu_h4(ph4),
    .mv_rd_en, .mv_rd_addr, .mv_rd_data, .mv_wr_en, .mv_wr_addr, .mv_wr_data,
    .ref_rd, .cur_rd, .sad_mv, .n_blocks, .sad_done, .sad_in
  );

  // MV memory model
  always @(posedge clk) begin
    if (mv_rd_en) mv_rd_data <= mvmem[mv_rd_addr];
    if (mv_wr_en) mvmem[mv_wr_addr] <= mv_wr_data;
  end

  // SAD responder: ref_rd in cycle T, cur_rd in T+1, sad_done in T+n_blocks+2.
  initial begin
    forever begin
      @(negedge clk);
      if (ref_rd) begin
        automatic int x = int'(sad_mv.x), y = int'(sad_mv.y), lat = int'(n_blocks) + 2;
        n_req++;
        @(negedge clk);
        checks++;
        if (!cur_rd) begin failures++; $display("FAIL cur_rd not one cycle after ref_rd"); end
        repeat (lat - 1) @(negedge clk);
        sad_done = 1; sad_in = SAD_W'(m.cost(x, y));
        @(negedge clk);
        sad_done = 0;
      end
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int res_x [4][5], res_y [4][5];
  int targets [20][2] = '{
    '{0, 0}, '{1, 0}, '{40, -30}, '{3, 5}, '{-2, 1},
    '{12, 12}, '{0, 0}, '{40, -30}, '{40, -30}, '{-50, 55},
    '{64, 64}, '{-64, -64}, '{7, -9}, '{40, -30}, '{2, 2},
    '{-20, 30}, '{1, 1}, '{0, -1}, '{25, 25}, '{40, -30}};

  initial begin
    m = new();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 5; c++) begin
        automatic int lx = 0, ly = 0, ax = 0, ay = 0, lax = 0, lay = 0, sizes;
        m.tx = targets[r*5+c][0]; m.ty = targets[r*5+c][1];
        m.ripple = (r == 2) ? 200 : 15;
        if (c > 0) begin lx = res_x[r][c-1]; ly = res_y[r][c-1]; end
        if (r > 0) begin ax = res_x[r-1][c]; ay = res_y[r-1][c]; end
        if (r > 0 && c > 0) begin lax = res_x[r-1][c-1]; lay = res_y[r-1][c-1]; end
        m.run(lx, ly, ax, ay, lax, lay);
        sizes = (r*5 + c) % 4;
        @(negedge clk);
        start = 1; pu_col = 8'(c); pu_row = 8'(r); pu_cols = 8'd5;
        w4 = (sizes == 0) ? 5'd16 : (sizes == 1) ? 5'd2 : (sizes == 2) ? 5'd4 : 5'd1;
        h4 = (sizes == 0) ? 5'd16 : (sizes == 1) ? 5'd4 : (sizes == 2) ? 5'd4 : 5'd2;
        n_req = 0;
        @(negedge clk);
        start = 0;
        while (!done) begin
          if (mv_wr_en) begin
            checks++;
            if (int'(mv_wr_addr) != r*5 + c || int'(mv_wr_data.x) != m.best_x || int'(mv_wr_data.y) != m.best_y) begin
              failures++; $display("FAIL MV write-back PU %0d", r*5+c);
            end
          end
          @(negedge clk);
        end
        checks++;
        if (int'(best_mv.x) != m.best_x || int'(best_mv.y) != m.best_y || int'(best_sad) != m.best_sad) begin
          failures++;
          $display("FAIL PU(%0d,%0d) mv=(%0d,%0d) sad=%0d, model (%0d,%0d) sad=%0d", c, r,
                   best_mv.x, best_mv.y, best_sad, m.best_x, m.best_y, m.best_sad);
        end
        checks++;
        if (n_req != m.evals) begin
          failures++; $display("FAIL PU(%0d,%0d) %0d SAD requests, model %0d", c, r, n_req, m.evals);
        end
        res_x[r][c] = m.best_x; res_y[r][c] = m.best_y;
        @(negedge clk);
      end
    $display("branches: median-start %0d zero-start %0d early-stop %0d neighbour %0d raster %0d second %0d",
             m.n_median_win, m.n_zero_win, m.n_early_stop, m.n_neighbor, m.n_raster, m.n_second);
    checks += 6;
    if (m.n_median_win == 0) begin failures++; $display("FAIL no median start"); end
    if (m.n_zero_win == 0)   begin failures++; $display("FAIL no zero start"); end
    if (m.n_early_stop == 0) begin failures++; $display("FAIL no early stop"); end
    if (m.n_neighbor == 0)   begin failures++; $display("FAIL no neighbour search"); end
    if (m.n_raster == 0)     begin failures++; $display("FAIL no raster search"); end
    if (m.n_second == 0)     begin failures++; $display("FAIL no second search"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
