// rwd_model_pkg: untimed reference model of the Rotating-W-Diamond integer search,
// used by the searcher and top-level testbenches to predict the chosen vector, its SAD,
// the number of SAD evaluations and which search branches ran.
// The SAD of a point comes from the virtual function cost(), which each testbench
// overrides with its own picture data. The model walks the points in the same order
// as the hardware and also keeps the best point only on a strictly smaller SAD.
package rwd_model_pkg;

  localparam int SR = 64;

  class rwd_model;
    int max_rounds = 16;
    // results
    int best_x, best_y, best_sad, best_dis;
    bit have;
    int evals, skips;
    int ctl;          // control-only steps: one per pattern round, neighbour and raster search
    int n_neighbor, n_raster, n_second, n_early_stop, n_median_win, n_zero_win;

    virtual function int cost(int x, int y);
      return 0;
    endfunction

    function bit in_range(int x, int y);
      return x >= -SR && x <= SR && y >= -SR && y <= SR;
    endfunction

    // Point p (0..39) of the pattern: ring r = p/8 at distance d = 2^r; even rings are
    // squares (corners at (+-d, +-d)), odd rings diamonds (corners at (+-d/2, +-d/2)).
    function void pat(int p, output int dx, output int dy);
      int r = p / 8, k = p % 8, d = 1 << (p / 8), h;
      int ax[8] = '{1, 1, 0, -1, -1, -1, 0, 1};
      int ay[8] = '{0, 1, 1, 1, 0, -1, -1, -1};
      h = (r % 2 == 1) ? d / 2 : d;
      if (k % 2 == 0) begin dx = ax[k] * d; dy = ay[k] * d; end
      else            begin dx = ax[k] * h; dy = ay[k] * h; end
    endfunction

    function void eval(int x, int y, int dis);
      int s;
      evals++;
      s = cost(x, y);
      if (!have || s < best_sad) begin
        best_x = x; best_y = y; best_sad = s; best_dis = dis;
      end
      have = 1;
    endfunction

    function void pattern_round();
      int cx = best_x, cy = best_y, dx, dy;
      best_dis = 0;
      ctl++;
      for (int p = 0; p < 40; p++) begin
        pat(p, dx, dy);
        if (in_range(cx + dx, cy + dy)) eval(cx + dx, cy + dy, 1 << (p / 8));
        else skips++;
      end
    endfunction

    function int med3(int a, int b, int c);
      int lo = a < b ? a : b, hi = a < b ? b : a;
      return c < lo ? lo : (c > hi ? hi : c);
    endfunction

    // Neighbour vectors already resolved (a missing neighbour is passed as 0, 0).
    function void run(int lx, int ly, int ax, int ay, int lax, int lay);
      int mx, my, rounds, dx, dy;
      bit stage2;
      have = 0; evals = 0; skips = 0; ctl = 0;
      eval(0, 0, 0);
      mx = med3(lx, ax, lax);
      my = med3(ly, ay, lay);
      if ((mx != 0 || my != 0) && in_range(mx, my)) begin
        eval(mx, my, 0);
        if (best_x == mx && best_y == my) n_median_win++;
        else n_zero_win++;
      end
      pattern_round();
      stage2 = 0;
      rounds = 0;
      forever begin
        if (best_dis == 0) begin
          if (!stage2) n_early_stop++;
          break;
        end else if (best_dis <= 2) begin
          int nx = best_x, ny = best_y;
          n_neighbor++;
          ctl++;
          for (int n = 0; n < 8; n++) begin
            pat(n, dx, dy);
            if (in_range(nx + dx, ny + dy)) eval(nx + dx, ny + dy, 0);
            else skips++;
          end
          if (rounds == max_rounds) break;
        end else if (!stage2 && best_dis > 5) begin
          n_raster++;
          ctl++;
          for (int ry = 0; ry < 7; ry++)
            for (int rx = 0; rx < 7; rx++)
              eval(-60 + 20 * rx, -60 + 20 * ry, 0);
        end else if (rounds == max_rounds) break;
        rounds++;
        stage2 = 1;
        n_second++;
        pattern_round();
      end
    endfunction
  endclass

endpackage
