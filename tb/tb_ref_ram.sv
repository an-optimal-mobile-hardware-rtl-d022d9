// tb_ref_ram: loads a 192x192 reference window with pixel value p(x,y) = hash of (x,y),
// then requests search points across the whole range and PU sizes, and checks every
// delivered 4x4 block against the window and its timing: block k in cycle start+2+k,
// so a 64x64 PU is read in 16*16+1 cycles after the request.
module tb_ref_ram;
  import ime_pkg::*;
  localparam int WIN = 192;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, start = 0;
  logic [7:0] wr_y;
  logic [5:0] wr_c;
  row_t wr_row;
  mv_t mv;
  logic [4:0] w4, h4;
  logic blk_valid, blk_first, blk_last;
  blk_t blk;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  ref_ram dut (.*);

  function automatic logic [7:0] pix(int x, int y);
    return 8'((x * 37) ^ (y * 101) ^ ((x * y) >> 3));
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic walk(int mx, int my, int bw, int bh);
    int t0, k = 0, n = bw * bh;
    @(negedge clk);
    start = 1; mv.x = 8'(mx); mv.y = 8'(my); w4 = 5'(bw); h4 = 5'(bh);
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (k < n && cyc < t0 + n + 10) begin
      if (blk_valid) begin
        int bx = k % bw, by = k / bw;
        bit bad = 0;
        for (int j = 0; j < 4; j++)
          for (int i = 0; i < 4; i++)
            if (blk[32*j + 8*i +: 8] !== pix(SR + mx + 4*bx + i, SR + my + 4*by + j)) bad = 1;
        if (blk_first != (k == 0) || blk_last != (k == n - 1)) bad = 1;
        if (cyc != t0 + 2 + k) bad = 1;
        checks++;
        if (bad) begin
          failures++;
          $display("FAIL mv=(%0d,%0d) size %0dx%0d block %0d at +%0d", mx, my, bw, bh, k, cyc - t0);
        end
        k++;
      end
      @(negedge clk);
    end
    checks++;
    if (k != n || blk_valid) begin failures++; $display("FAIL block count %0d of %0d", k, n); end
    // whole 64x64 PU: last block leaves 16*16+1 cycles after the request cycle
    if (n == 256) begin
      checks++;
      if (cyc - 1 - t0 != 16*16 + 1) begin failures++; $display("FAIL PU read time"); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < WIN; y++)
      for (int c = 0; c < WIN/4; c++) begin
        @(negedge clk);
        wr_en = 1; wr_y = 8'(y); wr_c = 6'(c);
        for (int i = 0; i < 4; i++) wr_row[8*i +: 8] = pix(4*c + i, y);
      end
    @(negedge clk) wr_en = 0;
    walk(0, 0, 16, 16);
    walk(-64, -64, 16, 16);
    walk(64, 64, 16, 16);
    walk(-63, 63, 16, 16);
    walk(1, 1, 16, 16);
    walk(2, 3, 16, 16);
    walk(-1, -2, 2, 4);
    for (int i = 0; i < 30; i++)
      walk(int'($urandom % 129) - 64, int'($urandom % 129) - 64, 1 + $urandom % 16, 1 + $urandom % 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
