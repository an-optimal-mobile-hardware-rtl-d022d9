// tb_ref_addr_gen: for random search points and PU sizes, checks the 16 bank/lane
// addresses of every 4x4 block, computed here from picture coordinates, the block
// order, the first/last flags, the sub-word offsets and that block k appears k+1 cycles
// after start.
module tb_ref_addr_gen;
  import ime_pkg::*;
  localparam int WIN = 192, WPR = 48, AW = 12;
  logic clk = 0, rst_n = 0, start = 0;
  mv_t mv;
  logic [4:0] w4, h4;
  logic addr_valid, first, last;
  logic [3:0][3:0][AW-1:0] addr;
  logic [1:0] xo, yo;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  ref_addr_gen dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
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
    start = 0; mv = '0;
    while (k < n && cyc < t0 + n + 10) begin
      if (addr_valid) begin
        int bx = k % bw, by = k / bw;
        int x0 = SR + mx + 4 * bx, y0 = SR + my + 4 * by;
        bit bad = 0;
        for (int b = 0; b < 4; b++) begin
          int y = -1;
          for (int r = 0; r < 4; r++) if ((y0 + r) % 4 == b) y = y0 + r;
          for (int l = 0; l < 4; l++) begin
            int x = -1;
            for (int i = 0; i < 4; i++) if ((x0 + i) % 4 == l) x = x0 + i;
            if (int'(addr[b][l]) != (y / 4) * WPR + x / 4) bad = 1;
          end
        end
        if (int'(xo) != x0 % 4 || int'(yo) != y0 % 4) bad = 1;
        if (first != (k == 0) || last != (k == n - 1)) bad = 1;
        if (cyc != t0 + 1 + k) bad = 1;
        checks++;
        if (bad) begin
          failures++;
          $display("FAIL mv=(%0d,%0d) size %0dx%0d block %0d", mx, my, bw, bh, k);
        end
        k++;
      end
      @(negedge clk);
    end
    checks++;
    if (k != n || addr_valid) begin failures++; $display("FAIL block count %0d of %0d", k, n); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    walk(0, 0, 16, 16);
    walk(-64, -64, 16, 16);
    walk(64, 64, 16, 16);
    walk(-63, 17, 16, 16);
    walk(5, -3, 2, 1);
    walk(1, 2, 1, 1);
    for (int i = 0; i < 40; i++)
      walk(int'($urandom % 129) - 64, int'($urandom % 129) - 64, 1 + $urandom % 16, 1 + $urandom % 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
