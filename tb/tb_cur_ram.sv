// tb_cur_ram: fills the current-PU memory with random blocks, then streams PUs of
// several sizes and checks every block's data and that block k arrives exactly k+1
// cycles after rd_start (one block per cycle, 256 cycles for a 64x64 PU).
module tb_cur_ram;
  import ime_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_start = 0;
  logic [7:0] wr_addr;
  blk_t wr_blk, blk;
  logic [8:0] n_blocks;
  logic blk_valid;
  blk_t model [256];
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  cur_ram dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic stream(int n);
    int t0, k = 0;
    @(negedge clk);
    rd_start = 1; n_blocks = 9'(n);
    t0 = cyc;
    @(negedge clk);
    rd_start = 0;
    while (k < n && cyc < t0 + n + 10) begin
      if (blk_valid) begin
        checks++;
        if (blk !== model[k] || cyc != t0 + 1 + k) begin
          failures++;
          $display("FAIL n=%0d k=%0d at +%0d: %h exp %h", n, k, cyc - t0, blk, model[k]);
        end
        k++;
      end
      @(negedge clk);
    end
    checks++;
    if (k != n || blk_valid) begin failures++; $display("FAIL n=%0d got %0d blocks", n, k); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 8'(a);
      wr_blk = {$urandom, $urandom, $urandom, $urandom};
      model[a] = wr_blk;
    end
    @(negedge clk) wr_en = 0;
    stream(256);
    stream(1);
    stream(2);
    stream(32);
    stream(4);
    stream(256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
