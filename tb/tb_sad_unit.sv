// tb_sad_unit: streams PUs of random 4x4 blocks (64x64 = 256 blocks, 1 block, 8 blocks,
// with and without gaps) through the SAD unit and checks the PU SAD against a direct sum
// and that sad_done comes exactly one cycle after the last block.
module tb_sad_unit;
  import ime_pkg::*;
  logic clk = 0, rst_n = 0;
  logic blk_valid = 0, blk_first = 0, blk_last = 0;
  blk_t ref_blk, cur_blk;
  logic sad_done;
  sad_t sad;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  sad_unit dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int blk_sad(blk_t a, blk_t b);
    int s = 0;
    for (int i = 0; i < 16; i++) begin
      int x = int'(a[8*i +: 8]), y = int'(b[8*i +: 8]);
      s += (x > y) ? x - y : y - x;
    end
    return s;
  endfunction

  task automatic run_pu(int n, bit gaps, bit extreme);
    int exp_sad = 0, t_last;
    for (int k = 0; k < n; k++) begin
      if (gaps && ($urandom % 3 == 0)) begin
        @(negedge clk); blk_valid = 0;
      end
      @(negedge clk);
      blk_valid = 1; blk_first = (k == 0); blk_last = (k == n - 1);
      for (int w = 0; w < 4; w++) begin
        ref_blk[32*w +: 32] = extreme ? 32'hFFFFFFFF : $urandom;
        cur_blk[32*w +: 32] = extreme ? 32'h00000000 : $urandom;
      end
      exp_sad += blk_sad(ref_blk, cur_blk);
    end
    t_last = cyc;
    @(negedge clk);
    blk_valid = 0; blk_first = 0; blk_last = 0;
    checks++;
    if (!sad_done || cyc != t_last + 1) begin
      failures++; $display("FAIL done timing n=%0d done=%b", n, sad_done);
    end
    checks++;
    if (int'(sad) != exp_sad) begin
      failures++; $display("FAIL n=%0d sad=%0d exp=%0d", n, sad, exp_sad);
    end
    @(negedge clk);
    checks++;
    if (sad_done) begin failures++; $display("FAIL done not a pulse"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_pu(256, 0, 1);   // largest SAD: 64*64*255
    run_pu(256, 0, 0);
    run_pu(1, 0, 0);
    run_pu(8, 1, 0);
    run_pu(256, 1, 0);
    for (int i = 0; i < 10; i++) run_pu(1 + $urandom % 64, i % 2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
