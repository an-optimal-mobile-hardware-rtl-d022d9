// tb_mv_ram: random writes and reads of the motion vector memory against an array model,
// including a read of an address written in the same cycle (old value expected).
module tb_mv_ram;
  import ime_pkg::*;
  localparam int DEPTH = 32400;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [14:0] rd_addr, wr_addr;
  mv_t rd_data, wr_data;
  mv_t model [DEPTH];
  bit  written [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mv_ram dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 15'($urandom % DEPTH); wr_data = mv_t'($urandom);
      model[wr_addr] = wr_data; written[wr_addr] = 1;
    end
    @(negedge clk) wr_en = 0;
    for (int n = 0; n < 4000; n++) begin
      do a = $urandom % DEPTH; while (!written[a]);
      @(negedge clk);
      rd_en = 1; rd_addr = 15'(a);
      wr_en = (n % 4 == 0); wr_addr = 15'(a); wr_data = mv_t'($urandom);
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      checks++;
      if (rd_data !== model[a]) begin
        failures++; $display("FAIL addr %0d: %h exp %h", a, rd_data, model[a]);
      end
      if (n % 4 == 0) model[a] = wr_data;
    end
    // last address and address 0
    @(negedge clk); wr_en = 1; wr_addr = 15'(DEPTH-1); wr_data = '{x: -8'sd64, y: 8'sd64};
    @(negedge clk); wr_en = 0; rd_en = 1; rd_addr = 15'(DEPTH-1);
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_data.x != -8'sd64 || rd_data.y != 8'sd64) begin failures++; $display("FAIL last entry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
