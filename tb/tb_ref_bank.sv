// tb_ref_bank: writes random 32-bit words into one reference bank and reads the four
// byte lanes at independent addresses, checking each lane's pixel one cycle later.
module tb_ref_bank;
  import ime_pkg::*;
  localparam int DEPTH = 2304;
  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [11:0] wr_addr;
  row_t wr_row, rd_row;
  logic [3:0][11:0] rd_addr;
  row_t model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ref_bank dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 12'(a); wr_row = $urandom;
      model[a] = wr_row;
    end
    @(negedge clk) wr_en = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [3:0][11:0] a;
      for (int l = 0; l < 4; l++) a[l] = 12'($urandom % DEPTH);
      @(negedge clk);
      rd_en = 1; rd_addr = a;
      @(negedge clk);
      rd_en = 0;
      rd_addr = '0;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (rd_row[8*l +: 8] !== model[a[l]][8*l +: 8]) begin
          failures++;
          $display("FAIL lane %0d addr %0d: %h exp %h", l, a[l], rd_row[8*l +: 8], model[a[l]][8*l +: 8]);
        end
      end
      // read enable low holds the output
      @(negedge clk);
      checks++;
      if (rd_row[7:0] !== model[a[0]][7:0]) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
