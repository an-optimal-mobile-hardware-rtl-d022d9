// tb_sad_core: exhaustive corner values and random rows for the four-pixel SAD core,
// checked against |a-b| computed directly.
module tb_sad_core;
  import ime_pkg::*;
  row_t       r, c;
  logic [9:0] sad;
  int checks = 0, failures = 0;

  sad_core dut (.ref_row(r), .cur_row(c), .sad(sad));

  function automatic int expect_sad(row_t a, row_t b);
    int s = 0;
    for (int i = 0; i < 4; i++) begin
      int x = int'(a[8*i +: 8]), y = int'(b[8*i +: 8]);
      s += (x > y) ? x - y : y - x;
    end
    return s;
  endfunction

  task automatic apply(row_t a, row_t b);
    r = a; c = b;
    #1;
    checks++;
    if (int'(sad) != expect_sad(a, b)) begin
      failures++;
      $display("FAIL ref=%h cur=%h sad=%0d exp=%0d", a, b, sad, expect_sad(a, b));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corners: equal, max/min both ways, off by one both ways
    apply('0, '0);
    apply('1, '0);
    apply('0, '1);
    apply(32'h01010101, 32'h00000000);
    apply(32'h00000000, 32'h01010101);
    apply(32'h80807F7F, 32'h7F7F8080);
    apply(32'hFF00FF00, 32'h00FF00FF);
    for (int a = 0; a < 256; a += 5)
      for (int b = 0; b < 256; b += 3)
        apply({8'(a), 8'(b), 8'(b), 8'(a)}, {8'(b), 8'(a), 8'(a), 8'(b)});
    for (int n = 0; n < 2000; n++) apply($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
