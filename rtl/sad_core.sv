// sad_core: sum of absolute differences of four pixel pairs (one 4-pixel row).
//
// Each absolute difference avoids a subtractor followed by a negation. The core forms
// D = A + ~B as a 9-bit sum, which equals A - B - 1 + 256. Its carry out (the MSB) is 1
// exactly when A > B; then |A-B| = D[7:0] + 1. Otherwise |A-B| = B - A = ~D[7:0].
// This is the complement-adder formulation of the absolute difference the IME
// datapath is built on; the four differences are then added in a two-level tree.
//
// Interface: ref_row and cur_row hold four 8-bit pixels each (pixel i in bits
// [8*i +: 8]); sad is their 10-bit SAD. Purely combinational, no latency.
module sad_core
  import ime_pkg::*;
(
  input  row_t        ref_row,
  input  row_t        cur_row,
  output logic [9:0]  sad
);

  logic [3:0][PIX_W-1:0] ad;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic [PIX_W:0] d;
      d = {1'b0, ref_row[PIX_W*i +: PIX_W]} + {1'b0, ~cur_row[PIX_W*i +: PIX_W]};
      if (d[PIX_W]) ad[i] = d[PIX_W-1:0] + PIX_W'(1);
      else          ad[i] = ~d[PIX_W-1:0];
    end
  end

  assign sad = (10'(ad[0]) + 10'(ad[1])) + (10'(ad[2]) + 10'(ad[3]));

endmodule
