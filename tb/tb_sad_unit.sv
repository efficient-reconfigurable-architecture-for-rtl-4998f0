// Testbench of sad_unit: streams pairs of random 16x16 blocks (plus an
// all-equal and an all-maximum pair) row by row with the pipeline timing the
// controller uses, and compares the accumulated SAD with a software SAD.
// Also checks that the accumulator restarts on acc_first and holds when
// acc_en is low.
module tb_sad_unit;
  import me_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0, ad_en = 0, acc_en = 0, acc_first = 0;
  row_t cur_row, ref_row;
  logic [ME_SAD_W-1:0] sad;
  row_t a [ME_BLK], b [ME_BLK];

  sad_unit dut (.clk, .rst_n, .cur_row, .ref_row, .ad_en, .acc_en, .acc_first, .sad);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int expd;
      expd = 0;
      for (int r = 0; r < ME_BLK; r++)
        for (int i = 0; i < ME_BLK; i++) begin
          a[r][i] = (t == 0) ? 8'd0 : (t == 1) ? 8'd77 : 8'($urandom);
          b[r][i] = (t == 0) ? 8'd255 : (t == 1) ? 8'd77 : 8'($urandom);
          expd += (a[r][i] > b[r][i]) ? int'(a[r][i] - b[r][i]) : int'(b[r][i] - a[r][i]);
        end
      // rows r enter at cycle r (ad_en), are accumulated at cycle r+1
      for (int c = 0; c <= ME_BLK; c++) begin
        ad_en     = (c < ME_BLK);
        if (c < ME_BLK) begin cur_row = a[c]; ref_row = b[c]; end
        acc_en    = (c >= 1);
        acc_first = (c == 1);
        @(negedge clk);
      end
      ad_en = 0; acc_en = 0; acc_first = 0;
      checks++;
      if (int'(sad) != expd) begin
        failures++;
        if (failures < 10) $display("FAIL block %0d sad %0d exp %0d", t, sad, expd);
      end
      // holds while idle
      cur_row = '1; ref_row = '0;
      @(negedge clk);
      checks++;
      if (int'(sad) != expd) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
