// Testbench of abs_diff: exhaustive check of all 8-bit pixel pairs against
// the absolute value of the integer difference.
module tb_abs_diff;
  int checks = 0, failures = 0;
  logic [7:0] a, b, ad;

  abs_diff #(.W(8)) dut (.a(a), .b(b), .ad(ad));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int expd;
        a = 8'(i); b = 8'(j);
        #1;
        expd = (i > j) ? i - j : j - i;
        checks++;
        if (int'(ad) != expd) begin
          failures++;
          if (failures < 10) $display("FAIL |%0d-%0d| got %0d", i, j, ad);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
