// Testbench of ks_comparator: exhaustive 8-bit check and random 16-bit check
// of the less-than and equal flags.
module tb_ks_comparator;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;   logic lt8, eq8;
  logic [15:0] a16, b16; logic lt16, eq16;

  ks_comparator #(.W(8))  dut8  (.a(a8),  .b(b8),  .lt(lt8),  .eq(eq8));
  ks_comparator #(.W(16)) dut16 (.a(a16), .b(b16), .lt(lt16), .eq(eq16));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (lt8 != (i < j) || eq8 != (i == j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d vs %0d lt=%b eq=%b", i, j, lt8, eq8);
        end
      end
    for (int k = 0; k < 10000; k++) begin
      a16 = 16'($urandom);
      b16 = (k % 7 == 0) ? a16 : (k % 5 == 0) ? a16 + 16'd1 : 16'($urandom);
      #1;
      checks++;
      if (lt16 != (a16 < b16) || eq16 != (a16 == b16)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
