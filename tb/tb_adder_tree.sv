// Testbench of adder_tree: the 16-input, 8-bit configuration used by the
// SAD unit and a 5-input one (padded tree), with random and extreme inputs,
// compared with a software sum.
module tb_adder_tree;
  int checks = 0, failures = 0;

  logic [15:0][7:0] d16;  logic [11:0] s16;
  logic [4:0][5:0]  d5;   logic [8:0]  s5;

  adder_tree #(.N(16), .IN_W(8), .OUT_W(12)) dut16 (.din(d16), .sum(s16));
  adder_tree #(.N(5),  .IN_W(6), .OUT_W(9))  dut5  (.din(d5),  .sum(s5));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5000; k++) begin
      int e16, e5;
      e16 = 0; e5 = 0;
      for (int i = 0; i < 16; i++) begin
        d16[i] = (k == 0) ? 8'hff : (k == 1) ? 8'h00 : 8'($urandom);
        e16 += int'(d16[i]);
      end
      for (int i = 0; i < 5; i++) begin
        d5[i] = (k == 0) ? 6'h3f : 6'($urandom);
        e5 += int'(d5[i]);
      end
      #1;
      checks += 2;
      if (int'(s16) != e16) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 got %0d exp %0d", s16, e16);
      end
      if (int'(s5) != e5) begin
        failures++;
        if (failures < 10) $display("FAIL N=5 got %0d exp %0d", s5, e5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
