// Testbench of ks_adder: exhaustive check of the 8-bit adder (all a, b, cin)
// and random checks of a 13-bit (non power of two) and a 1-bit instance
// against the built-in '+' operator.
module tb_ks_adder;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;   logic c8, co8;
  logic [12:0] a13, b13, s13; logic c13, co13;
  logic        a1, b1, s1, c1, co1;

  ks_adder #(.W(8))  dut8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  ks_adder #(.W(13)) dut13 (.a(a13), .b(b13), .cin(c13), .sum(s13), .cout(co13));
  ks_adder #(.W(1))  dut1  (.a(a1),  .b(b1),  .cin(c1),  .sum(s1),  .cout(co1));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(a); b8 = 8'(b); c8 = 1'(c);
          #1;
          checks++;
          if ({co8, s8} !== 9'(a + b + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 8b %0d+%0d+%0d = %0d", a, b, c, {co8, s8});
          end
        end
    for (int k = 0; k < 20000; k++) begin
      a13 = 13'($urandom); b13 = 13'($urandom); c13 = 1'($urandom);
      #1;
      checks++;
      if ({co13, s13} !== (14'(a13) + 14'(b13) + 14'(c13))) begin
        failures++;
        if (failures < 10) $display("FAIL 13b %0d+%0d+%0d", a13, b13, c13);
      end
    end
    for (int k = 0; k < 8; k++) begin
      {a1, b1, c1} = 3'(k);
      #1;
      checks++;
      if ({co1, s1} !== (2'(a1) + 2'(b1) + 2'(c1))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
