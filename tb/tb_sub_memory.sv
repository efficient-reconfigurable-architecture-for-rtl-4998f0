// Testbench of sub_memory: writes a random 16x16 block row by row, checks
// head (newest row) after each write and tail (oldest row) once full, then
// rotates 16 times checking that the rows come out in write order and that
// the block is restored; finally checks that a write wins over a rotate.
module tb_sub_memory;
  import me_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, rot_en = 0;
  row_t din, head, tail;
  row_t blk [ME_BLK];

  sub_memory dut (.clk, .wr_en, .rot_en, .din, .head, .tail);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input row_t got, input row_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    for (int r = 0; r < ME_BLK; r++)
      for (int i = 0; i < ME_BLK; i++) blk[r][i] = 8'($urandom);
    @(negedge clk);
    for (int r = 0; r < ME_BLK; r++) begin
      wr_en = 1; din = blk[r];
      @(negedge clk);
      chk(head, blk[r], "head");
    end
    wr_en = 0;
    chk(tail, blk[0], "tail after fill");
    // idle cycles keep the contents
    repeat (3) @(negedge clk);
    chk(tail, blk[0], "tail hold");
    for (int r = 0; r < ME_BLK; r++) begin
      chk(tail, blk[r], "rotate order");
      rot_en = 1;
      @(negedge clk);
      chk(head, blk[r], "rotated head");
    end
    rot_en = 0;
    chk(tail, blk[0], "restored tail");
    chk(head, blk[ME_BLK-1], "restored head");
    // write has priority over rotate
    wr_en = 1; rot_en = 1; din = ~blk[3];
    @(negedge clk);
    wr_en = 0; rot_en = 0;
    chk(head, ~blk[3], "write priority head");
    chk(tail, blk[1], "write priority tail");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
