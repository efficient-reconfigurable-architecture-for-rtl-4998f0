// Testbench of local_memory: loads three random blocks through the DEMUX
// (select 0, 1, 2) and checks that the row written last is visible on
// cand_row for the selected candidate memory, that select 3 writes nothing,
// and that rotating SUBM1 replays the current block in order twice while
// SUBM2 and SUBM3 are unaffected by rotation.
module tb_local_memory;
  import me_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       wr_en = 0, rot_en = 0, rd_sel = 0;
  logic [1:0] wr_sel = 0;
  row_t din, cur_row, cand_row;
  row_t blk [3][ME_BLK];

  local_memory dut (.clk, .wr_en, .wr_sel, .rot_en, .rd_sel, .din, .cur_row, .cand_row);

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
    for (int m = 0; m < 3; m++)
      for (int r = 0; r < ME_BLK; r++)
        for (int i = 0; i < ME_BLK; i++) blk[m][r][i] = 8'($urandom);
    @(negedge clk);
    for (int m = 0; m < 3; m++)
      for (int r = 0; r < ME_BLK; r++) begin
        wr_en = 1; wr_sel = 2'(m); din = blk[m][r];
        @(negedge clk);
        if (m > 0) begin
          rd_sel = (m == 2);
          #1 chk(cand_row, blk[m][r], "cand_row after write");
        end
      end
    // select 3 must not write anything
    wr_sel = 2'd3; din = '1;
    @(negedge clk);
    wr_en = 0;
    rd_sel = 0; #1 chk(cand_row, blk[1][ME_BLK-1], "SUBM2 untouched by sel 3");
    rd_sel = 1; #1 chk(cand_row, blk[2][ME_BLK-1], "SUBM3 untouched by sel 3");
    chk(cur_row, blk[0][0], "SUBM1 tail");
    for (int pass = 0; pass < 2; pass++)
      for (int r = 0; r < ME_BLK; r++) begin
        chk(cur_row, blk[0][r], "replayed current row");
        rot_en = 1;
        @(negedge clk);
      end
    rot_en = 0;
    rd_sel = 0; #1 chk(cand_row, blk[1][ME_BLK-1], "SUBM2 not rotated");
    rd_sel = 1; #1 chk(cand_row, blk[2][ME_BLK-1], "SUBM3 not rotated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
