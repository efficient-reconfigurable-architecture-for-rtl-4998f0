// Testbench of decision_block: drives random SAD pairs and stored entries
// (with forced ties and first operations) in the controller's order
// (sad2_valid, then sad3_valid with the stored entry on mem_rdata) and
// checks the write enable, written entry and result against a reference
// model of the rules: candidate 3 wins only when strictly smaller; the
// winner replaces the stored entry when strictly better or on a first
// operation. Counts each outcome and fails if one never happened.
module tb_decision_block;
  import me_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0, sad2_valid = 0, sad3_valid = 0;
  logic [ME_SAD_W-1:0] sad = 0;
  me_op_t op = '0;
  mv_entry_t mem_rdata = '0, mem_wdata;
  logic mem_we, res_valid;
  logic [ME_AW-1:0] mem_addr;
  me_res_t res;

  decision_block dut (.clk, .rst_n, .sad, .sad2_valid, .sad3_valid, .op, .mem_rdata,
                      .mem_we, .mem_addr, .mem_wdata, .res_valid, .res);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_pick3 = 0, n_pick2 = 0, n_upd = 0, n_keep = 0, n_first = 0, n_tie = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int s2, s3, sm, bs;
      bit p3, upd;
      mv_t bmv;
      s2 = $urandom_range(0, 65535);
      s3 = (t % 9 == 0) ? s2 : $urandom_range(0, 65535);
      sm = (t % 11 == 0) ? ((s2 < s3) ? s2 : s3) : $urandom_range(0, 65535);
      op.blk_addr = ME_AW'($urandom_range(0, ME_NBLK - 1));
      op.cand2 = mv_t'($urandom);
      op.cand3 = mv_t'($urandom);
      op.first = ($urandom_range(0, 7) == 0);
      mem_rdata.mv = mv_t'($urandom);
      mem_rdata.sad = 16'(sm);
      sad = 16'(s2); sad2_valid = 1;
      @(negedge clk);
      sad2_valid = 0; sad = 16'($urandom);      // unrelated values in between
      repeat ($urandom_range(0, 3)) @(negedge clk);
      sad = 16'(s3); sad3_valid = 1;
      #1;
      p3  = (s3 < s2);
      bs  = p3 ? s3 : s2;
      bmv = p3 ? op.cand3 : op.cand2;
      upd = op.first || (bs < sm);
      checks++;
      if (mem_we !== upd || mem_addr !== op.blk_addr ||
          (upd && (mem_wdata.sad !== 16'(bs) || mem_wdata.mv !== bmv))) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d we=%b exp %b", t, mem_we, upd);
      end
      @(negedge clk);
      sad3_valid = 0;
      checks++;
      if (!res_valid || res.updated !== upd || res.pick3 !== p3 ||
          res.sad !== (upd ? 16'(bs) : 16'(sm)) ||
          res.mv !== (upd ? bmv : mem_rdata.mv) || res.blk_addr !== op.blk_addr) begin
        failures++;
        if (failures < 10) $display("FAIL result t=%0d", t);
      end
      @(negedge clk);
      checks++;
      if (res_valid) failures++;
      if (p3) n_pick3++; else n_pick2++;
      if (upd) n_upd++; else n_keep++;
      if (op.first) n_first++;
      if (s2 == s3) n_tie++;
    end
    checks++;
    if (n_pick3 == 0 || n_pick2 == 0 || n_upd == 0 || n_keep == 0 || n_first == 0 || n_tie == 0) begin
      failures++;
      $display("FAIL coverage p3=%0d p2=%0d upd=%0d keep=%0d first=%0d tie=%0d",
               n_pick3, n_pick2, n_upd, n_keep, n_first, n_tie);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
