// Testbench of me_controller: runs two back-to-back operations and an
// isolated one, and compares every control signal in every cycle with the
// schedule written out independently for BLK = 16 (rows into SUBM1 in cycles
// 0-15, SUBM2 16-31, SUBM3 32-47; absolute differences 17-48; accumulation
// 18-49; SAD of candidate 2 in cycle 34, final SAD in cycle 50). Checks the
// operation length of 51 cycles and the return to idle.
module tb_me_controller;
  import me_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0, start = 0, ready, op_load, busy;
  logic [5:0] cnt;
  me_ctl_t ctl, e;

  me_controller dut (.clk, .rst_n, .start, .ready, .op_load, .busy, .cnt, .ctl);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic me_ctl_t expect_ctl(input int k);
    me_ctl_t x;
    x = '0;
    x.wr_sel = 2'd3;
    if (k >= 0 && k <= 15)  begin x.wr_en = 1; x.wr_sel = 0; end
    if (k >= 16 && k <= 31) begin x.wr_en = 1; x.wr_sel = 1; end
    if (k >= 32 && k <= 47) begin x.wr_en = 1; x.wr_sel = 2; end
    if (k >= 17 && k <= 48) begin x.ad_en = 1; x.rot_en = 1; end
    if (k >= 33 && k <= 48) x.rd_sel = 1;
    if (k >= 18 && k <= 49) x.acc_en = 1;
    if (k == 18 || k == 34) x.acc_first = 1;
    if (k == 34) x.sad2_valid = 1;
    if (k == 49) x.mem_rd = 1;
    if (k == 50) x.sad3_valid = 1;
    return x;
  endfunction

  int ops_done = 0;
  task automatic run_op(input bit back_to_back);
    // caller has start high at a negedge while ready
    for (int k = 0; k < 51; k++) begin
      @(negedge clk);
      if (k == 0) start = 0;
      e = expect_ctl(k);
      checks++;
      if (ctl !== e || !busy || int'(cnt) != k) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d ctl %b exp %b cnt %0d", k, ctl, e, cnt);
      end
      if (k == 50) begin
        checks++;
        if (!ready) begin failures++; $display("FAIL not ready in last cycle"); end
        if (back_to_back) start = 1;
      end
    end
    ops_done++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (busy || !ready || ctl.wr_en) failures++;   // reset state
    rst_n = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (busy || !ready) failures++;                // stays idle without start
    start = 1;
    #1 checks++;
    if (!op_load) failures++;
    run_op(1);
    run_op(0);
    @(negedge clk);
    checks++;
    if (busy || !ready || ctl !== expect_ctl(-1)) begin
      failures++;
      $display("FAIL not idle after operation");
    end
    repeat (5) @(negedge clk);
    start = 1;
    run_op(0);
    @(negedge clk);
    checks++;
    if (busy) failures++;
    checks++;
    if (ops_done != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
