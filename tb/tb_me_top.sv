// End-to-end testbench of me_top at its default size (20 x 15 blocks, a
// 320x240 frame).
//
// Frames: the reference frame is a pseudo-random pixel field R(x, y); the
// current frame is C(x, y) = R(x + mx, y + my), where (mx, my) = (+1, -1) for
// the background (camera pan) and (-2, +3) for a 4 x 4 block object. Every
// block is searched over the full +-3 pixel window: 49 displacements, sent
// as 25 operations of two candidates (the last one repeated). Operations
// are mostly issued back to back, some after idle gaps.
//
// Checks: every operation's result (vector, SAD, update and pick flags)
// against a software model of the search; the cycle numbers (final SAD in
// the accumulator in cycle 50, result 51 cycles after start, 51 cycles per
// operation); the row requests; the vector found for each block (the true
// motion); then the motion correction pass: global motion, every
// overlapped block's interpolated and compensated vector and moving flag.
// Each mechanism (back-to-back and idle starts, DEMUX phases, candidate 2 or
// 3 winning, memory update or keep, first operation, moving and still
// blocks) is counted and must occur.
module tb_me_top;
  import me_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int W = ME_BW, H = ME_BH, NB = W * H, R = 3;

  logic    rst_n = 0, start = 0, ready, row_req, res_valid;
  me_op_t  op = '0;
  row_t    row_in = '0;
  me_res_t res;
  logic    mc_start = 0, mc_busy, mc_valid, mc_done;
  mc_out_t mc_out;
  mv_t     mc_global;

  me_top dut (.clk, .rst_n, .start, .op, .ready, .row_req, .row_in, .res_valid, .res,
              .mc_start, .mc_busy, .mc_valid, .mc_out, .mc_global, .mc_done);

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- frames
  function automatic pix_t rpix(input int x, input int y);
    logic [31:0] h;
    h = 32'(x) * 32'd73856093 ^ 32'(y) * 32'd19349663;
    h = h ^ (h >> 13);
    h = h * 32'h5bd1e995;
    h = h ^ (h >> 15);
    return h[7:0];
  endfunction

  function automatic bit is_obj(input int bx, input int by);
    return bx >= 4 && bx <= 7 && by >= 3 && by <= 6;
  endfunction

  function automatic pix_t cpix(input int x, input int y);
    int bx, by;
    bx = x / ME_BLK; by = y / ME_BLK;
    return is_obj(bx, by) ? rpix(x - 2, y + 3) : rpix(x + 1, y - 1);
  endfunction

  // row r of the block at (bx, by) displaced by (dx, dy); which 0 = current
  function automatic row_t get_row(input int which, input int bx, input int by,
                                   input int dx, input int dy, input int r);
    row_t v;
    for (int i = 0; i < ME_BLK; i++)
      v[i] = (which == 0) ? cpix(bx * ME_BLK + i, by * ME_BLK + r)
                          : rpix(bx * ME_BLK + dx + i, by * ME_BLK + dy + r);
    return v;
  endfunction

  function automatic int block_sad(input int bx, input int by, input int dx, input int dy);
    int s;
    s = 0;
    for (int r = 0; r < ME_BLK; r++)
      for (int i = 0; i < ME_BLK; i++) begin
        int a, b;
        a = int'(cpix(bx * ME_BLK + i, by * ME_BLK + r));
        b = int'(rpix(bx * ME_BLK + dx + i, by * ME_BLK + dy + r));
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  // ------------------------------------------------------------- model
  int      m_sad [NB];
  mv_t     m_mv  [NB];
  me_res_t exp_q [$];
  int unsigned start_q [$];

  int n_b2b = 0, n_idle_start = 0, n_pick3 = 0, n_pick2 = 0, n_upd = 0, n_keep = 0;
  int n_first = 0, n_moving = 0, n_still = 0, n_ops = 0, n_sel [3] = '{0, 0, 0};

  // result monitor: value and latency
  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      me_res_t e;
      int unsigned s;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        e = exp_q.pop_front();
        s = start_q.pop_front();
        if (res !== e) begin
          failures++;
          if (failures < 10) $display("FAIL op result %p exp %p", res, e);
        end
        checks++;
        if (cyc - s != 51) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d", cyc - s);
        end
      end
    end
  end

  // final SAD must be in the accumulator exactly in cycle 50 of an operation
  int unsigned last_start = 0;
  always @(posedge clk) begin
    if (rst_n && start && ready) last_start <= cyc;
    if (rst_n && dut.ctl.sad3_valid) begin
      checks++;
      if (cyc - last_start != 51) begin
        failures++;
        if (failures < 10) $display("FAIL SAD ready at cycle %0d of the operation", cyc - last_start - 1);
      end
    end
  end

  // ------------------------------------------------------------- driver
  task automatic do_ops();
    for (int b = 0; b < NB; b++) begin
      int bx, by;
      int cand_x [50], cand_y [50];
      bx = b % W; by = b / W;
      for (int k = 0; k < 49; k++) begin
        cand_x[k] = (k % 7) - R;
        cand_y[k] = (k / 7) - R;
      end
      cand_x[49] = cand_x[48]; cand_y[49] = cand_y[48];
      for (int o = 0; o < 25; o++) begin
        int d2x, d2y, d3x, d3y, s2, s3, bs;
        bit p3, upd;
        me_res_t e;
        mv_t bmv;
        d2x = cand_x[2*o];   d2y = cand_y[2*o];
        d3x = cand_x[2*o+1]; d3y = cand_y[2*o+1];
        // issue: start is high at this negedge while ready (idle or last cycle)
        if (!ready) begin
          failures++;
          $display("FAIL not ready when expected");
        end
        if (dut.u_ctl.busy) n_b2b++; else n_idle_start++;
        start = 1;
        op.blk_addr = ME_AW'(b);
        op.cand2.x = 8'(d2x); op.cand2.y = 8'(d2y);
        op.cand3.x = 8'(d3x); op.cand3.y = 8'(d3y);
        op.first = (o == 0);
        // model
        s2 = block_sad(bx, by, d2x, d2y);
        s3 = block_sad(bx, by, d3x, d3y);
        p3 = (s3 < s2);
        bs = p3 ? s3 : s2;
        bmv = p3 ? op.cand3 : op.cand2;
        upd = op.first || (bs < m_sad[b]);
        if (upd) begin m_sad[b] = bs; m_mv[b] = bmv; end
        e.blk_addr = ME_AW'(b); e.mv = m_mv[b]; e.sad = 16'(m_sad[b]);
        e.updated = upd; e.pick3 = p3;
        exp_q.push_back(e);
        start_q.push_back(cyc + 1);
        if (p3) n_pick3++; else n_pick2++;
        if (upd) n_upd++; else n_keep++;
        if (op.first) n_first++;
        n_ops++;
        // cycles 0 .. 50 of the operation
        for (int k = 0; k <= 50; k++) begin
          @(negedge clk);
          if (k == 0) start = 0;
          checks++;
          if (row_req !== (k < 48)) begin
            failures++;
            if (failures < 10) $display("FAIL row_req at cycle %0d", k);
          end
          if (k < 48) begin
            n_sel[k / 16]++;
            row_in = get_row(k / 16, bx, by, (k < 32) ? d2x : d3x, (k < 32) ? d2y : d3y, k % 16);
          end else begin
            row_in = row_t'({$urandom, $urandom, $urandom, $urandom});   // ignored
          end
        end
        // one operation in eight is followed by an idle gap
        if ((b + o) % 8 == 3) repeat (1 + (o % 3)) @(negedge clk);
      end
    end
  endtask

  function automatic int floordiv(input int a, input int b);
    int q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q--;
    return q;
  endfunction
  function automatic int satv(input int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction
  function automatic int absi(input int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    int sx, sy, gx, gy, idx;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    do_ops();
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL results missing"); end
    // every block found its true motion with SAD 0
    for (int b = 0; b < NB; b++) begin
      int ex, ey;
      ex = is_obj(b % W, b / W) ? -2 : 1;
      ey = is_obj(b % W, b / W) ? 3 : -1;
      checks++;
      if (int'(m_mv[b].x) != ex || int'(m_mv[b].y) != ey || m_sad[b] != 0) begin
        failures++;
        if (failures < 10) $display("FAIL block %0d vector %0d,%0d", b, m_mv[b].x, m_mv[b].y);
      end
    end
    // motion correction pass
    sx = 0; sy = 0;
    for (int b = 0; b < NB; b++) begin sx += int'(m_mv[b].x); sy += int'(m_mv[b].y); end
    gx = floordiv(2 * sx + NB, 2 * NB);
    gy = floordiv(2 * sy + NB, 2 * NB);
    mc_start = 1;
    @(negedge clk);
    mc_start = 0;
    idx = 0;
    forever begin
      if (mc_valid) begin
        int ox, oy, ix, iy, cx, cy;
        bit mv;
        ox = idx % (W - 1); oy = idx / (W - 1);
        ix = floordiv(int'(m_mv[oy*W+ox].x) + int'(m_mv[oy*W+ox+1].x) + int'(m_mv[(oy+1)*W+ox].x) + int'(m_mv[(oy+1)*W+ox+1].x), 4);
        iy = floordiv(int'(m_mv[oy*W+ox].y) + int'(m_mv[oy*W+ox+1].y) + int'(m_mv[(oy+1)*W+ox].y) + int'(m_mv[(oy+1)*W+ox+1].y), 4);
        cx = satv(ix - gx); cy = satv(iy - gy);
        mv = (absi(cx) + absi(cy)) > 1;   // default threshold 1
        if (mv) n_moving++; else n_still++;
        checks++;
        if (int'(mc_out.pos_x) != ox || int'(mc_out.pos_y) != oy || int'(mc_out.corr.x) != cx ||
            int'(mc_out.corr.y) != cy || int'(mc_out.interp.x) != ix || int'(mc_out.interp.y) != iy ||
            mc_out.moving != mv) begin
          failures++;
          if (failures < 10) $display("FAIL correction at %0d,%0d", ox, oy);
        end
        // object interior must be flagged, far background must not
        if (is_obj(ox, oy) && is_obj(ox + 1, oy + 1)) begin
          checks++;
          if (!mc_out.moving) failures++;
        end
        if (ox > 9 && oy > 8) begin
          checks++;
          if (mc_out.moving) failures++;
        end
        idx++;
      end
      if (mc_done) break;
      @(negedge clk);
    end
    checks += 2;
    if (idx != (W - 1) * (H - 1)) begin failures++; $display("FAIL %0d corrected blocks", idx); end
    if (int'(mc_global.x) != gx || int'(mc_global.y) != gy) begin
      failures++;
      $display("FAIL global %0d,%0d exp %0d,%0d", mc_global.x, mc_global.y, gx, gy);
    end
    $display("ops=%0d back_to_back=%0d idle_start=%0d pick3=%0d pick2=%0d update=%0d keep=%0d first=%0d rows_to_SUBM1/2/3=%0d/%0d/%0d moving=%0d still=%0d global=%0d,%0d",
             n_ops, n_b2b, n_idle_start, n_pick3, n_pick2, n_upd, n_keep, n_first,
             n_sel[0], n_sel[1], n_sel[2], n_moving, n_still, gx, gy);
    checks++;
    if (n_b2b == 0 || n_idle_start == 0 || n_pick3 == 0 || n_pick2 == 0 || n_upd == 0 ||
        n_keep == 0 || n_first == 0 || n_moving == 0 || n_still == 0 ||
        n_sel[0] == 0 || n_sel[1] == 0 || n_sel[2] == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
