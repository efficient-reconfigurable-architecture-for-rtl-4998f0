// Scene testbench of me_top at its default size (320x240, 20 x 15 blocks):
// three synthetic traffic scenes,
//   0 normal traffic, fixed camera: 3 vehicles of 2x2 blocks (32x32 pixels)
//   1 dense traffic,  fixed camera: 12 vehicles of 2x2 blocks
//   2 normal traffic seen from a panning camera (+1, -1)
// Vehicles move by (+2, 0), (-3, 0), (0, +2) or (0, -2) pixels relative to
// the background. For each scene every block
// gets a +-3 full search (25 operations of two candidates, back to back);
// then a motion correction pass runs. Checks: each block's final vector and
// SAD equal the true motion (the pixel field is random, so the true match
// is the only zero-SAD one), the global vector and every overlapped block's
// corrected vector and moving flag against a software model. The true and
// false detection rates are printed, taking an overlapped block as truly
// moving when at least two of its four blocks belong to a vehicle.
module tb_traffic_scenarios;
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

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int scene = 0;
  int tx [NB], ty [NB];      // true motion of each block
  bit obj [NB];              // block belongs to a vehicle

  function automatic pix_t rpix(input int x, input int y);
    logic [31:0] h;
    h = 32'(x) * 32'd73856093 ^ 32'(y) * 32'd19349663 ^ 32'(scene) * 32'd83492791;
    h = h ^ (h >> 13);
    h = h * 32'h5bd1e995;
    h = h ^ (h >> 15);
    return h[7:0];
  endfunction

  function automatic pix_t cpix(input int x, input int y);
    int b;
    b = (y / ME_BLK) * W + (x / ME_BLK);
    return rpix(x + tx[b], y + ty[b]);
  endfunction

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

  // last result of each block
  mv_t  got_mv  [NB];
  int   got_sad [NB];
  int   n_res = 0;
  always @(posedge clk)
    if (rst_n && res_valid) begin
      got_mv[res.blk_addr]  <= res.mv;
      got_sad[res.blk_addr] <= int'(res.sad);
      n_res <= n_res + 1;
    end

  task automatic build_scene(input int sc);
    int nveh, cam_x, cam_y;
    scene = sc;
    cam_x = (sc == 2) ? 1 : 0;
    cam_y = (sc == 2) ? -1 : 0;
    nveh  = (sc == 1) ? 12 : 3;
    for (int b = 0; b < NB; b++) begin
      tx[b] = cam_x; ty[b] = cam_y; obj[b] = 0;
    end
    for (int v = 0; v < nveh; v++) begin
      int bx, by, mx, my, b;
      // vehicles on lanes (block rows 2, 5, 8, 11), spaced along the lane
      by = 2 + 3 * (v % 4);
      bx = 1 + 6 * (v / 4) + 2 * (v % 2);
      case (v % 4)
        0: begin mx = 2;  my = 0;  end
        1: begin mx = -3; my = 0;  end
        2: begin mx = 0;  my = 2;  end
        default: begin mx = 0; my = -2; end
      endcase
      for (int k = 0; k < 4; k++) begin
        b = (by + k / 2) * W + bx + (k % 2);
        tx[b] = cam_x + mx; ty[b] = cam_y + my; obj[b] = 1;
      end
    end
  endtask

  task automatic search_frame();
    for (int b = 0; b < NB; b++) begin
      int bx, by;
      bx = b % W; by = b / W;
      for (int o = 0; o < 25; o++) begin
        int k2, k3, d2x, d2y, d3x, d3y;
        k2 = 2 * o; k3 = (2 * o + 1 > 48) ? 48 : 2 * o + 1;
        d2x = (k2 % 7) - R; d2y = (k2 / 7) - R;
        d3x = (k3 % 7) - R; d3y = (k3 / 7) - R;
        start = 1;
        op.blk_addr = ME_AW'(b);
        op.cand2.x = 8'(d2x); op.cand2.y = 8'(d2y);
        op.cand3.x = 8'(d3x); op.cand3.y = 8'(d3y);
        op.first = (o == 0);
        for (int k = 0; k <= 50; k++) begin
          @(negedge clk);
          if (k == 0) start = 0;
          if (k < 48)
            for (int i = 0; i < ME_BLK; i++) begin
              int r;
              r = k % 16;
              row_in[i] = (k < 16) ? cpix(bx * ME_BLK + i, by * ME_BLK + r)
                        : (k < 32) ? rpix(bx * ME_BLK + d2x + i, by * ME_BLK + d2y + r)
                                   : rpix(bx * ME_BLK + d3x + i, by * ME_BLK + d3y + r);
            end
        end
      end
    end
    repeat (3) @(negedge clk);
  endtask

  task automatic run_scene(input int sc);
    int sx, sy, gx, gy, idx, tp, fp, fn, tn, nobj;
    build_scene(sc);
    search_frame();
    nobj = 0;
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (int'(got_mv[b].x) != tx[b] || int'(got_mv[b].y) != ty[b] || got_sad[b] != 0) begin
        failures++;
        if (failures < 10) $display("FAIL scene %0d block %0d vector %0d,%0d exp %0d,%0d",
                                    sc, b, got_mv[b].x, got_mv[b].y, tx[b], ty[b]);
      end
      if (obj[b]) nobj++;
    end
    sx = 0; sy = 0;
    for (int b = 0; b < NB; b++) begin sx += tx[b]; sy += ty[b]; end
    gx = floordiv(2 * sx + NB, 2 * NB);
    gy = floordiv(2 * sy + NB, 2 * NB);
    mc_start = 1;
    @(negedge clk);
    mc_start = 0;
    idx = 0; tp = 0; fp = 0; fn = 0; tn = 0;
    forever begin
      if (mc_valid) begin
        int ox, oy, ix, iy, cx, cy, b0;
        bit mv, truth;
        ox = idx % (W - 1); oy = idx / (W - 1);
        b0 = oy * W + ox;
        ix = floordiv(tx[b0] + tx[b0+1] + tx[b0+W] + tx[b0+W+1], 4);
        iy = floordiv(ty[b0] + ty[b0+1] + ty[b0+W] + ty[b0+W+1], 4);
        cx = satv(ix - gx); cy = satv(iy - gy);
        mv = (absi(cx) + absi(cy)) > 1;   // default threshold 1
        truth = (int'(obj[b0]) + int'(obj[b0+1]) + int'(obj[b0+W]) + int'(obj[b0+W+1])) >= 2;
        checks++;
        if (int'(mc_out.pos_x) != ox || int'(mc_out.pos_y) != oy ||
            int'(mc_out.corr.x) != cx || int'(mc_out.corr.y) != cy || mc_out.moving != mv) begin
          failures++;
          if (failures < 10) $display("FAIL scene %0d correction at %0d,%0d", sc, ox, oy);
        end
        if (mc_out.moving && truth) tp++;
        if (mc_out.moving && !truth) fp++;
        if (!mc_out.moving && truth) fn++;
        if (!mc_out.moving && !truth) tn++;
        idx++;
      end
      if (mc_done) break;
      @(negedge clk);
    end
    checks += 3;
    if (idx != (W - 1) * (H - 1)) failures++;
    if (int'(mc_global.x) != gx || int'(mc_global.y) != gy) begin
      failures++;
      $display("FAIL scene %0d global %0d,%0d exp %0d,%0d", sc, mc_global.x, mc_global.y, gx, gy);
    end
    if (tp == 0) begin failures++; $display("FAIL scene %0d detected nothing", sc); end
    $display("scene %0d (%s): vehicle blocks %0d, global %0d,%0d, TP %0d FP %0d FN %0d TN %0d, true detection %0d.%0d%%, false detection %0d.%0d%%",
             sc, sc == 0 ? "normal" : sc == 1 ? "dense" : "moving camera", nobj, gx, gy, tp, fp, fn, tn,
             (1000 * tp / (tp + fn)) / 10, (1000 * tp / (tp + fn)) % 10,
             (tp + fp != 0) ? (1000 * fp / (tp + fp)) / 10 : 0, (tp + fp != 0) ? (1000 * fp / (tp + fp)) % 10 : 0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int sc = 0; sc < 3; sc++) run_scene(sc);
    checks++;
    if (n_res != 3 * NB * 25) begin failures++; $display("FAIL %0d results", n_res); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
