// Testbench of motion_correction: a small 5 x 4 block instance and one at the
// default 20 x 15 blocks, each reading a behavioural one-cycle-latency
// vector memory. Scenarios: a camera pan with a moving object, a pan in the
// negative direction, full-range random vectors, and extreme vectors that
// make the compensated result saturate. A reference
// model computes the rounded mean, the 2x2 interpolation of every
// overlapped block, the compensated vector with saturation and the moving
// flag; the stream order, pass length and each mechanism's occurrence are
// checked.
module tb_motion_correction;
  import me_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_moving = 0, n_still = 0, n_sat = 0, n_negg = 0;

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

  // ---------------------------------------------------------------- small
  localparam int SW = 5, SH = 4;
  logic s_start = 0, s_busy, s_en, s_valid, s_done;
  logic [ME_AW-1:0] s_addr;
  mv_entry_t s_rdata, s_mem [SW*SH];
  mc_out_t s_out;
  mv_t s_g;
  always_ff @(posedge clk) if (s_en) s_rdata <= s_mem[s_addr];
  motion_correction #(.BW(SW), .BH(SH), .MOVE_TH(2)) dut_s (
    .clk, .rst_n, .start(s_start), .busy(s_busy), .mem_en(s_en), .mem_addr(s_addr),
    .mem_rdata(s_rdata), .out_valid(s_valid), .out(s_out), .global_mv(s_g), .done(s_done));

  // ---------------------------------------------------------------- default
  localparam int DW = ME_BW, DH = ME_BH;
  logic d_start = 0, d_busy, d_en, d_valid, d_done;
  logic [ME_AW-1:0] d_addr;
  mv_entry_t d_rdata, d_mem [DW*DH];
  mc_out_t d_out;
  mv_t d_g;
  always_ff @(posedge clk) if (d_en) d_rdata <= d_mem[d_addr];
  motion_correction dut_d (
    .clk, .rst_n, .start(d_start), .busy(d_busy), .mem_en(d_en), .mem_addr(d_addr),
    .mem_rdata(d_rdata), .out_valid(d_valid), .out(d_out), .global_mv(d_g), .done(d_done));

  // vector field of a scenario
  function automatic mv_t field(input int sc, input int x, input int y, input int w);
    mv_t v;
    case (sc)
      0: begin   // pan (+3, -2) with noise, object moving (+9, +5) in a corner
        v.x = 8'(3 + $urandom_range(0, 2) - 1);
        v.y = 8'(-2 + $urandom_range(0, 2) - 1);
        if (x >= w - 3 && y <= 2) begin v.x = 8'sd12; v.y = 8'sd3; end
      end
      1: begin   // pan (-7, -5), object still in the world (cancels the pan)
        v.x = -8'sd7; v.y = -8'sd5;
        if (x == 1 && y == 1) begin v.x = 8'sd0; v.y = 8'sd0; end
      end
      3: begin   // extreme vectors: compensation saturates
        v.x = -8'sd128; v.y = -8'sd128;
        if (x <= 1 && y <= 1) begin v.x = 8'sd127; v.y = 8'sd127; end
      end
      default: v = mv_t'($urandom);
    endcase
    return v;
  endfunction

  task automatic run_pass(input bit big, input int sc);
    int w, h, nb, sx, sy, gx, gy, idx, edges;
    mv_t f [];
    w = big ? DW : SW; h = big ? DH : SH; nb = w * h;
    f = new[nb];
    sx = 0; sy = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        f[y*w+x] = field(sc, x, y, w);
        sx += int'(f[y*w+x].x); sy += int'(f[y*w+x].y);
        if (big) begin d_mem[y*w+x].mv = f[y*w+x]; d_mem[y*w+x].sad = 16'($urandom); end
        else     begin s_mem[y*w+x].mv = f[y*w+x]; s_mem[y*w+x].sad = 16'($urandom); end
      end
    gx = floordiv(2 * sx + nb, 2 * nb);
    gy = floordiv(2 * sy + nb, 2 * nb);
    if (gx < 0 || gy < 0) n_negg++;
    @(negedge clk);
    if (big) d_start = 1; else s_start = 1;
    @(negedge clk);
    d_start = 0; s_start = 0;
    idx = 0; edges = 0;
    forever begin
      mc_out_t o;
      bit v;
      v = big ? d_valid : s_valid;
      o = big ? d_out : s_out;
      if (v) begin
        int ox, oy, ix, iy, cx, cy, mv;
        ox = idx % (w - 1); oy = idx / (w - 1);
        ix = floordiv(int'(f[oy*w+ox].x) + int'(f[oy*w+ox+1].x) + int'(f[(oy+1)*w+ox].x) + int'(f[(oy+1)*w+ox+1].x), 4);
        iy = floordiv(int'(f[oy*w+ox].y) + int'(f[oy*w+ox+1].y) + int'(f[(oy+1)*w+ox].y) + int'(f[(oy+1)*w+ox+1].y), 4);
        cx = satv(ix - gx); cy = satv(iy - gy);
        if (cx != ix - gx || cy != iy - gy) n_sat++;
        mv = ((absi(cx) + absi(cy)) > (big ? 1 : 2));   // small instance uses threshold 2
        if (mv) n_moving++; else n_still++;
        checks++;
        if (int'(o.pos_x) != ox || int'(o.pos_y) != oy || int'(o.interp.x) != ix ||
            int'(o.interp.y) != iy || int'(o.corr.x) != cx || int'(o.corr.y) != cy ||
            o.moving != mv) begin
          failures++;
          if (failures < 10)
            $display("FAIL sc%0d big%0d idx %0d: pos %0d,%0d interp %0d,%0d corr %0d,%0d mv %b / exp %0d,%0d %0d,%0d %0d,%0d %b",
                     sc, big, idx, o.pos_x, o.pos_y, o.interp.x, o.interp.y, o.corr.x, o.corr.y, o.moving,
                     ox, oy, ix, iy, cx, cy, mv);
        end
        idx++;
      end
      if (big ? d_done : s_done) break;
      @(negedge clk);
      edges++;
      if (edges > 4 * nb + 20) break;
    end
    checks += 3;
    if (idx != (w - 1) * (h - 1)) begin failures++; $display("FAIL count %0d", idx); end
    if (edges != 2 * nb + 3) begin failures++; $display("FAIL pass length %0d exp %0d", edges, 2 * nb + 3); end
    if (int'(big ? d_g.x : s_g.x) != gx || int'(big ? d_g.y : s_g.y) != gy) begin
      failures++;
      $display("FAIL global %0d,%0d exp %0d,%0d", big ? d_g.x : s_g.x, big ? d_g.y : s_g.y, gx, gy);
    end
    @(negedge clk);
    checks++;
    if (big ? d_busy : s_busy) failures++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int sc = 0; sc < 4; sc++) begin
      run_pass(0, sc);
      run_pass(1, sc);
    end
    for (int k = 0; k < 6; k++) run_pass(0, 2);
    checks++;
    if (n_moving == 0 || n_still == 0 || n_sat == 0 || n_negg == 0) begin
      failures++;
      $display("FAIL coverage moving=%0d still=%0d sat=%0d neg=%0d", n_moving, n_still, n_sat, n_negg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
