// Motion correction: removes the global (camera) motion from the block
// motion vectors and flags blocks that move on their own.
//
// The unit reads the motion vector memory twice, addressed by counters, not
// by a RAM controller:
//   pass 1  all BW*BH vectors, accumulated into sum_x, sum_y. The global
//           motion is their mean rounded to nearest (halves upward):
//           g = floor((2*sum + NB) / (2*NB)), NB = BW*BH, computed with a
//           divider by a constant.
//   pass 2  the vectors again in raster order. A line of BW registers keeps
//           the previous block row, and two registers keep the left and
//           upper-left neighbours, so for every block (x, y) with x, y >= 1
//           the four N x N blocks of the overlapped 2N x 2N block at
//           (x-1, y-1) are at hand. Its vector is interpolated as the floor
//           of their mean; the global motion is subtracted on a Kogge-Stone
//           adder (result saturated to MV_W bits), and the block is flagged
//           moving when |dx| + |dy| > MOVE_TH.
// The source specifies overlapped 2N x 2N blocks interpolated from N x N
// blocks, counter-controlled registers, and the removal of camera motion;
// the mean as global estimate, the 2x2 average and the threshold test are
// this design's choices.
//
// Interface: start (while idle) begins a pass; mem_en/mem_addr drive a
// memory read port with one cycle of read latency. out_valid/out stream the
// (BW-1)*(BH-1) overlapped blocks in raster order; global_mv holds the
// estimate of the last pass; done pulses once at the end.
// Timing: done rises 2*BW*BH + 3 clock edges after the edge that takes
// start; the first output follows BW*BH + BW + 5 edges after it.
module motion_correction
  import me_pkg::*;
#(
  parameter int BW      = ME_BW,
  parameter int BH      = ME_BH,
  parameter int MOVE_TH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             mem_en,
  output logic [ME_AW-1:0] mem_addr,
  input  mv_entry_t        mem_rdata,
  output logic             out_valid,
  output mc_out_t          out,
  output mv_t              global_mv,
  output logic             done
);
  localparam int NB    = BW * BH;
  localparam int SUM_W = ME_MV_W + $clog2(NB) + 1;
  localparam int NW    = SUM_W + 2;                       // numerator width
  localparam int MVMAX = (1 << (ME_MV_W - 1)) - 1;
  localparam int MVMIN = -(1 << (ME_MV_W - 1));

  typedef enum logic [1:0] {S_IDLE, S_SUM, S_INTERP, S_GLOBAL} state_t;
  state_t state;

  logic [ME_AW-1:0] cx, cy;          // read address counters
  logic             rd_v;            // read issued last cycle
  logic             rd_last;
  logic [ME_AW-1:0] dx, dy;          // position of the data now arriving
  logic             pass2_q;         // the arriving data belong to pass 2

  logic signed [SUM_W-1:0] sum_x, sum_y;
  mv_t                     line [BW];
  mv_t                     left_mv, upleft_mv;

  assign busy     = (state != S_IDLE);
  assign mem_en   = (state == S_SUM) || (state == S_INTERP);
  assign mem_addr = ME_AW'(int'(cy) * BW + int'(cx));

  // ---------------------------------------------------------------- counters
  logic last_addr;
  assign last_addr = (int'(cx) == BW - 1) && (int'(cy) == BH - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cx      <= '0;
      cy      <= '0;
      rd_v    <= 1'b0;
      rd_last <= 1'b0;
      pass2_q <= 1'b0;
      dx      <= '0;
      dy      <= '0;
    end else begin
      rd_v    <= mem_en;
      rd_last <= mem_en && last_addr;
      pass2_q <= (state == S_INTERP);
      dx      <= cx;
      dy      <= cy;
      case (state)
        S_IDLE: if (start) begin
          state <= S_SUM;
          cx    <= '0;
          cy    <= '0;
        end
        S_SUM, S_INTERP: begin
          if (int'(cx) == BW - 1) begin
            cx <= '0;
            cy <= (int'(cy) == BH - 1) ? '0 : cy + 1'b1;
          end else begin
            cx <= cx + 1'b1;
          end
          if (last_addr) state <= (state == S_SUM) ? S_GLOBAL : S_IDLE;
        end
        S_GLOBAL: if (!rd_v) state <= S_INTERP;   // sum complete
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------ pass 1: global motion
  // floor((2*s + NB) / (2*NB)); '/' truncates toward zero, so negative
  // quotients with a remainder are moved down by one
  function automatic logic signed [ME_MV_W-1:0] round_mean(input logic signed [SUM_W-1:0] s);
    logic signed [NW-1:0] num, q;
    num = (NW'(s) <<< 1) + NW'(NB);
    q   = num / NW'(2 * NB);
    if (num < 0 && q * NW'(2 * NB) != num) q = q - 1'b1;
    return ME_MV_W'(q);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_x     <= '0;
      sum_y     <= '0;
      global_mv <= '0;
    end else begin
      if (state == S_IDLE && start) begin
        sum_x <= '0;
        sum_y <= '0;
      end else if (rd_v && !pass2_q) begin
        sum_x <= sum_x + SUM_W'(mem_rdata.mv.x);
        sum_y <= sum_y + SUM_W'(mem_rdata.mv.y);
      end
      if (state == S_GLOBAL && !rd_v) begin
        global_mv.x <= round_mean(sum_x);
        global_mv.y <= round_mean(sum_y);
      end
    end
  end

  // ------------------------------------ pass 2: interpolation, compensation
  mv_t cur, up;
  assign cur = mem_rdata.mv;
  localparam int XW = (BW > 1) ? $clog2(BW) : 1;
  logic [XW-1:0] dxi;
  assign dxi = XW'(dx);
  assign up  = line[dxi];

  logic signed [ME_MV_W+1:0] s4x, s4y;
  mv_t                       interp;
  always_comb begin
    s4x = (ME_MV_W+2)'(upleft_mv.x) + (ME_MV_W+2)'(up.x)
        + (ME_MV_W+2)'(left_mv.x)   + (ME_MV_W+2)'(cur.x);
    s4y = (ME_MV_W+2)'(upleft_mv.y) + (ME_MV_W+2)'(up.y)
        + (ME_MV_W+2)'(left_mv.y)   + (ME_MV_W+2)'(cur.y);
    interp.x = ME_MV_W'(s4x >>> 2);
    interp.y = ME_MV_W'(s4y >>> 2);
  end

  // interp - global on Kogge-Stone adders, one bit wider, then saturated
  logic [ME_MV_W:0] dfx, dfy;
  logic             unused_cx, unused_cy;
  ks_adder #(.W(ME_MV_W+1)) u_sub_x (
    .a({interp.x[ME_MV_W-1], interp.x}), .b(~{global_mv.x[ME_MV_W-1], global_mv.x}),
    .cin(1'b1), .sum(dfx), .cout(unused_cx));
  ks_adder #(.W(ME_MV_W+1)) u_sub_y (
    .a({interp.y[ME_MV_W-1], interp.y}), .b(~{global_mv.y[ME_MV_W-1], global_mv.y}),
    .cin(1'b1), .sum(dfy), .cout(unused_cy));

  function automatic logic signed [ME_MV_W-1:0] sat(input logic signed [ME_MV_W:0] v);
    if (v > (ME_MV_W+1)'(MVMAX))      return ME_MV_W'(MVMAX);
    else if (v < (ME_MV_W+1)'(MVMIN)) return ME_MV_W'(MVMIN);
    else                              return ME_MV_W'(v);
  endfunction

  function automatic logic [ME_MV_W:0] absv(input logic signed [ME_MV_W-1:0] v);
    return (v < 0) ? (ME_MV_W+1)'(-(ME_MV_W+1)'(v)) : (ME_MV_W+1)'(v);
  endfunction

  mv_t              corr;
  logic [ME_MV_W+1:0] mag;
  always_comb begin
    corr.x = sat(dfx);
    corr.y = sat(dfy);
    mag    = (ME_MV_W+2)'(absv(corr.x)) + (ME_MV_W+2)'(absv(corr.y));
  end

  logic emit;
  logic unused_sad;
  assign unused_sad = ^mem_rdata.sad;
  assign emit = rd_v && pass2_q && (dx != '0) && (dy != '0);

  always_ff @(posedge clk) begin
    if (rd_v && pass2_q) begin
      line[dxi] <= cur;
      left_mv   <= cur;
      upleft_mv <= up;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= emit;
      done      <= rd_v && pass2_q && rd_last;
      if (emit) begin
        out.pos_x  <= dx - 1'b1;
        out.pos_y  <= dy - 1'b1;
        out.interp <= interp;
        out.corr   <= corr;
        out.moving <= (int'(mag) > MOVE_TH);
      end
    end
  end

endmodule
