// Moving object detection with motion compensation: top level.
//
// Block-matching motion estimation followed by global motion correction.
// The host streams, for each operation, one current 16x16 block and two
// candidate 16x16 blocks of the reference frame, one 16-pixel row per clock.
// The controller routes the rows through the DEMUX into SUBM1 (current) and
// SUBM2/SUBM3 (candidates). While a candidate streams in, the SAD unit
// (16 absolute difference units, a Kogge-Stone adder array and accumulator)
// compares it row by row with the current block replayed from SUBM1. The
// decision block keeps the better candidate and, if it beats the vector
// stored for that block, writes it to the motion vector memory. Repeating
// operations over the candidate displacements of a search window gives a
// full search; the memory then holds every block's motion vector.
// A motion correction pass (mc_start) reads the memory, estimates the
// camera's global motion, interpolates the overlapped 2N x 2N blocks and
// reports each one's vector with the global motion removed, plus a moving
// flag.
//
// Interface:
//   start/op/ready  start an operation; op is latched when start && ready
//   row_req/row_in  a row must be on row_in in each cycle row_req is high:
//                   16 rows of the current block, then 16 of candidate 2,
//                   then 16 of candidate 3
//   res_valid/res   result of each operation
//   mc_*            correction pass over the vector memory
// Timing: an operation takes 51 cycles from the cycle after start; the
// final SAD is in the accumulator in cycle 50 and res_valid follows one
// cycle later. Operations may be issued back to back.
// The partitioning follows the source architecture; the descriptor-driven
// search, the memory layout and the correction arithmetic are this
// design's own choices (see the module headers).
module me_top
  import me_pkg::*;
#(
  parameter int BW      = ME_BW,
  parameter int BH      = ME_BH,
  parameter int MOVE_TH = 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // motion estimation
  input  logic                         start,
  input  me_op_t                       op,
  output logic                         ready,
  output logic                         row_req,
  input  logic [ME_BLK-1:0][ME_PIX_W-1:0] row_in,
  output logic                         res_valid,
  output me_res_t                      res,
  // motion correction
  input  logic                         mc_start,
  output logic                         mc_busy,
  output logic                         mc_valid,
  output mc_out_t                      mc_out,
  output mv_t                          mc_global,
  output logic                         mc_done
);
  me_ctl_t ctl;
  logic    op_load, busy;
  logic [$clog2(ME_OP_LEN)-1:0] cnt;
  me_op_t  op_q;

  me_controller #(.BLK(ME_BLK)) u_ctl (
    .clk, .rst_n, .start, .ready, .op_load, .busy, .cnt, .ctl
  );

  always_ff @(posedge clk) begin
    if (!rst_n)       op_q <= '0;
    else if (op_load) op_q <= op;
  end

  assign row_req = ctl.wr_en;

  logic [ME_BLK-1:0][ME_PIX_W-1:0] cur_row, cand_row;

  local_memory #(.BLK(ME_BLK), .PIX_W(ME_PIX_W)) u_lmem (
    .clk, .wr_en(ctl.wr_en), .wr_sel(ctl.wr_sel), .rot_en(ctl.rot_en),
    .rd_sel(ctl.rd_sel), .din(row_in), .cur_row, .cand_row
  );

  logic [ME_SAD_W-1:0] sad;

  sad_unit #(.BLK(ME_BLK), .PIX_W(ME_PIX_W), .SAD_W(ME_SAD_W)) u_sad (
    .clk, .rst_n, .cur_row, .ref_row(cand_row), .ad_en(ctl.ad_en),
    .acc_en(ctl.acc_en), .acc_first(ctl.acc_first), .sad
  );

  logic             mem_we;
  logic [ME_AW-1:0] mem_addr;
  mv_entry_t        mem_wdata, mem_rdata_a, mem_rdata_b;
  logic             mc_mem_en;
  logic [ME_AW-1:0] mc_mem_addr;

  decision_block u_dec (
    .clk, .rst_n, .sad, .sad2_valid(ctl.sad2_valid), .sad3_valid(ctl.sad3_valid),
    .op(op_q), .mem_rdata(mem_rdata_a), .mem_we, .mem_addr, .mem_wdata,
    .res_valid, .res
  );

  mv_memory #(.DEPTH(BW * BH), .DW($bits(mv_entry_t)), .AW(ME_AW)) u_mvm (
    .clk,
    .a_en(ctl.mem_rd || mem_we), .a_we(mem_we), .a_addr(mem_addr),
    .a_wdata(mem_wdata), .a_rdata(mem_rdata_a),
    .b_en(mc_mem_en), .b_addr(mc_mem_addr), .b_rdata(mem_rdata_b)
  );

  motion_correction #(.BW(BW), .BH(BH), .MOVE_TH(MOVE_TH)) u_mc (
    .clk, .rst_n, .start(mc_start), .busy(mc_busy),
    .mem_en(mc_mem_en), .mem_addr(mc_mem_addr), .mem_rdata(mem_rdata_b),
    .out_valid(mc_valid), .out(mc_out), .global_mv(mc_global), .done(mc_done)
  );

  logic unused;
  assign unused = busy ^ (^cnt);

  a_op_addr: assert property (@(posedge clk) disable iff (!rst_n)
    op_load |-> (int'(op.blk_addr) < BW * BH));
  a_mvm_a_range: assert property (@(posedge clk) disable iff (!rst_n)
    (ctl.mem_rd || mem_we) |-> (int'(mem_addr) < BW * BH));
  a_mvm_b_range: assert property (@(posedge clk) disable iff (!rst_n)
    mc_mem_en |-> (int'(mc_mem_addr) < BW * BH));

endmodule
