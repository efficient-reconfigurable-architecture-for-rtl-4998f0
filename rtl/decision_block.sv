// Decision block: chooses the motion vector of an operation and updates the
// motion vector memory.
//
// When the controller marks the SAD of candidate 2 (sad2_valid) it is kept in
// a register. When the SAD of candidate 3 arrives (sad3_valid) a
// Kogge-Stone comparator picks the smaller of the two (a tie keeps candidate
// 2). A second comparator holds the winner against the entry already stored
// for the block; the winner is written back when it is strictly better, or
// unconditionally on the block's first operation. Repeating operations over
// all candidate displacements of a search window therefore performs a full
// search, one pair of candidates at a time. Comparing with the stored vector
// follows the source's decision block; the pairwise search order and the
// tie rules are this design's choices.
//
// Interface: op is the operation descriptor, stable during the operation;
// mem_rdata must hold the block's stored entry when sad3_valid is high.
// Timing: the memory write is issued in the sad3_valid cycle; res_valid and
// res follow one cycle later.
module decision_block
  import me_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ME_SAD_W-1:0] sad,
  input  logic                sad2_valid,
  input  logic                sad3_valid,
  input  me_op_t              op,
  input  mv_entry_t           mem_rdata,
  output logic                mem_we,
  output logic [ME_AW-1:0]    mem_addr,
  output mv_entry_t           mem_wdata,
  output logic                res_valid,
  output me_res_t             res
);
  logic [ME_SAD_W-1:0] sad2_q;
  logic                pick3, pick3_eq;
  logic                better, better_eq;
  mv_entry_t           best;

  always_ff @(posedge clk) begin
    if (!rst_n)          sad2_q <= '0;
    else if (sad2_valid) sad2_q <= sad;
  end

  // candidate 3 wins only when strictly smaller
  ks_comparator #(.W(ME_SAD_W)) u_cmp23 (.a(sad), .b(sad2_q), .lt(pick3), .eq(pick3_eq));

  always_comb begin
    best.mv  = pick3 ? op.cand3 : op.cand2;
    best.sad = pick3 ? sad : sad2_q;
  end

  ks_comparator #(.W(ME_SAD_W)) u_cmpmem (.a(best.sad), .b(mem_rdata.sad), .lt(better), .eq(better_eq));

  assign mem_addr  = op.blk_addr;
  assign mem_we    = sad3_valid && (op.first || better);
  assign mem_wdata = best;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res       <= '0;
    end else begin
      res_valid <= sad3_valid;
      if (sad3_valid) begin
        res.blk_addr <= op.blk_addr;
        res.updated  <= mem_we;
        res.pick3    <= pick3;
        res.mv       <= mem_we ? best.mv  : mem_rdata.mv;
        res.sad      <= mem_we ? best.sad : mem_rdata.sad;
      end
    end
  end

  logic unused;
  assign unused = pick3_eq ^ better_eq;

endmodule
