// Controller of the motion estimation engine: counter, decision maker and
// encoder.
//
// One operation compares the current block (SUBM1) with two candidate
// blocks (SUBM2, SUBM3) and takes OP_LEN = 3*BLK + 3 cycles (51 for
// BLK = 16). A single counter runs 0 .. OP_LEN-1; the decision maker turns
// the count into the phase of the operation and the encoder drives the
// control word. With BLK = 16:
//
//   cnt  0..15  rows of the current block into SUBM1 (DEMUX select 0)
//   cnt 16..31  rows of candidate 2 into SUBM2 (select 1)
//   cnt 32..47  rows of candidate 3 into SUBM3 (select 2)
//   cnt 17..48  absolute differences captured, SUBM1 rotated
//   cnt 18..49  row sums accumulated (first row loaded at 18 and 34)
//   cnt 34      accumulator holds SAD of candidate 2
//   cnt 49      stored entry of the block read from the vector memory
//   cnt 50      accumulator holds SAD of candidate 3; decision and write
//
// This matches the source's timing: absolute differences start after 16
// cycles, run to cycle 49, and the final SAD is there at cycle 50. The
// controller then returns to its initial state. The two-state FSM and the
// back-to-back restart (start accepted in the last cycle) are this design's
// choices.
//
// Interface: start is taken when ready is high; op_load pulses then so the
// caller's operation descriptor can be latched; the first row must be on the
// row input in the next cycle, and a row is expected whenever ctl.wr_en is
// high. Reset is synchronous, active low.
module me_controller
  import me_pkg::*;
#(
  parameter int BLK = ME_BLK
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  output logic    ready,
  output logic    op_load,
  output logic    busy,
  output logic [$clog2(3*BLK+3)-1:0] cnt,
  output me_ctl_t ctl
);
  localparam int LAST = 3 * BLK + 2;
  localparam int CW   = $clog2(3 * BLK + 3);

  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t state;

  // counter block
  assign ready   = (state == S_IDLE) || (cnt == CW'(LAST));
  assign op_load = start && ready;
  assign busy    = (state == S_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else if (op_load) begin
      state <= S_RUN;
      cnt   <= '0;
    end else if (state == S_RUN) begin
      if (cnt == CW'(LAST)) begin
        state <= S_IDLE;
        cnt   <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // decision maker: which phase the count is in
  logic in_load, in_cmp, in_acc;
  int   c;
  always_comb begin
    c       = int'(cnt);
    in_load = busy && (c < 3 * BLK);
    in_cmp  = busy && (c >= BLK + 1) && (c <= 3 * BLK);
    in_acc  = busy && (c >= BLK + 2) && (c <= 3 * BLK + 1);
  end

  // encoder: control word
  always_comb begin
    ctl            = '0;
    ctl.wr_en      = in_load;
    ctl.wr_sel     = in_load ? 2'(c / BLK) : 2'd3;
    ctl.rot_en     = in_cmp;
    ctl.ad_en      = in_cmp;
    ctl.rd_sel     = in_cmp && (c >= 2 * BLK + 1);
    ctl.acc_en     = in_acc;
    ctl.acc_first  = in_acc && ((c == BLK + 2) || (c == 2 * BLK + 2));
    ctl.sad2_valid = busy && (c == 2 * BLK + 2);
    ctl.mem_rd     = busy && (c == 3 * BLK + 1);
    ctl.sad3_valid = busy && (c == 3 * BLK + 2);
  end

  a_first_in_acc: assert property (@(posedge clk) disable iff (!rst_n)
    ctl.acc_first |-> ctl.acc_en);
  a_sel_valid: assert property (@(posedge clk) disable iff (!rst_n)
    ctl.wr_en |-> (ctl.wr_sel != 2'd3));

endmodule
