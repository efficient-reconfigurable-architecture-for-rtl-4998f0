// SAD unit: row-parallel sum of absolute differences of two BLK x BLK blocks.
//
// Stage 1: BLK absolute difference units compare a row of the current block
// with a row of the candidate block; the BLK results are registered (ad_en).
// Stage 2: the adder array (Kogge-Stone tree) sums the registered row, and a
// Kogge-Stone accumulator adds the row sum to the running SAD (acc_en); on
// the first row of a block (acc_first) the row sum is loaded instead.
// After BLK rows the accumulator holds the block SAD. The two-stage pipeline
// is this design's choice and yields the cycle numbers the source gives for
// the controller.
//
// Interface: cur_row / ref_row are BLK pixels each. sad is registered.
// Timing: row r enters at edge t (ad_en), is accumulated at edge t+1; the
// SAD of a block whose last row entered at edge t is on sad after edge t+1.
module sad_unit
#(
  parameter int BLK   = me_pkg::ME_BLK,
  parameter int PIX_W = me_pkg::ME_PIX_W,
  parameter int SAD_W = me_pkg::ME_SAD_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [BLK-1:0][PIX_W-1:0] cur_row,
  input  logic [BLK-1:0][PIX_W-1:0] ref_row,
  input  logic                      ad_en,
  input  logic                      acc_en,
  input  logic                      acc_first,
  output logic [SAD_W-1:0]          sad
);
  localparam int ROW_W = PIX_W + $clog2(BLK);   // width of a row sum

  logic [BLK-1:0][PIX_W-1:0] ad_c, ad_q;
  logic [ROW_W-1:0]          row_sum;
  logic [SAD_W-1:0]          acc_next;
  logic                      unused_cout;

  for (genvar i = 0; i < BLK; i++) begin : g_ad
    abs_diff #(.W(PIX_W)) u_ad (.a(cur_row[i]), .b(ref_row[i]), .ad(ad_c[i]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     ad_q <= '0;
    else if (ad_en) ad_q <= ad_c;
  end

  adder_tree #(.N(BLK), .IN_W(PIX_W), .OUT_W(ROW_W)) u_tree (
    .din(ad_q), .sum(row_sum)
  );

  ks_adder #(.W(SAD_W)) u_acc (
    .a(acc_first ? '0 : sad), .b(SAD_W'(row_sum)), .cin(1'b0),
    .sum(acc_next), .cout(unused_cout)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)      sad <= '0;
    else if (acc_en) sad <= acc_next;
  end

endmodule
