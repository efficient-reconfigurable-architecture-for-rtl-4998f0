// Local memory: DEMUX and the three sub-memories SUBM1, SUBM2, SUBM3.
//
// Rows of pixels arrive one per clock. The DEMUX, driven by the controller's
// select line, sends each row into one sub-memory: SUBM1 receives the
// current block, SUBM2 and SUBM3 the two candidate blocks of the reference
// frame. During the comparison SUBM1 is rotated so its rows come out again
// in order at cur_row, while cand_row shows the row just written into SUBM2
// or SUBM3 (selected by rd_sel), so each candidate is compared as it streams
// in. The three memories and the DEMUX follow the source; assigning SUBM1 to
// the current block is this design's reading of it.
//
// Interface: wr_sel 0/1/2 = SUBM1/2/3 (3 writes nothing); rot_en rotates
// SUBM1 only. Timing: a row written at a clock edge is visible on cand_row in
// the following cycle.
module local_memory
#(
  parameter int BLK   = me_pkg::ME_BLK,
  parameter int PIX_W = me_pkg::ME_PIX_W
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic [1:0]                wr_sel,
  input  logic                      rot_en,
  input  logic                      rd_sel,
  input  logic [BLK-1:0][PIX_W-1:0] din,
  output logic [BLK-1:0][PIX_W-1:0] cur_row,
  output logic [BLK-1:0][PIX_W-1:0] cand_row
);
  logic [2:0] we;                       // DEMUX outputs
  logic [BLK-1:0][PIX_W-1:0] head [3];
  logic [BLK-1:0][PIX_W-1:0] tail [3];

  always_comb begin
    we = '0;
    if (wr_en && wr_sel != 2'd3) we[wr_sel] = 1'b1;
  end

  for (genvar m = 0; m < 3; m++) begin : g_subm
    sub_memory #(.BLK(BLK), .PIX_W(PIX_W)) u_subm (
      .clk   (clk),
      .wr_en (we[m]),
      .rot_en(m == 0 ? rot_en : 1'b0),
      .din   (din),
      .head  (head[m]),
      .tail  (tail[m])
    );
  end

  assign cur_row  = tail[0];
  assign cand_row = rd_sel ? head[2] : head[1];

endmodule
