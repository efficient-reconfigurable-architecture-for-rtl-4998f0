// One sub-memory (SUBM1, SUBM2 or SUBM3): a BLK x BLK pixel block held in a
// parallel D flip-flop shift register of rows.
//
// A row written with wr_en enters at the head (row[0]) while every stored
// row moves one place towards the tail; after BLK writes the first row
// written sits at the tail (row[BLK-1]). With rot_en the tail row is fed back
// to the head, so BLK rotations replay the block in the order it was written
// and restore it; the engine uses this to compare the current block with two
// candidates without any address logic. The row-wide shift register follows
// the source's parallel D flip-flop storage; the rotate mode is this design's
// own choice.
//
// Interface: wr_en has priority over rot_en. head = newest row, tail = oldest.
// Timing: one row per clock; outputs are registered. No reset: the contents
// are only read after BLK writes.
module sub_memory
#(
  parameter int BLK   = me_pkg::ME_BLK,
  parameter int PIX_W = me_pkg::ME_PIX_W
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic                      rot_en,
  input  logic [BLK-1:0][PIX_W-1:0] din,
  output logic [BLK-1:0][PIX_W-1:0] head,
  output logic [BLK-1:0][PIX_W-1:0] tail
);
  logic [BLK-1:0][PIX_W-1:0] rows [BLK];

  always_ff @(posedge clk) begin
    if (wr_en || rot_en) begin
      rows[0] <= wr_en ? din : rows[BLK-1];
      for (int r = 1; r < BLK; r++) rows[r] <= rows[r-1];
    end
  end

  assign head = rows[0];
  assign tail = rows[BLK-1];

endmodule
