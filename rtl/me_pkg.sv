// Shared types and constants of the block-matching motion estimation and
// correction engine.
//
// A frame is cut into BLK x BLK pixel blocks. Pixels travel one block row
// (BLK pixels) per clock. Motion vectors are signed (x, y) pairs. Each block
// of the frame owns one motion vector memory entry holding the best vector
// found so far and its SAD.
//
// The 16x16 block size follows the source architecture; pixel width, vector
// width and the 320x240 frame (20 x 15 blocks) are this design's choices.
package me_pkg;

  localparam int ME_BLK     = 16;                 // block edge in pixels
  localparam int ME_PIX_W   = 8;                  // grey-level pixel width
  localparam int ME_MV_W    = 8;                  // width of one vector component
  localparam int ME_SAD_W   = 16;                 // enough for 16*16*255
  localparam int ME_FRAME_W = 320;
  localparam int ME_FRAME_H = 240;
  localparam int ME_BW      = ME_FRAME_W / ME_BLK;      // blocks per row (20)
  localparam int ME_BH      = ME_FRAME_H / ME_BLK;      // block rows (15)
  localparam int ME_NBLK    = ME_BW * ME_BH;            // 300
  localparam int ME_AW      = $clog2(ME_NBLK);       // 9

  // One operation: 48 row cycles and two drain cycles, then the decision.
  localparam int ME_OP_LEN  = 3 * ME_BLK + 3;        // 51 cycles, counter 0..50

  typedef logic [ME_PIX_W-1:0] pix_t;
  typedef pix_t [ME_BLK-1:0]   row_t;             // element 0 = leftmost pixel

  typedef struct packed {
    logic signed [ME_MV_W-1:0] x;
    logic signed [ME_MV_W-1:0] y;
  } mv_t;

  // Motion vector memory entry.
  typedef struct packed {
    mv_t              mv;
    logic [ME_SAD_W-1:0] sad;
  } mv_entry_t;

  // What the host supplies with each operation.
  typedef struct packed {
    logic [ME_AW-1:0] blk_addr;   // block of the frame being searched
    mv_t           cand2;      // displacement of the block in SUBM2
    mv_t           cand3;      // displacement of the block in SUBM3
    logic          first;      // first operation for this block: overwrite
  } me_op_t;

  // Result of one operation.
  typedef struct packed {
    logic [ME_AW-1:0]    blk_addr;
    mv_t              mv;      // best vector stored for the block
    logic [ME_SAD_W-1:0] sad;     // its SAD
    logic             updated; // memory entry replaced by this operation
    logic             pick3;   // SUBM3 beat SUBM2 in this operation
  } me_res_t;

  // Control word produced by the controller's encoder.
  typedef struct packed {
    logic       wr_en;      // a row enters the local memory
    logic [1:0] wr_sel;     // DEMUX select: 0 SUBM1, 1 SUBM2, 2 SUBM3
    logic       rot_en;     // rotate SUBM1 (replay the current block)
    logic       rd_sel;     // candidate row from SUBM2 (0) or SUBM3 (1)
    logic       ad_en;      // capture a row of absolute differences
    logic       acc_en;     // accumulate the row sum
    logic       acc_first;  // first row of a candidate: load, do not add
    logic       sad2_valid; // accumulator holds the SAD of SUBM2
    logic       sad3_valid; // accumulator holds the SAD of SUBM3
    logic       mem_rd;     // read the stored entry of the block
  } me_ctl_t;

  // Output of motion correction: one overlapped 2N x 2N block.
  typedef struct packed {
    logic [ME_AW-1:0]  pos_x;   // overlapped block column (0 .. ME_BW-2)
    logic [ME_AW-1:0]  pos_y;   // overlapped block row    (0 .. ME_BH-2)
    mv_t            interp;  // interpolated vector
    mv_t            corr;    // interpolated vector minus global motion
    logic           moving;  // |corr.x| + |corr.y| > threshold
  } mc_out_t;

endpackage
