// Motion vector memory: one entry per block of the frame.
//
// Each entry holds the best motion vector found so far for a block and its
// SAD. Written as a simple dual-port block RAM: port A (read/write, used by
// the decision block) and port B (read only, used by motion correction).
// Both reads are registered, so data appear one cycle after the address;
// port A reads the old contents when it writes the same address. The source
// keeps the vectors in FPGA block RAM sized by the frame; the frame size, and
// so DEPTH, is this design's assumption (300 blocks of a 320x240 frame).
//
// Interface: a_en/a_we/a_addr/a_wdata/a_rdata, b_en/b_addr/b_rdata.
// Timing: one access per port per cycle; no reset of the contents.
module mv_memory #(
  parameter int DEPTH = me_pkg::ME_NBLK,
  parameter int DW    = $bits(me_pkg::mv_entry_t),
  parameter int AW    = me_pkg::ME_AW
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic [AW-1:0] b_addr,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
