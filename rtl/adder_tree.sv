// Adder array: sum of N unsigned values on a parallel tree of Kogge-Stone
// adders.
//
// The N inputs are zero-extended to OUT_W bits and padded with zeros up to
// the next power of two; each tree level then adds neighbouring pairs with
// OUT_W-bit Kogge-Stone adders, so ceil(log2(N)) adder delays separate input
// and output. In the engine N = 16 and the inputs are the 16 absolute
// differences of one block row. The tree shape is this design's choice; the
// source names only a parallel array of Kogge-Stone adders.
//
// Interface: din[i] is input i (IN_W bits); sum is their total. OUT_W must
// hold N * (2^IN_W - 1). Timing: combinational.
module adder_tree #(
  parameter int N     = 16,
  parameter int IN_W  = 8,
  parameter int OUT_W = 12
) (
  input  logic [N-1:0][IN_W-1:0] din,
  output logic [OUT_W-1:0]       sum
);
  localparam int LV = (N > 1) ? $clog2(N) : 0;   // tree levels
  localparam int NP = 1 << LV;                    // padded leaf count

  // node[k] of a heap: leaves at NP-1 .. 2*NP-2, root at 0
  logic [OUT_W-1:0] node [2*NP-1];

  for (genvar i = 0; i < NP; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign node[NP-1+i] = OUT_W'(din[i]);
    end else begin : g_pad
      assign node[NP-1+i] = '0;
    end
  end

  for (genvar k = 0; k < NP - 1; k++) begin : g_add
    logic unused_cout;
    ks_adder #(.W(OUT_W)) u_add (
      .a(node[2*k+1]), .b(node[2*k+2]), .cin(1'b0),
      .sum(node[k]), .cout(unused_cout)
    );
  end

  assign sum = node[0];

endmodule
