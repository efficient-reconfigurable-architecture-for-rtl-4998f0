// Absolute difference |a - b| of two unsigned pixels.
//
// Structure as in the source architecture: the subtraction is done as the
// addition a + ~b + 1 on a Kogge-Stone adder; the sign of the result is read
// from the adder's carry out (carry 1 means a >= b, so no borrow). A MUX then
// passes either the raw difference or its two's complement, and that two's
// complement (~d + 1) is formed by a second Kogge-Stone adder.
//
// Interface: a = current-frame pixel, b = reference-frame pixel, ad = |a-b|.
// Timing: combinational; the SAD unit registers the result.
module abs_diff #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] ad
);
  logic [W-1:0] diff, neg;
  logic         no_borrow;
  logic         unused_cout;

  // d = a - b (mod 2^W)
  ks_adder #(.W(W)) u_sub (.a(a), .b(~b), .cin(1'b1), .sum(diff), .cout(no_borrow));
  // two's complement of d, used when a < b
  ks_adder #(.W(W)) u_neg (.a(~diff), .b('0), .cin(1'b1), .sum(neg), .cout(unused_cout));

  assign ad = no_borrow ? diff : neg;

endmodule
