// Magnitude comparator built on a Kogge-Stone subtraction.
//
// a < b exactly when a - b borrows, i.e. when the carry out of
// a + ~b + 1 is 0. The equality flag reuses the same difference. The
// source asks for a comparator made of basic logic and the Kogge-Stone
// adder; this is the simplest such circuit.
//
// Interface: unsigned a, b; lt = (a < b), eq = (a == b).
// Timing: combinational.
module ks_comparator #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         lt,
  output logic         eq
);
  logic [W-1:0] diff;
  logic         no_borrow;

  ks_adder #(.W(W)) u_sub (.a(a), .b(~b), .cin(1'b1), .sum(diff), .cout(no_borrow));

  assign lt = ~no_borrow;
  assign eq = (diff == '0);

endmodule
