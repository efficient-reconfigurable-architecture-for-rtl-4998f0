// Kogge-Stone parallel-prefix adder.
//
// Every arithmetic unit of the engine (absolute difference, adder array,
// SAD accumulator, comparator, compensation) is built on this adder, as the
// source architecture prescribes. It is the textbook radix-2 Kogge-Stone
// network: bit generate/propagate signals are combined in ceil(log2(W))
// prefix levels, level l joining each bit with the bit 2^l below it. The
// carry-in is folded into the generate of bit 0, so the prefix generate of
// bit i is directly the carry out of bit i.
//
// Interface: a, b, cin in; sum = (a + b + cin) mod 2^W, cout = carry out.
// Timing: purely combinational.
module ks_adder #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] hp;            // half-sum a ^ b
  logic [W-1:0] gpre;          // prefix generate = carry out of each bit

  assign hp = a ^ b;

  always_comb begin
    logic [W-1:0] g, p, gn, pn;
    g    = a & b;
    g[0] = (a[0] & b[0]) | (hp[0] & cin);
    p    = hp;
    for (int l = 0; l < L; l++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << l)) begin
          gn[i] = g[i] | (p[i] & g[i - (1 << l)]);
          pn[i] = p[i] & p[i - (1 << l)];
        end else begin
          gn[i] = g[i];
          pn[i] = p[i];
        end
      end
      g = gn;
      p = pn;
    end
    gpre = g;
  end

  assign sum  = hp ^ ((gpre << 1) | W'(cin));
  assign cout = gpre[W-1];

endmodule
