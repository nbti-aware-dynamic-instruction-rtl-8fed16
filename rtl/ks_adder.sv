// ks_adder: W-bit Kogge-Stone parallel-prefix adder.
//
// The scheduling study models each integer ALU as a Kogge-Stone adder when it
// estimates NBTI delay, so the ALU of this design is built around one. Bit
// generate/propagate pairs are combined in log2(W) prefix levels; at level k
// every bit i >= 2^k merges with bit i-2^k. The carry into bit i is the
// group generate of bits i-1..0 together with cin; sum = p ^ carry.
// Purely combinational: a, b, cin in; sum and cout out in the same cycle.
// The prefix structure is the textbook Kogge-Stone network; the width
// parameter is this design's choice (default 64, the Alpha integer width).
module ks_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned LEVELS = $clog2(W);

  // g[k][i], p[k][i]: group generate/propagate of bit i after level k.
  // Level 0 folds cin into bit 0's generate so that the prefix at bit i is
  // directly the carry out of bit i.
  logic [W-1:0] g [LEVELS+1];
  logic [W-1:0] p [LEVELS+1];
  logic [W-1:0] hp;  // half-sum a ^ b

  assign hp   = a ^ b;
  assign g[0] = (a & b) | {{(W-1){1'b0}}, hp[0] & cin};
  assign p[0] = hp;

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int unsigned D = 1 << k;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= D) begin : g_merge
        assign g[k+1][i] = g[k][i] | (p[k][i] & g[k][i-D]);
        assign p[k+1][i] = p[k][i] & p[k][i-D];
      end else begin : g_pass
        assign g[k+1][i] = g[k][i];
        assign p[k+1][i] = p[k][i];
      end
    end
  end

  // carry into bit i is the prefix carry out of bit i-1, cin for bit 0
  assign sum  = hp ^ {g[LEVELS][W-2:0], cin};
  assign cout = g[LEVELS][W-1];

endmodule
