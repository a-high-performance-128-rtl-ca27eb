// brent_kung_adder: W-bit parallel-prefix adder with the Brent-Kung network.
//
// Bits form generate g = a & b and propagate p = a ^ b, with the carry in
// folded into bit 0. An up-sweep tree then merges groups of 2, 4, 8, ... bits
// (node i at span d when (i+1) is a multiple of 2d), which gives the full
// prefix at bits 1, 3, 7, 15, ... . A down-sweep tree fills in the remaining
// bits with spans d = .., 4, 2, 1 (node i when (i+1) mod 2d == d, i > d).
// For W a power of two that uses 2(W-1) - log2 W prefix cells and
// 2 log2 W - 1 levels: the least area of the prefix adders, at the cost of
// depth. The same rules work for any W.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
// The tree shape (32-bit example in six stages) and the cell count follow the
// published design; the carry-in folding and the generic-width rules are this design's.
module brent_kung_adder
  import mac_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  gp_t          node [W];
  logic [W-1:0] p;

  always_comb begin
    p = a ^ b;
    for (int i = 0; i < W; i++) begin
      node[i].g = a[i] & b[i];
      node[i].p = p[i];
    end
    node[0].g = (a[0] & b[0]) | (p[0] & cin);
    // Up-sweep: spans 1, 2, 4, ...
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < W; i++) begin
        if (((i + 1) % (2 << l)) == 0) node[i] = prefix_op(node[i], node[i-(1<<l)]);
      end
    end
    // Down-sweep: spans ..., 4, 2, 1
    for (int l = LEVELS - 1; l >= 0; l--) begin
      for (int i = 0; i < W; i++) begin
        if ((((i + 1) % (2 << l)) == (1 << l)) && (i > (1 << l)))
          node[i] = prefix_op(node[i], node[i-(1<<l)]);
      end
    end
    sum[0] = p[0] ^ cin;
    for (int i = 1; i < W; i++) sum[i] = p[i] ^ node[i-1].g;
    cout = node[W-1].g;
  end

endmodule
