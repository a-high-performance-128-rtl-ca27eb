// kogge_stone_adder: W-bit parallel-prefix adder with the Kogge-Stone network.
//
// Every bit first forms its generate g = a & b and propagate p = a ^ b. The
// carry in is folded into the generate of bit 0. The network then has
// ceil(log2 W) levels: at level l each bit i >= 2**l merges its group pair
// with that of bit i - 2**l through the prefix (dot) operator, so every node
// drives at most one cell of the next level and the depth is minimal. After
// the last level node i holds the carry out of bits 0..i, and
// sum[i] = p[i] ^ carry[i-1].
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
// The network (spans 1, 2, 4, ... per level, cells drawn as the dot operator
// for 2 and 32 bits) follows the published design; folding the carry in into bit 0 and
// the width parameter are this design's choices.
module kogge_stone_adder
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

  gp_t        node [LEVELS+1][W];
  logic [W-1:0] p;

  always_comb begin
    p = a ^ b;
    for (int i = 0; i < W; i++) begin
      node[0][i].g = a[i] & b[i];
      node[0][i].p = p[i];
    end
    node[0][0].g = (a[0] & b[0]) | (p[0] & cin);
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << l)) node[l+1][i] = prefix_op(node[l][i], node[l][i-(1<<l)]);
        else               node[l+1][i] = node[l][i];
      end
    end
    sum[0] = p[0] ^ cin;
    for (int i = 1; i < W; i++) sum[i] = p[i] ^ node[LEVELS][i-1].g;
    cout = node[LEVELS][W-1].g;
  end

endmodule
