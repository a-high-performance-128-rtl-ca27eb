// carry_select_adder: W-bit linear carry-select adder with M-bit stages.
//
// The operands are cut into stages of M bits (the last one may be shorter).
// Each stage holds two ripple-carry chains that add its bits at once, one
// assuming a carry in of 0 and one assuming 1. When the real carry into the
// stage arrives a multiplexer picks the sum and carry out of the matching
// chain, so the critical path is one stage of ripple plus one multiplexer per
// stage: T = t_setup + M t_carry + (W/M) t_mux + t_sum.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
// The stage structure (setup, 0- and 1-carry propagation, multiplexer, sum
// generation) and the 4-bit stage width follow the published design; the width
// parameters are this design's. In this design it is the final
// (vector-merging) adder of the Wallace multiplier.
module carry_select_adder
  import mac_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned M = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NSTAGE = (W + M - 1) / M;

  logic [W-1:0] sum0, sum1;       // stage sums for carry in 0 and 1
  logic [NSTAGE-1:0] co0, co1;    // stage carry outs for carry in 0 and 1

  always_comb begin
    logic c0, c1;
    logic cy;         // selected carry into the current stage
    c0   = 1'b0;
    c1   = 1'b0;
    cy   = cin;
    sum0 = '0;
    sum1 = '0;
    sum  = '0;
    co0  = '0;
    co1  = '0;
    for (int k = 0; k < NSTAGE; k++) begin
      c0 = 1'b0;
      c1 = 1'b1;
      for (int j = 0; j < M; j++) begin
        if (k * M + j < W) begin
          {c0, sum0[k*M+j]} = full_add(a[k*M+j], b[k*M+j], c0);
          {c1, sum1[k*M+j]} = full_add(a[k*M+j], b[k*M+j], c1);
        end
      end
      co0[k] = c0;
      co1[k] = c1;
    end
    cy = cin;
    for (int k = 0; k < NSTAGE; k++) begin
      for (int j = 0; j < M; j++) begin
        if (k * M + j < W) sum[k*M+j] = cy ? sum1[k*M+j] : sum0[k*M+j];
      end
      cy = cy ? co1[k] : co0[k];
    end
    cout = cy;
  end

endmodule
