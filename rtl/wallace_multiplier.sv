// wallace_multiplier: unsigned N x N multiplier with a reduced-row (modified)
// Wallace tree and a carry-select final adder.
//
// Three phases, all combinational:
//  1. Partial products: bit a[i] & b[j] goes to column i+j. Each column keeps
//     its bits packed from row 0 down, which is the N x N matrix rearranged
//     into an inverted pyramid.
//  2. Reduction: with r rows left, a stage groups the rows into disjoint
//     triples. In every column a full triple goes through a full adder (sum
//     stays in the column, carry moves one column left); one or two leftover
//     bits pass through. The stage must end with
//        r' = 2 * floor(r / 3) + (r mod 3)
//     rows. Columns are handled from the least significant end, and only
//     where a column would end up taller than r' are its two leftover bits
//     put through a half adder. Stages repeat until two rows remain:
//     10 stages for N = 64 (64, 43, 29, 20, 14, 10, 7, 5, 4, 3, 2) and 11 for
//     N = 128. For N = 64 half adders are needed in the last stage only.
//  3. The two rows are added by carry_select_adder (4-bit stages).
//
// Interface: a[N-1:0], b[N-1:0] in; p[2N-1:0] out. No clock.
// The row formula, the grouping into triples, the rule that half adders are
// used only where the row count is not met, and the stage count follow the
// published design. The column-by-column, low-end-first placement of half adders and
// the choice of a carry-select final adder are this design's: with that
// placement the 64-bit tree uses 53 half adders, all in its last stage.
//
// Implementation: one always_comb block runs the three phases on column
// arrays (cur/nxt hold each column's bits, hc/hn their heights). The heights
// never depend on the operand values, so every loop bound and every index
// is fixed once N is fixed: the block describes a fixed network of AND gates,
// full adders and half adders, written as loops rather than as thousands of
// instances.
module wallace_multiplier
  import mac_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned COLS    = 2 * N;
  localparam int unsigned H       = N + 1;            // column storage depth
  localparam int unsigned NSTAGES = wallace_stages(N);

  logic [2*N-1:0] row0, row1;   // the two rows left for the final adder
  logic           cpa_cout;

  always_comb begin
    logic [H-1:0] cur [COLS];
    logic [H-1:0] nxt [COLS];
    int unsigned  hc  [COLS];
    int unsigned  hn  [COLS];
    int unsigned  rows, target, nfa, nrem, base;
    logic [1:0]   cs;

    cs     = '0;
    rows   = N;
    target = 0;
    nfa    = 0;
    nrem   = 0;
    base   = 0;
    for (int c = 0; c < COLS; c++) begin
      cur[c] = '0;
      nxt[c] = '0;
      hc[c]  = 0;
      hn[c]  = 0;
    end

    // Phase 1: partial-product matrix, packed per column.
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        cur[i+j][hc[i+j]] = a[i] & b[j];
        hc[i+j]++;
      end
    end

    // Phase 2: reduction stages.
    for (int s = 0; s < NSTAGES; s++) begin
      target = wallace_next_rows(rows);
      for (int c = 0; c < COLS; c++) begin
        nxt[c] = '0;
        hn[c]  = 0;
      end
      for (int c = 0; c < COLS; c++) begin
        nfa  = hc[c] / 3;
        nrem = hc[c] % 3;
        for (int k = 0; k < H / 3; k++) begin
          if (k < nfa) begin
            cs = full_add(cur[c][3*k], cur[c][3*k+1], cur[c][3*k+2]);
            nxt[c][hn[c]] = cs[0];
            hn[c]++;
            if (c + 1 < COLS) begin
              nxt[c+1][hn[c+1]] = cs[1];
              hn[c+1]++;
            end
          end
        end
        base = 3 * nfa;
        // hn[c] already counts the carries coming in from column c-1.
        if (nrem == 2 && (hn[c] + nrem) > target) begin
          cs = half_add(cur[c][base], cur[c][base+1]);
          nxt[c][hn[c]] = cs[0];
          hn[c]++;
          if (c + 1 < COLS) begin
            nxt[c+1][hn[c+1]] = cs[1];
            hn[c+1]++;
          end
        end else begin
          for (int k = 0; k < 2; k++) begin
            if (k < nrem) begin
              nxt[c][hn[c]] = cur[c][base+k];
              hn[c]++;
            end
          end
        end
      end
      for (int c = 0; c < COLS; c++) begin
        cur[c] = nxt[c];
        hc[c]  = hn[c];
      end
      rows = target;
    end

    // Phase 3 operands: at most two bits are left in every column.
    for (int c = 0; c < COLS; c++) begin
      row0[c] = cur[c][0];
      row1[c] = cur[c][1];
    end
  end

  // Two rows of a product always add up without a carry out of 2N bits.
  always_comb begin
    assert (!cpa_cout) else $error("wallace_multiplier: carry out of the final adder");
  end

  carry_select_adder #(.W(COLS), .M(4)) u_cpa (
    .a   (row0),
    .b   (row1),
    .cin (1'b0),
    .sum (p),
    .cout(cpa_cout)
  );

endmodule
