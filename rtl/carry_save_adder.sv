// carry_save_adder: W-bit two-operand adder in carry-save form.
//
// First row: every bit pair is reduced on its own, in parallel, to a save
// sum s[i] = a[i] ^ b[i] and a save carry d[i+1] = a[i] & b[i] (bit 0 uses a
// full adder so that it can also take the carry in). Second row: the save
// vectors are merged with one adder cell per bit, the carry of each cell
// rippling into the next: a half adder at bit 1 (s[1] and d[1] only), full
// adders at bits 2 .. W-1 (s[i], d[i] and the rippled carry) and a half adder
// at the top that forms the extra sum bit from d[W] and the last carry.
// The result has W+1 bits; cout is that top half adder's carry and is always
// zero for two operands, it is kept because the structure has it.
//
// Interface: a, b, cin in; sum[W:0], cout out. Purely combinational.
// The two rows and the cell at each position follow the published design's 8-bit
// example; where that example shows a half adder at a position that receives
// three signals a full adder is used. W >= 2.
module carry_save_adder
  import mac_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W:0]   sum,
  output logic         cout
);

  logic [W-1:0] s;   // first-row sums
  logic [W:0]   d;   // first-row carries, d[i] has weight 2**i
  always_comb begin
    logic rc;        // second-row carry rippling from bit to bit
    // First row
    d[0] = 1'b0;
    {d[1], s[0]} = full_add(a[0], b[0], cin);
    for (int i = 1; i < W; i++) {d[i+1], s[i]} = half_add(a[i], b[i]);
    // Second row
    sum[0] = s[0];
    {rc, sum[1]} = half_add(s[1], d[1]);
    for (int i = 2; i < W; i++) {rc, sum[i]} = full_add(s[i], d[i], rc);
    {cout, sum[W]} = half_add(d[W], rc);
  end

endmodule
