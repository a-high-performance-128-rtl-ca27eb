// mac_pkg: types and bit-level helpers shared by the MAC datapath.
//
// adder_kind_e names the three accumulate adders the MAC is evaluated with
// (Kogge-Stone, Brent-Kung and the carry-save structure). The functions are
// the bit cells every adder in the design is built from: the half adder, the
// full adder and the prefix ("dot") operator that merges the (generate,
// propagate) pair of a high group with that of the adjacent lower group:
//   (G, P) = (G_hi | P_hi & G_lo, P_hi & P_lo).
// They are pure combinational functions; no state is kept here.
package mac_pkg;

  typedef enum logic [1:0] {
    ADD_KOGGE_STONE = 2'd0,
    ADD_BRENT_KUNG  = 2'd1,
    ADD_CARRY_SAVE  = 2'd2
  } adder_kind_e;

  // Group generate/propagate pair carried through a prefix network.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  function automatic gp_t prefix_op(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // {carry, sum} of a half adder.
  function automatic logic [1:0] half_add(logic x, logic y);
    return {x & y, x ^ y};
  endfunction

  // {carry, sum} of a full adder.
  function automatic logic [1:0] full_add(logic x, logic y, logic z);
    return {(x & y) | (z & (x ^ y)), x ^ y ^ z};
  endfunction

  // Rows left after one reduced-row Wallace stage that starts with r rows:
  // every whole group of three rows becomes two, the one or two rows left
  // over pass through.
  function automatic int unsigned wallace_next_rows(int unsigned r);
    return 2 * (r / 3) + (r % 3);
  endfunction

  // Number of reduction stages that bring r rows down to two.
  function automatic int unsigned wallace_stages(int unsigned r);
    int unsigned n;
    int unsigned rows;
    n = 0;
    rows = r;
    while (rows > 2) begin
      rows = wallace_next_rows(rows);
      n++;
    end
    return n;
  endfunction

endpackage
