// mac_accumulator: one accumulate path of the MAC, an adder plus the PIPO
// accumulator register that feeds it back.
//
// The 2N-bit product (PW = 2N bits) is zero-extended to the accumulator
// width AW = PW + 1 and added to the current accumulator value by the adder
// chosen with ADDER (Kogge-Stone, Brent-Kung or carry-save). The AW-bit sum is
// loaded in parallel into the accumulator register on the clock edge, and the
// register's parallel output is both the path's result and the adder's second
// operand. A sum that does not fit in AW bits wraps; the carry out of bit
// AW-1 is kept in a sticky overflow flag until the next clear.
//
// Interface / timing (one MAC per clock, no pipeline):
//   clr  synchronous: acc <= 0, ovf <= 0 (has priority over en)
//   en   acc <= acc + product, ovf <= ovf | carry out
//   neither: acc holds (a stall).
//   rst_n asynchronous, active low, same effect as clr.
// acc shows the new value one clock after the product that produced it.
// The 128-bit product, the 129-bit accumulator of the 64-bit MAC (257 bits
// for 128) fed back to the adder, and the PIPO register follow the published design;
// clr, en, rst_n and the overflow flag are this design's choices.
module mac_accumulator
  import mac_pkg::*;
#(
  parameter int unsigned PW    = 256,
  parameter adder_kind_e ADDER = ADD_KOGGE_STONE
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [PW-1:0] product,
  output logic [PW:0]   acc,
  output logic          ovf
);

  localparam int unsigned AW = PW + 1;

  logic [AW-1:0] sum;
  logic          carry;

  if (ADDER == ADD_KOGGE_STONE) begin : g_ksa
    kogge_stone_adder #(.W(AW)) u_add (
      .a({1'b0, product}), .b(acc), .cin(1'b0), .sum(sum), .cout(carry)
    );
  end else if (ADDER == ADD_BRENT_KUNG) begin : g_bka
    brent_kung_adder #(.W(AW)) u_add (
      .a({1'b0, product}), .b(acc), .cin(1'b0), .sum(sum), .cout(carry)
    );
  end else begin : g_csa
    logic cs_cout;  // top half adder's carry, zero for two operands
    carry_save_adder #(.W(AW)) u_add (
      .a({1'b0, product}), .b(acc), .cin(1'b0), .sum({carry, sum}), .cout(cs_cout)
    );
    always_comb begin
      assert (!cs_cout) else $error("mac_accumulator: carry out of the carry-save top cell");
    end
  end

  // Parallel-in parallel-out accumulator register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      ovf <= 1'b0;
    end else if (clr) begin
      acc <= '0;
      ovf <= 1'b0;
    end else if (en) begin
      acc <= sum;
      ovf <= ovf | carry;
    end
  end

endmodule
