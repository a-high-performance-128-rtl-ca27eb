// mac128: 128-bit multiplier-accumulator, acc <- acc + a * b.
//
// One reduced-row Wallace multiplier forms the 256-bit product of the two
// 128-bit operands in a single cycle. The product goes to three accumulate
// paths side by side, each an adder of a different kind with its own 257-bit
// parallel-in parallel-out accumulator fed back to that adder:
//   acc_ksa  Kogge-Stone parallel-prefix adder (the fast path)
//   acc_bka  Brent-Kung parallel-prefix adder (the small path)
//   acc_csa  carry-save adder
// All three see the same controls, so in normal use they hold the same value;
// a design that needs only one adder keeps one path.
//
// Interface (N = 128; N = 64 gives the 64-bit MAC with a 129-bit accumulator):
//   a, b      operands, read every cycle in which en is high
//   en        accumulate a*b on the rising clock edge
//   clr       synchronous clear of the accumulators and overflow flags
//             (priority over en)
//   rst_n     asynchronous active-low reset
//   acc_*     accumulator values (2N+1 bits), registered
//   ovf_*     sticky: the sum has wrapped past 2N+1 bits since the last clear
// Timing: one multiply-accumulate per clock; multiplier and adder are
// combinational between the operand ports and the accumulators, so acc_*
// shows a*b added one clock edge after a, b and en were presented.
// The structure (multiplier, adder, accumulator with feedback), the widths
// and the three adders fed by one multiplier follow the published design; the control
// signals, reset and overflow flag are this design's choices. Operands come
// from an external memory, which is not part of this design.
module mac128
  import mac_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           en,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N:0]   acc_ksa,
  output logic [2*N:0]   acc_bka,
  output logic [2*N:0]   acc_csa,
  output logic           ovf_ksa,
  output logic           ovf_bka,
  output logic           ovf_csa
);

  logic [2*N-1:0] product;

  wallace_multiplier #(.N(N)) u_mul (
    .a(a), .b(b), .p(product)
  );

  mac_accumulator #(.PW(2*N), .ADDER(ADD_KOGGE_STONE)) u_acc_ksa (
    .clk, .rst_n, .clr, .en, .product, .acc(acc_ksa), .ovf(ovf_ksa)
  );

  mac_accumulator #(.PW(2*N), .ADDER(ADD_BRENT_KUNG)) u_acc_bka (
    .clk, .rst_n, .clr, .en, .product, .acc(acc_bka), .ovf(ovf_bka)
  );

  mac_accumulator #(.PW(2*N), .ADDER(ADD_CARRY_SAVE)) u_acc_csa (
    .clk, .rst_n, .clr, .en, .product, .acc(acc_csa), .ovf(ovf_csa)
  );

endmodule
