// tb_carry_select_adder: self-checking test of carry_select_adder.
//
// Two instances are checked: the default width and the 257-bit width the
// 128-bit MAC accumulates with. Every vector's {cout, sum} is compared with
// a + b + cin worked out by the simulator's own wide arithmetic. Vectors:
// zero, all-ones plus carry in (a carry that ripples through every bit),
// alternating patterns, and random words. A watchdog ends the run if it hangs.
module tb_carry_select_adder;

  localparam int unsigned WA = 32;
  localparam int unsigned WB = 257;

  int checks   = 0;
  int failures = 0;

  logic [WA-1:0] a_a, b_a, s_a;
  logic          c_a, co_a;
  logic [WB-1:0] a_b, b_b, s_b;
  logic          c_b, co_b;

  carry_select_adder #(.W(WA), .M(4)) dut_a (.a(a_a), .b(b_a), .cin(c_a), .sum(s_a), .cout(co_a));
  carry_select_adder #(.W(WB), .M(4)) dut_b (.a(a_b), .b(b_b), .cin(c_b), .sum(s_b), .cout(co_b));

  function automatic logic [WB-1:0] rand_word();
    logic [WB-1:0] w;
    for (int i = 0; i < WB; i += 32) w[i +: 32] = $urandom();
    return w;
  endfunction

  task automatic check_a(logic [WA-1:0] x, logic [WA-1:0] y, logic ci);
    logic [WA:0] expect_v;
    a_a = x; b_a = y; c_a = ci;
    #1;
    expect_v = {1'b0, x} + {1'b0, y} + {{WA{1'b0}}, ci};
    checks++;
    if ({co_a, s_a} !== expect_v) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h cin=%b got %h expected %h", WA, x, y, ci, {co_a, s_a}, expect_v);
    end
  endtask

  task automatic check_b(logic [WB-1:0] x, logic [WB-1:0] y, logic ci);
    logic [WB:0] expect_v;
    a_b = x; b_b = y; c_b = ci;
    #1;
    expect_v = {1'b0, x} + {1'b0, y} + {{WB{1'b0}}, ci};
    checks++;
    if ({co_b, s_b} !== expect_v) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h cin=%b got %h expected %h", WB, x, y, ci, {co_b, s_b}, expect_v);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_a('0, '0, 1'b0);
    check_a('1, '0, 1'b1);
    check_a('1, '1, 1'b1);
    check_a({(WA/2){2'b01}}, {(WA/2){2'b10}}, 1'b1);
    check_b('0, '0, 1'b0);
    check_b('1, '0, 1'b1);
    check_b('1, '1, 1'b0);
    check_b({1'b0, {128{2'b01}}}, {1'b1, {128{2'b10}}}, 1'b1);
    for (int n = 0; n < 2000; n++) begin
      check_a($urandom(), $urandom(), 1'($urandom()));
      check_b(rand_word(), rand_word(), 1'($urandom()));
    end
    // Carry chains of every length starting at bit 0.
    for (int k = 0; k < WB; k++) check_b((WB'(1) << k) - 1, WB'(1), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
