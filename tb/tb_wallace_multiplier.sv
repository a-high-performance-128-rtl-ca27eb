// tb_wallace_multiplier: self-checking test of wallace_multiplier.
//
// Three instances: the default 128 x 128, the 64 x 64 of the base MAC and the
// 10 x 10 tree used to illustrate the reduction. Every product is compared
// with a * b from the simulator's wide arithmetic. Vectors: zero, one,
// all-ones squared (every column at full height), walking ones, and random
// words. A watchdog ends the run if it hangs.
module tb_wallace_multiplier;

  int checks   = 0;
  int failures = 0;

  logic [127:0] a128, b128;
  logic [255:0] p128;
  logic [63:0]  a64, b64;
  logic [127:0] p64;
  logic [9:0]   a10, b10;
  logic [19:0]  p10;

  wallace_multiplier                dut128 (.a(a128), .b(b128), .p(p128));
  wallace_multiplier #(.N(64))      dut64  (.a(a64),  .b(b64),  .p(p64));
  wallace_multiplier #(.N(10))      dut10  (.a(a10),  .b(b10),  .p(p10));

  function automatic logic [127:0] rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  task automatic check(logic [127:0] x, logic [127:0] y);
    logic [255:0] e128;
    logic [127:0] e64;
    logic [19:0]  e10;
    a128 = x;        b128 = y;
    a64  = x[63:0];  b64  = y[63:0];
    a10  = x[9:0];   b10  = y[9:0];
    #1;
    e128 = {128'b0, x} * {128'b0, y};
    e64  = {64'b0, x[63:0]} * {64'b0, y[63:0]};
    e10  = {10'b0, x[9:0]} * {10'b0, y[9:0]};
    checks += 3;
    if (p128 !== e128) begin
      failures++;
      $display("FAIL N=128 a=%h b=%h got %h expected %h", x, y, p128, e128);
    end
    if (p64 !== e64) begin
      failures++;
      $display("FAIL N=64 a=%h b=%h got %h expected %h", x[63:0], y[63:0], p64, e64);
    end
    if (p10 !== e10) begin
      failures++;
      $display("FAIL N=10 a=%h b=%h got %h expected %h", x[9:0], y[9:0], p10, e10);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '0);
    check(128'd1, '1);
    check('1, '1);
    check({64{2'b10}}, {64{2'b01}});
    for (int k = 0; k < 128; k += 7) check(128'd1 << k, '1);
    for (int n = 0; n < 300; n++) check(rand128(), rand128());
    // Exhaustive over a slice of the 10-bit multiplier's operand space.
    for (int x = 0; x < 1024; x += 37)
      for (int y = 0; y < 1024; y += 13) check(128'(x), 128'(y));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
