// tb_mac128: end-to-end test of the 128-bit MAC at its default size.
//
// Drives mac128 with no parameter override: 128-bit operands, 256-bit
// product, three 257-bit accumulators. A reference accumulator computed with
// the simulator's wide arithmetic is updated in step with every clock and all
// three paths (Kogge-Stone, Brent-Kung, carry-save) are compared with it one
// clock after each operation. Phases:
//   1. reset, then inner products F = sum P_i * Q_i of random vectors of
//      several lengths, each started with a clear;
//   2. random mixes of accumulate, stall (en low), clear and clear with en;
//   3. maximal operands until the accumulators wrap and flag overflow.
// Each mechanism (accumulate, stall, clear, overflow) is counted and must
// have happened at least once. A watchdog ends the run if it hangs.
module tb_mac128;

  localparam int unsigned N = 128;

  int checks   = 0;
  int failures = 0;
  int n_acc = 0, n_stall = 0, n_clr = 0, n_ovf = 0, n_dot = 0;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           clr = 1'b0;
  logic           en = 1'b0;
  logic [N-1:0]   a = '0;
  logic [N-1:0]   b = '0;
  logic [2*N:0]   acc_ksa, acc_bka, acc_csa;
  logic           ovf_ksa, ovf_bka, ovf_csa;

  logic [2*N:0]   ref_acc;
  logic           ref_ovf;

  mac128 dut (
    .clk, .rst_n, .clr, .en, .a, .b,
    .acc_ksa, .acc_bka, .acc_csa, .ovf_ksa, .ovf_bka, .ovf_csa
  );

  always #5 clk = ~clk;

  function automatic logic [N-1:0] rand_op();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  task automatic compare_all();
    checks += 3;
    if (acc_ksa !== ref_acc || ovf_ksa !== ref_ovf) begin
      failures++;
      $display("FAIL ksa acc=%h ovf=%b expected %h %b", acc_ksa, ovf_ksa, ref_acc, ref_ovf);
    end
    if (acc_bka !== ref_acc || ovf_bka !== ref_ovf) begin
      failures++;
      $display("FAIL bka acc=%h ovf=%b expected %h %b", acc_bka, ovf_bka, ref_acc, ref_ovf);
    end
    if (acc_csa !== ref_acc || ovf_csa !== ref_ovf) begin
      failures++;
      $display("FAIL csa acc=%h ovf=%b expected %h %b", acc_csa, ovf_csa, ref_acc, ref_ovf);
    end
  endtask

  // One clock: present controls and operands, update the reference model,
  // check the registered outputs just after the edge.
  task automatic step(logic c, logic e, logic [N-1:0] x, logic [N-1:0] y);
    logic [2*N+1:0] s;
    @(negedge clk);
    clr = c; en = e; a = x; b = y;
    @(posedge clk);
    if (c) begin
      ref_acc = '0;
      ref_ovf = 1'b0;
      n_clr++;
    end else if (e) begin
      s = {1'b0, ref_acc} + ({(2*N+2){1'b0}} | ({{N{1'b0}}, x} * {{N{1'b0}}, y}));
      if (s[2*N+1]) n_ovf++;
      ref_acc = s[2*N:0];
      ref_ovf = ref_ovf | s[2*N+1];
      n_acc++;
    end else begin
      n_stall++;
    end
    #1;
    compare_all();
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    logic [2*N:0] dot;
    logic [N-1:0] p, q;
    ref_acc = '0;
    ref_ovf = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    compare_all();
    rst_n = 1'b1;

    // Phase 1: inner products, checked against an independent sum.
    for (int len = 1; len <= 32; len = len * 2) begin
      step(1'b1, 1'b0, '0, '0);
      dot = '0;
      for (int i = 0; i < len; i++) begin
        p = rand_op();
        q = (i % 3 == 0) ? '1 : rand_op();
        dot = dot + (2*N+1)'({{N{1'b0}}, p} * {{N{1'b0}}, q});
        step(1'b0, 1'b1, p, q);
      end
      checks++;
      if (acc_ksa !== dot) begin
        failures++;
        $display("FAIL inner product of length %0d: %h expected %h", len, acc_ksa, dot);
      end
      n_dot++;
    end

    // Phase 2: random control mix.
    for (int n = 0; n < 300; n++) begin
      r = int'($urandom_range(0, 19));
      if (r == 0)      step(1'b1, 1'($urandom()), rand_op(), rand_op());
      else if (r < 4)  step(1'b0, 1'b0, rand_op(), rand_op());
      else             step(1'b0, 1'b1, rand_op(), rand_op());
    end

    // Phase 3: maximal operands until the accumulators wrap.
    step(1'b1, 1'b0, '0, '0);
    repeat (4) step(1'b0, 1'b1, '1, '1);
    checks++;
    if (!(ovf_ksa && ovf_bka && ovf_csa)) begin
      failures++;
      $display("FAIL overflow flags not set after four maximal products");
    end

    checks += 5;
    if (n_acc == 0)   begin failures++; $display("FAIL accumulate never happened"); end
    if (n_stall == 0) begin failures++; $display("FAIL stall never happened"); end
    if (n_clr == 0)   begin failures++; $display("FAIL clear never happened"); end
    if (n_ovf == 0)   begin failures++; $display("FAIL overflow never happened"); end
    if (n_dot == 0)   begin failures++; $display("FAIL no inner product run"); end
    $display("events: accumulate=%0d stall=%0d clear=%0d overflow=%0d inner_products=%0d",
             n_acc, n_stall, n_clr, n_ovf, n_dot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
