// tb_mac_accumulator: self-checking test of mac_accumulator.
//
// The three adder kinds are instantiated side by side at the default 256-bit
// product width and driven with the same product stream and controls. A
// reference accumulator with one extra bit is kept in the testbench; after
// every clock each path's acc and ovf are compared with it. The sequence
// covers reset, accumulation of random products, stalls (en low), clear
// (also together with en), and runs of all-ones products that wrap the
// 257-bit accumulator and set the sticky overflow flag. Each of those events
// is counted and must have happened. The update latency of one clock is
// checked by sampling right after each rising edge.
module tb_mac_accumulator;
  import mac_pkg::*;

  localparam int unsigned PW = 256;

  int checks   = 0;
  int failures = 0;
  int n_acc = 0, n_stall = 0, n_clr = 0, n_ovf = 0;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          clr = 1'b0;
  logic          en = 1'b0;
  logic [PW-1:0] product = '0;
  logic [PW:0]   acc_k, acc_b, acc_c;
  logic          ovf_k, ovf_b, ovf_c;

  logic [PW:0]   ref_acc;
  logic          ref_ovf;

  mac_accumulator #(.ADDER(ADD_KOGGE_STONE)) dut_k (
    .clk, .rst_n, .clr, .en, .product, .acc(acc_k), .ovf(ovf_k));
  mac_accumulator #(.ADDER(ADD_BRENT_KUNG)) dut_b (
    .clk, .rst_n, .clr, .en, .product, .acc(acc_b), .ovf(ovf_b));
  mac_accumulator #(.ADDER(ADD_CARRY_SAVE)) dut_c (
    .clk, .rst_n, .clr, .en, .product, .acc(acc_c), .ovf(ovf_c));

  always #5 clk = ~clk;

  function automatic logic [PW-1:0] rand_prod();
    logic [PW-1:0] w;
    for (int i = 0; i < PW; i += 32) w[i +: 32] = $urandom();
    return w;
  endfunction

  task automatic compare(string name, logic [PW:0] got, logic got_ovf);
    checks++;
    if (got !== ref_acc || got_ovf !== ref_ovf) begin
      failures++;
      $display("FAIL %s acc=%h ovf=%b expected acc=%h ovf=%b", name, got, got_ovf, ref_acc, ref_ovf);
    end
  endtask

  // Apply one cycle of controls, update the reference, check after the edge.
  task automatic step(logic c, logic e, logic [PW-1:0] prod);
    logic [PW+1:0] s;
    @(negedge clk);
    clr = c; en = e; product = prod;
    @(posedge clk);
    if (c) begin
      ref_acc = '0;
      ref_ovf = 1'b0;
      n_clr++;
    end else if (e) begin
      s = {1'b0, ref_acc} + {2'b0, prod};
      if (s[PW+1]) n_ovf++;
      ref_acc = s[PW:0];
      ref_ovf = ref_ovf | s[PW+1];
      n_acc++;
    end else begin
      n_stall++;
    end
    #1;
    compare("ksa", acc_k, ovf_k);
    compare("bka", acc_b, ovf_b);
    compare("csa", acc_c, ovf_c);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    ref_acc = '0;
    ref_ovf = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    compare("ksa reset", acc_k, ovf_k);
    compare("bka reset", acc_b, ovf_b);
    compare("csa reset", acc_c, ovf_c);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      r = int'($urandom_range(0, 19));
      if (r == 0)      step(1'b1, 1'($urandom()), rand_prod());
      else if (r < 4)  step(1'b0, 1'b0, rand_prod());
      else if (r < 6)  step(1'b0, 1'b1, '1);
      else             step(1'b0, 1'b1, rand_prod());
    end
    // Guaranteed wrap: clear, then four all-ones products.
    step(1'b1, 1'b0, '0);
    repeat (4) step(1'b0, 1'b1, '1);
    checks++;
    if (!ovf_k) begin
      failures++;
      $display("FAIL overflow flag not set after four maximal products");
    end
    checks += 4;
    if (n_acc == 0)   begin failures++; $display("FAIL no accumulate"); end
    if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    if (n_clr == 0)   begin failures++; $display("FAIL no clear"); end
    if (n_ovf == 0)   begin failures++; $display("FAIL no overflow"); end
    $display("events: accumulate=%0d stall=%0d clear=%0d overflow=%0d", n_acc, n_stall, n_clr, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
