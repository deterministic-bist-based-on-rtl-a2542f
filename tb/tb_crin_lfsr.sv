// tb_crin_lfsr: self-checking testbench of crin_lfsr.
//
// Instance A (8 stages, x^8+x^6+x^5+x^4+1, primitive) must step through all 255
// non-zero states exactly once before returning to its seed, and must hold its
// state while `en` is low. Instance B (the default 32-stage register) is checked
// against hand-worked first states from seed 1: x^k for k < 32, then
// x^32 mod P = x^22+x^2+x+1 = 0x00400007, then 0x0080000E; after that it is
// compared with a polynomial-arithmetic reference for 2000 steps. `load`
// must restore the seed.
module tb_crin_lfsr;
  logic clk = 0, rst_n = 0, load = 0, en_a = 0, en_b = 0;
  logic [7:0]  sa;
  logic [31:0] sb, ref_b;
  int checks = 0, failures = 0;
  bit seen [256];

  crin_lfsr #(.L(8), .POLY(8'h71), .SEED(8'h01)) u_a (.clk, .rst_n, .load, .en(en_a), .state(sa));
  crin_lfsr u_b (.clk, .rst_n, .load, .en(en_b), .state(sb));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Multiply by x modulo x^32 + x^22 + x^2 + x + 1.
  function automatic logic [31:0] times_x(logic [31:0] v);
    logic [32:0] w = {v, 1'b0};
    if (w[32]) w = w ^ 33'h1_0040_0007;
    return w[31:0];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(sa == 8'h01 && sb == 32'h1, "reset loads seed");
    // Instance A: full period.
    period = 0;
    en_a = 1;
    do begin
      @(posedge clk); #1;
      period++;
      if (sa != 8'h01) begin
        check(sa != 0 && !seen[sa], $sformatf("state %02h repeated or zero", sa));
        seen[sa] = 1;
      end
    end while (sa != 8'h01 && period < 300);
    check(period == 255, $sformatf("period %0d, expected 255", period));
    // Hold.
    en_a = 0;
    repeat (3) @(posedge clk);
    #1 check(sa == 8'h01, "holds while en is low");
    // Instance B: worked first states.
    en_b = 1;
    for (int k = 1; k <= 34; k++) begin
      @(posedge clk); #1;
      if (k < 32) check(sb == (32'h1 << k), $sformatf("step %0d: %08h", k, sb));
      if (k == 32) check(sb == 32'h0040_0007, $sformatf("step 32: %08h", sb));
      if (k == 33) check(sb == 32'h0080_000E, $sformatf("step 33: %08h", sb));
    end
    ref_b = 32'h0080_000E;
    ref_b = times_x(ref_b);
    for (int k = 0; k < 2000; k++) begin
      check(sb == ref_b, $sformatf("long run step %0d: %08h vs %08h", k, sb, ref_b));
      @(posedge clk); #1;
      ref_b = times_x(ref_b);
    end
    en_b = 0;
    // Synchronous reload of the seed.
    load = 1;
    @(posedge clk); #1;
    load = 0;
    check(sb == 32'h1 && sa == 8'h01, "load restores the seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
