// tb_crin_rin: self-checking testbench of crin_rin.
//
// Instance A uses an explicit connection table (8 sources, 5 chains,
// 3 configurations) written out below, so the expected routing is known without
// the module's default. Instance B is the default LFSR-Chain network (32
// sources, 18 chains, 11 configurations), checked against the documented
// placeholder rule: chain j takes source (j + 18k) mod 32 in configuration k.
// Every one-hot control word and the all-zero word are applied with random
// source words.
module tb_crin_rin;
  // Table of instance A: TA[k][j] = source of chain j in configuration k.
  localparam int TA [3][5] = '{'{7, 0, 3, 3, 1}, '{2, 6, 5, 4, 0}, '{1, 1, 7, 2, 6}};

  function automatic logic [3*5*3-1:0] pack_a();
    logic [3*5*3-1:0] t;
    for (int k = 0; k < 3; k++)
      for (int j = 0; j < 5; j++)
        t[(k*5 + j)*3 +: 3] = 3'(TA[k][j]);
    return t;
  endfunction

  logic [7:0]  src_a;
  logic [2:0]  d_a;
  logic [4:0]  out_a;
  logic [31:0] src_b;
  logic [10:0] d_b;
  logic [17:0] out_b;
  int checks = 0, failures = 0;

  crin_rin #(.NUM_IN(8), .NUM_OUT(5), .NUM_CFG(3), .SEL_TABLE(pack_a())) u_a (
    .src(src_a), .d(d_a), .chain_in(out_a));
  crin_rin u_b (.src(src_b), .d(d_b), .chain_in(out_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      src_a = 8'($urandom());
      src_b = $urandom();
      for (int k = -1; k < 11; k++) begin
        d_a = (k >= 0 && k < 3) ? 3'(1 << k) : '0;
        d_b = (k >= 0) ? 11'(1 << k) : '0;
        #1;
        for (int j = 0; j < 5; j++)
          check(out_a[j] == ((k >= 0 && k < 3) ? src_a[TA[k][j]] : 1'b0),
                $sformatf("A cfg %0d chain %0d", k, j));
        for (int j = 0; j < 18; j++)
          check(out_b[j] == ((k >= 0) ? src_b[(j + 18*k) % 32] : 1'b0),
                $sformatf("B cfg %0d chain %0d", k, j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
