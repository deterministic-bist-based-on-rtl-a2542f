// tb_crin_decoder: self-checking testbench of crin_decoder.
//
// Applies all 16 codes of the default 4-to-11 decoder with the enable high and
// low. With enable high, code k < 11 must raise exactly line k; codes 11..15
// and enable low must leave all lines low.
module tb_crin_decoder;
  logic        en;
  logic [3:0]  cfg;
  logic [10:0] d;
  int checks = 0, failures = 0;

  crin_decoder u_dut (.en, .cfg, .d);

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int c = 0; c < 16; c++) begin
        logic [10:0] exp_d;
        en = e[0];
        cfg = 4'(c);
        #1;
        exp_d = '0;
        if (e == 1 && c < 11) exp_d[c] = 1'b1;
        checks++;
        if (d != exp_d) begin
          failures++;
          $display("FAIL: en=%0d cfg=%0d d=%b expected %b", e, c, d, exp_d);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
