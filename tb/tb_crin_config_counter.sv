// tb_crin_config_counter: self-checking testbench of crin_config_counter.
//
// With the default 11 configurations, random advance pulses must step the
// count 0, 1, ..., 10; `last` must be high exactly at 10; the advance at 10
// must raise `done` and keep the count; further advances change nothing; and
// `clear` must return to configuration 0 with `done` low. Two sessions are run.
module tb_crin_config_counter;
  logic clk = 0, rst_n = 0, clear = 0, advance = 0;
  logic [3:0] cfg;
  logic last, done;
  int checks = 0, failures = 0;

  crin_config_counter u_dut (.clk, .rst_n, .clear, .advance, .cfg, .last, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_cfg;
    bit exp_done;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(cfg == 0 && !done, "reset state");
    for (int s = 0; s < 2; s++) begin
      clear = 1;
      @(posedge clk); #1;
      clear = 0;
      exp_cfg = 0;
      exp_done = 0;
      for (int n = 0; n < 200; n++) begin
        check(int'(cfg) == exp_cfg && done == exp_done,
              $sformatf("cfg %0d done %0d, expected %0d %0d", cfg, done, exp_cfg, exp_done));
        check(last == (exp_cfg == 10), "last flag");
        advance = ($urandom_range(0, 2) == 0);
        @(posedge clk); #1;
        if (advance && !exp_done) begin
          if (exp_cfg == 10) exp_done = 1;
          else exp_cfg++;
        end
        advance = 0;
      end
      check(exp_done && done && cfg == 10, "session ended at the last configuration");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
