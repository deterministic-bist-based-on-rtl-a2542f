// tb_crin_bist_workloads: one complete BIST session for each benchmark circuit
// of the evaluation, run side by side.
//
// Each instance of tb_crin_workload_run sizes the generator for one circuit:
// chain groups (AND, LFSR, OR), chain length, number of configurations and
// total BIST patterns as reported for it (divided by SCALE), and a pattern-counter width equal to
// the reported storage divided by the number of configurations. s5378, the
// default size, is covered by tb_crin_bist_full. s9234's reported groups add
// up to 31 chains and are used as they are.
module tb_crin_bist_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // Pattern totals are divided by SCALE to keep the simulation short; the
  // structure of each instance (groups, length, configurations) is unscaled.
  localparam int SCALE = 10;
  localparam int N = 6;
  logic fin [N];
  int   chk [N], fl [N];

  tb_crin_workload_run #(.NAME("s9234"),  .N_AND(12), .N_LFSR(12), .N_OR(7), .LEN(8),  .G(16),  .PW(17), .TOTAL(296770 / SCALE))
    u_s9234  (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  tb_crin_workload_run #(.NAME("s13207"), .N_AND(18), .N_LFSR(11), .N_OR(3), .LEN(22), .G(6),   .PW(18), .TOTAL(157895 / SCALE))
    u_s13207 (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  tb_crin_workload_run #(.NAME("s15850"), .N_AND(16), .N_LFSR(12), .N_OR(4), .LEN(20), .G(25),  .PW(18), .TOTAL(356231 / SCALE))
    u_s15850 (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));
  tb_crin_workload_run #(.NAME("s35932"), .N_AND(17), .N_LFSR(13), .N_OR(2), .LEN(56), .G(3),   .PW(15), .TOTAL(19983 / SCALE))
    u_s35932 (.clk, .rst_n, .finished(fin[3]), .checks(chk[3]), .failures(fl[3]));
  tb_crin_workload_run #(.NAME("s38417"), .N_AND(12), .N_LFSR(17), .N_OR(3), .LEN(52), .G(133), .PW(18), .TOTAL(1225964 / SCALE))
    u_s38417 (.clk, .rst_n, .finished(fin[4]), .checks(chk[4]), .failures(fl[4]));
  tb_crin_workload_run #(.NAME("s38584"), .N_AND(9),  .N_LFSR(19), .N_OR(4), .LEN(46), .G(8),   .PW(18), .TOTAL(265469 / SCALE))
    u_s38584 (.clk, .rst_n, .finished(fin[5]), .checks(chk[5]), .failures(fl[5]));

  int checks, failures;

  initial begin
    repeat (8000000) @(posedge clk);
    $display("FAIL: watchdog");
    checks = 0; failures = 1;
    for (int i = 0; i < N; i++) begin checks += chk[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < N; i++) all_done &= fin[i];
    end while (!all_done);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin checks += chk[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
