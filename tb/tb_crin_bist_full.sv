// tb_crin_bist_full: end-to-end testbench of the CRIN BIST generator at its
// default size (the s5378 instance: 11 AND-, 18 LFSR- and 3 OR-Chains of 7
// cells, a 32-stage LFSR, 11 configurations, 186503 patterns of which
// configurations 0..8 apply 16955 and 9..10 apply 16954).
//
// The generator is instantiated with no parameter changes. The testbench keeps
// its own model of the generator: the LFSR as polynomial arithmetic, the
// weighting gates, the placeholder RIN rule (chain j of a group with n chains
// takes source (j + n*k) mod 32 in configuration k) and the chains as shift
// registers. It checks every scan-chain input bit and every applied pattern
// against that model, the number of patterns of each configuration, the
// session length of 11 + 186503*8 + 1 cycles, the weighting of the AND- and
// OR-Chains, and that a second session repeats the first.
module tb_crin_bist_full;
  localparam int N_AND = crin_pkg::NUM_AND, N_LFSR = crin_pkg::NUM_LFSR, N_OR = crin_pkg::NUM_OR;
  localparam int LEN = crin_pkg::CHAIN_LEN, G = crin_pkg::NUM_CFG, PW = crin_pkg::PCNT_W;
  localparam int L = crin_pkg::LFSR_LEN;
  localparam logic [L-1:0] POLY = L'(crin_pkg::LFSR_POLY), SEED = L'(crin_pkg::LFSR_SEED);
  localparam int M = N_AND + N_LFSR + N_OR;
  localparam int CW = (G > 1) ? $clog2(G) : 1;
  localparam int CYCLE_LIMIT = 4000000;
  localparam int TOTAL = crin_pkg::TOTAL_PATTERNS;

  function automatic int count_of(int k);
    return TOTAL / G + ((k < TOTAL % G) ? 1 : 0);
  endfunction

  int COUNTS [G];
  initial for (int k = 0; k < G; k++) COUNTS[k] = count_of(k);

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, shift_en, capture;
  logic [CW-1:0] cfg;
  logic [PW-1:0] patterns_left;
  logic [G-1:0]  cfg_lines;
  logic [M-1:0]  scan_in, scan_out;
  logic [M-1:0][LEN-1:0] chain_cells;

  crin_bist u_dut (
    .clk, .rst_n, .start, .busy, .done, .shift_en, .capture, .cfg, .patterns_left,
    .cfg_lines, .scan_in, .scan_out, .chain_cells);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_load = 0, n_capture = 0, n_switch = 0, n_done = 0, n_restart = 0;
  longint ones_and = 0, bits_and = 0, ones_lfsr = 0, bits_lfsr = 0, ones_or = 0, bits_or = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Reference model.
  // Source of chain j of a group of n chains in configuration k.
  function automatic int sel(int n, int j, int k);
    return (j + n * k) % L;
  endfunction

  function automatic logic [L-1:0] lfsr_next(logic [L-1:0] s);
    logic [L:0] w = {s, 1'b0};
    if (w[L]) w[L-1:0] = w[L-1:0] ^ POLY;
    return w[L-1:0];
  endfunction

  function automatic logic [M-1:0] model_inputs(logic [L-1:0] s, int k);
    logic [M-1:0] r;
    for (int j = 0; j < N_AND; j++) begin
      int src = sel(N_AND, j, k);
      r[j] = s[src] & s[(src + L/2 - 1) % L];
    end
    for (int j = 0; j < N_LFSR; j++)
      r[N_AND + j] = s[sel(N_LFSR, j, k)];
    for (int j = 0; j < N_OR; j++) begin
      int src = sel(N_OR, j, k);
      r[N_AND + N_LFSR + j] = s[src] | s[(src + L/2 - 1) % L];
    end
    return r;
  endfunction

  initial begin
    repeat (CYCLE_LIMIT) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one session and returns a signature of all applied patterns.
  task automatic session(output longint unsigned signature);
    logic [L-1:0] s = SEED;
    logic [M-1:0][LEN-1:0] model_cells = chain_cells;
    int exp_cfg = 0, in_cfg = 0, cycles = 0, shifts = 0;
    longint total = 0;
    logic [CW-1:0] prev_cfg;
    signature = 0;
    for (int k = 0; k < G; k++) total += COUNTS[k];
    start = 1;
    @(posedge clk); #1;
    start = 0;
    prev_cfg = cfg;
    check(busy && !done && cfg == 0, "session starts in configuration 0");
    while (busy && cycles < CYCLE_LIMIT) begin
      cycles++;
      if (int'(cfg) != int'(prev_cfg)) begin
        n_switch++;
        check(int'(cfg) == int'(prev_cfg) + 1, "configurations are taken in order");
        check(in_cfg == COUNTS[prev_cfg], $sformatf("configuration %0d applied %0d patterns, stored %0d",
              prev_cfg, in_cfg, COUNTS[prev_cfg]));
        in_cfg = 0;
        prev_cfg = cfg;
      end
      if (!done) check(cfg_lines == G'(1) << cfg, "configuration lines one-hot and matching");
      if (!shift_en && !capture && !done) n_load++;
      if (shift_en) begin
        logic [M-1:0] e = model_inputs(s, int'(cfg));
        check(scan_in == e, $sformatf("scan inputs %b, expected %b", scan_in, e));
        for (int c = 0; c < M; c++) model_cells[c] = {model_cells[c][LEN-2:0], e[c]};
        s = lfsr_next(s);
        shifts++;
      end
      if (capture) begin
        n_capture++;
        in_cfg++;
        check(shifts == LEN, "pattern loaded by CHAIN_LEN shifts");
        shifts = 0;
        check(chain_cells == model_cells, "applied pattern matches the model");
        for (int c = 0; c < M; c++) begin
          int ones = $countones(chain_cells[c]);
          if (c < N_AND) begin ones_and += ones; bits_and += LEN; end
          else if (c < N_AND + N_LFSR) begin ones_lfsr += ones; bits_lfsr += LEN; end
          else begin ones_or += ones; bits_or += LEN; end
        end
        signature = {signature[62:0], signature[63]} ^ 64'(chain_cells);
      end
      @(posedge clk); #1;
    end
    check(in_cfg == COUNTS[G-1], "last configuration applied its stored count");
    check(done && !busy, "done after the session");
    if (done) n_done++;
    check(longint'(cycles) == longint'(G) + total * (LEN + 1) + 1,
          $sformatf("session took %0d cycles, expected %0d", cycles, longint'(G) + total * (LEN + 1) + 1));
  endtask

  initial begin
    longint unsigned sig1, sig2;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(!busy && !done, "idle after reset");
    session(sig1);
    repeat (4) @(posedge clk);
    #1 check(done && !busy, "done holds while idle");
    n_restart++;
    session(sig2);
    check(sig1 == sig2, "second session repeats the first");
    check(ones_and * 100 < bits_and * 40, $sformatf("AND-Chains ones %0d of %0d", ones_and, bits_and));
    check(ones_or * 100 > bits_or * 60, $sformatf("OR-Chains ones %0d of %0d", ones_or, bits_or));
    check(ones_lfsr * 100 > bits_lfsr * 35 && ones_lfsr * 100 < bits_lfsr * 65,
          $sformatf("LFSR-Chains ones %0d of %0d", ones_lfsr, bits_lfsr));
    $display("mechanisms: preset loads %0d, captures %0d, configuration switches %0d, session ends %0d, restarts %0d",
             n_load, n_capture, n_switch, n_done, n_restart);
    $display("ones: AND-Chains %0d/%0d, LFSR-Chains %0d/%0d, OR-Chains %0d/%0d",
             ones_and, bits_and, ones_lfsr, bits_lfsr, ones_or, bits_or);
    check(n_load == 2 * G, "preset loads happened");
    check(n_capture > 0, "captures happened");
    check(n_switch == 2 * (G - 1), "configuration switches happened");
    check(n_done == 2, "sessions ended");
    check(n_restart == 1, "restart happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
