// tb_crin_workload_run: runs one complete BIST session of crin_bist sized for
// one benchmark circuit and checks it. Used by tb_crin_bist_workloads.
//
// The generator gets the circuit's chain groups, chain length, number of
// configurations, pattern-counter width and total pattern count, with the
// patterns split evenly over the configurations. The run checks that each
// configuration applies exactly its stored count, that the configuration lines
// stay one-hot, that `busy` lasts NUM_CFG + TOTAL*(LEN+1) + 1 cycles, that
// `done` follows, and that ones make up under 40 % of the AND-Chain bits and
// over 60 % of the OR-Chain bits. The bit-exact pattern check is left to
// tb_crin_bist and tb_crin_bist_full.
module tb_crin_workload_run #(
  parameter string       NAME     = "s5378",
  parameter int unsigned N_AND    = 11,
  parameter int unsigned N_LFSR   = 18,
  parameter int unsigned N_OR     = 3,
  parameter int unsigned LEN      = 7,
  parameter int unsigned G        = 11,
  parameter int unsigned PW       = 17,
  parameter int unsigned TOTAL    = 186503
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int M  = N_AND + N_LFSR + N_OR;
  localparam int CW = (G > 1) ? $clog2(G) : 1;

  logic start = 0;
  logic busy, done, shift_en, capture;
  logic [CW-1:0] cfg;
  logic [PW-1:0] patterns_left;
  logic [G-1:0]  cfg_lines;
  logic [M-1:0]  scan_in, scan_out;
  logic [M-1:0][LEN-1:0] chain_cells;

  crin_bist #(.NUM_AND(N_AND), .NUM_LFSR(N_LFSR), .NUM_OR(N_OR), .CHAIN_LEN(LEN),
              .NUM_CFG(G), .PCNT_W(PW), .TOTAL(TOTAL)) u_dut (
    .clk, .rst_n, .start, .busy, .done, .shift_en, .capture, .cfg, .patterns_left,
    .cfg_lines, .scan_in, .scan_out, .chain_cells);

  function automatic int count_of(int k);
    return TOTAL / G + ((k < TOTAL % G) ? 1 : 0);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %s", NAME, what);
    end
  endtask

  initial begin
    longint cycles = 0, ones_and = 0, bits_and = 0, ones_or = 0, bits_or = 0;
    int in_cfg = 0, switches = 0;
    logic [CW-1:0] prev_cfg;
    finished = 0;
    checks = 0;
    failures = 0;
    @(posedge rst_n);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    prev_cfg = cfg;
    while (busy) begin
      cycles++;
      if (cfg != prev_cfg) begin
        check(in_cfg == count_of(int'(prev_cfg)), $sformatf("configuration %0d applied %0d patterns", prev_cfg, in_cfg));
        switches++;
        in_cfg = 0;
        prev_cfg = cfg;
      end
      if (!done) check(cfg_lines == G'(1) << cfg, "configuration lines one-hot");
      if (capture) begin
        in_cfg++;
        for (int c = 0; c < int'(N_AND); c++) ones_and += $countones(chain_cells[c]);
        for (int c = N_AND + N_LFSR; c < M; c++) ones_or += $countones(chain_cells[c]);
        bits_and += N_AND * LEN;
        bits_or  += N_OR * LEN;
      end
      @(negedge clk);
    end
    check(in_cfg == count_of(G - 1), "last configuration count");
    check(switches == G - 1, $sformatf("%0d configuration switches", switches));
    check(done, "done at the end");
    check(cycles == longint'(G) + longint'(TOTAL) * (LEN + 1) + 1,
          $sformatf("session took %0d cycles", cycles));
    check(ones_and * 100 < bits_and * 40, $sformatf("AND-Chains ones %0d of %0d", ones_and, bits_and));
    check(ones_or * 100 > bits_or * 60, $sformatf("OR-Chains ones %0d of %0d", ones_or, bits_or));
    $display("%s: %0d chains (%0d, %0d, %0d) x %0d cells, %0d configurations, %0d patterns in %0d cycles; AND ones %0d/%0d, OR ones %0d/%0d",
             NAME, M, N_AND, N_LFSR, N_OR, LEN, G, TOTAL, cycles, ones_and, bits_and, ones_or, bits_or);
    finished = 1;
  end
endmodule
