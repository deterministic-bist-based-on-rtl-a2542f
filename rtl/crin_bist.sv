// crin_bist: clustered reconfigurable-interconnection-network (CRIN) BIST
// pattern generator, top level.
//
// One LFSR drives three groups of scan chains through three RINs:
//   chains 0 .. NUM_AND-1                     AND-Chains,  fed from the AND Block
//   chains NUM_AND .. NUM_AND+NUM_LFSR-1      LFSR-Chains, fed from the LFSR directly
//   chains NUM_AND+NUM_LFSR .. NUM_CHAINS-1   OR-Chains,   fed from the OR Block
// The AND (OR) Block's 2-input gates weight their outputs towards 0 (1), matching
// the chains into which the scan-cell reordering has clustered the 0 (1) care
// bits. The RINs are reconfigured by the one-hot lines D_0..D_{g-1} of a
// d-to-g decoder driven by the configuration counter. The pattern counter is
// preset from the stored control bits with the pattern count of the active
// configuration and advances the configuration counter when it runs out.
//
// Interface and timing: a `start` pulse while idle begins a session (the LFSR is
// reseeded and configuration 0 selected). Each configuration begins with one
// preset cycle; each pattern takes CHAIN_LEN cycles with `shift_en` high, in
// which every chain takes one bit per clock, then one cycle with `capture` high,
// in which `chain_cells` holds the complete pattern. `patterns_left` counts
// the patterns of the active configuration still to come, the current one included. After the last pattern of
// the last configuration, `done` rises and stays until the next `start`.
// `busy` stays high for NUM_CFG + TOTAL*(CHAIN_LEN+1) + 1 cycles: one preset
// cycle per configuration, CHAIN_LEN+1 cycles per pattern and a closing cycle.
//
// The block structure and connections follow the architecture. The LFSR, the
// gate taps, the default RIN connection tables (AND_SEL, LFSR_SEL, OR_SEL, in
// the packed format of crin_rin, default a placeholder rotation) and the even
// split of patterns over configurations are this design's choices; for a real
// circuit the RIN tables and PATTERN_COUNTS come from the embedding simulation
// of its test cubes. Response capture and compaction are outside
// this block.
module crin_bist #(
  parameter int unsigned NUM_AND    = crin_pkg::NUM_AND,
  parameter int unsigned NUM_LFSR   = crin_pkg::NUM_LFSR,
  parameter int unsigned NUM_OR     = crin_pkg::NUM_OR,
  parameter int unsigned CHAIN_LEN  = crin_pkg::CHAIN_LEN,
  parameter int unsigned NUM_CFG    = crin_pkg::NUM_CFG,
  parameter int unsigned PCNT_W     = crin_pkg::PCNT_W,
  parameter int unsigned TOTAL      = crin_pkg::TOTAL_PATTERNS,
  parameter int unsigned LFSR_LEN   = crin_pkg::LFSR_LEN,
  parameter logic [LFSR_LEN-1:0] LFSR_POLY = LFSR_LEN'(crin_pkg::LFSR_POLY),
  parameter logic [LFSR_LEN-1:0] LFSR_SEED = LFSR_LEN'(crin_pkg::LFSR_SEED),
  parameter logic [NUM_CFG*PCNT_W-1:0] PATTERN_COUNTS = even_split(),
  localparam int unsigned IDX_W      = (LFSR_LEN > 1) ? $clog2(LFSR_LEN) : 1,
  parameter logic [NUM_CFG*NUM_AND*IDX_W-1:0]  AND_SEL  = (NUM_CFG*NUM_AND*IDX_W)'(rotation_table(NUM_AND)),
  parameter logic [NUM_CFG*NUM_LFSR*IDX_W-1:0] LFSR_SEL = (NUM_CFG*NUM_LFSR*IDX_W)'(rotation_table(NUM_LFSR)),
  parameter logic [NUM_CFG*NUM_OR*IDX_W-1:0]   OR_SEL   = (NUM_CFG*NUM_OR*IDX_W)'(rotation_table(NUM_OR)),
  localparam int unsigned NUM_CHAINS = NUM_AND + NUM_LFSR + NUM_OR,
  localparam int unsigned CFG_W      = crin_pkg::cfg_width(NUM_CFG)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   start,
  output logic                                   busy,
  output logic                                   done,
  output logic                                   shift_en,
  output logic                                   capture,
  output logic [CFG_W-1:0]                       cfg,
  output logic [PCNT_W-1:0]                      patterns_left,
  output logic [NUM_CFG-1:0]                     cfg_lines,
  output logic [NUM_CHAINS-1:0]                  scan_in,
  output logic [NUM_CHAINS-1:0]                  scan_out,
  output logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0]   chain_cells
);

  function automatic logic [NUM_CFG*PCNT_W-1:0] even_split();
    logic [NUM_CFG*PCNT_W-1:0] tbl;
    for (int unsigned k = 0; k < NUM_CFG; k++)
      tbl[k*PCNT_W +: PCNT_W] = PCNT_W'(TOTAL / NUM_CFG + ((k < TOTAL % NUM_CFG) ? 1 : 0));
    return tbl;
  endfunction

  // Placeholder RIN table for a group of n_out chains: chain j takes source
  // (j + k*n_out) mod LFSR_LEN in configuration k. Sized for the largest group
  // and cut to size where it is used.
  function automatic logic [NUM_CFG*(NUM_AND+NUM_LFSR+NUM_OR)*IDX_W-1:0] rotation_table(int unsigned n_out);
    logic [NUM_CFG*(NUM_AND+NUM_LFSR+NUM_OR)*IDX_W-1:0] tbl;
    tbl = '0;
    for (int unsigned k = 0; k < NUM_CFG; k++)
      for (int unsigned j = 0; j < n_out; j++)
        tbl[(k*n_out + j)*IDX_W +: IDX_W] = IDX_W'((j + k*n_out) % LFSR_LEN);
    return tbl;
  endfunction

  initial assert (NUM_AND > 0 && NUM_LFSR > 0 && NUM_OR > 0)
    else $error("crin_bist: every chain group needs at least one chain");

  logic [LFSR_LEN-1:0] lfsr_state;
  logic [LFSR_LEN-1:0] and_out, or_out;
  logic [PCNT_W-1:0]   preset;
  logic                advance, last_cfg, session_start;

  assign session_start = start && !busy;

  // Pattern source and weighting blocks.
  crin_lfsr #(.L(LFSR_LEN), .POLY(LFSR_POLY), .SEED(LFSR_SEED)) u_lfsr (
    .clk, .rst_n, .load(session_start), .en(shift_en), .state(lfsr_state)
  );
  crin_and_block #(.L(LFSR_LEN)) u_and_block (.lfsr(lfsr_state), .weighted(and_out));
  crin_or_block  #(.L(LFSR_LEN)) u_or_block  (.lfsr(lfsr_state), .weighted(or_out));

  // Configuration control.
  crin_control_store #(.NUM_CFG(NUM_CFG), .PCNT_W(PCNT_W), .TOTAL(TOTAL),
                       .CONTENTS(PATTERN_COUNTS)) u_store (
    .cfg, .count(preset)
  );
  crin_pattern_counter #(.CHAIN_LEN(CHAIN_LEN), .PCNT_W(PCNT_W)) u_pattern_counter (
    .clk, .rst_n, .start(session_start), .halt(done), .preset,
    .busy, .shift_en, .capture, .advance, .remaining(patterns_left)
  );
  crin_config_counter #(.NUM_CFG(NUM_CFG)) u_config_counter (
    .clk, .rst_n, .clear(session_start), .advance, .cfg, .last(last_cfg), .done
  );
  crin_decoder #(.NUM_CFG(NUM_CFG)) u_decoder (
    .en(busy && !done), .cfg, .d(cfg_lines)
  );

  // Reconfigurable interconnection networks, one per chain group.
  crin_rin #(.NUM_IN(LFSR_LEN), .NUM_OUT(NUM_AND), .NUM_CFG(NUM_CFG), .SEL_TABLE(AND_SEL)) u_rin_and (
    .src(and_out), .d(cfg_lines), .chain_in(scan_in[NUM_AND-1:0])
  );
  crin_rin #(.NUM_IN(LFSR_LEN), .NUM_OUT(NUM_LFSR), .NUM_CFG(NUM_CFG), .SEL_TABLE(LFSR_SEL)) u_rin_lfsr (
    .src(lfsr_state), .d(cfg_lines), .chain_in(scan_in[NUM_AND +: NUM_LFSR])
  );
  crin_rin #(.NUM_IN(LFSR_LEN), .NUM_OUT(NUM_OR), .NUM_CFG(NUM_CFG), .SEL_TABLE(OR_SEL)) u_rin_or (
    .src(or_out), .d(cfg_lines), .chain_in(scan_in[NUM_AND+NUM_LFSR +: NUM_OR])
  );

  // Scan chains of the circuit under test.
  for (genvar c = 0; c < NUM_CHAINS; c++) begin : g_chain
    crin_scan_chain #(.LEN(CHAIN_LEN)) u_chain (
      .clk, .rst_n, .shift_en, .scan_in(scan_in[c]), .scan_out(scan_out[c]),
      .cells(chain_cells[c])
    );
  end

  // The session ends only after the last configuration's last pattern.
  always_ff @(posedge clk)
    if (busy && !done)
      assert (int'(cfg) < NUM_CFG && (!advance || last_cfg || int'(cfg) < NUM_CFG - 1)) else $error("crin_bist: configuration counter out of range");

endmodule
