// crin_pkg: shared sizes of the clustered reconfigurable-interconnection-network
// (CRIN) BIST pattern generator.
//
// The numbers below describe one configured instance. The architecture keeps the
// m scan chains of the circuit under test in three groups: AND-Chains (scan cells
// whose care bits are mostly 0), LFSR-Chains (mixed) and OR-Chains (mostly 1).
// The default instance is the one reported for the ISCAS'89 circuit s5378:
// 32 balanced scan chains of 7 cells, chain groups (AND, LFSR, OR) = (11, 18, 3),
// 11 configurations and 186503 BIST patterns. The pattern-counter width of 17
// bits follows from the reported storage of 187 bits for 11 configurations
// (187 / 11 = 17 bits per stored pattern count).
//
// The LFSR length and its feedback polynomial are not given by the architecture
// description; 32 stages with the primitive polynomial x^32+x^22+x^2+x+1 are this
// design's own choice.
package crin_pkg;

  // Scan structure of the circuit under test; m = NUM_AND + NUM_LFSR + NUM_OR = 32.
  localparam int unsigned CHAIN_LEN    = 7;   // l
  localparam int unsigned NUM_AND      = 11;  // N_AND
  localparam int unsigned NUM_LFSR     = 18;  // N_LFSR
  localparam int unsigned NUM_OR       = 3;   // N_OR

  // Configuration control.
  localparam int unsigned NUM_CFG      = 11;  // g
  localparam int unsigned PCNT_W       = 17;  // width of one stored pattern count
  localparam int unsigned TOTAL_PATTERNS = 186503;

  // Pattern source (own choice).
  localparam int unsigned LFSR_LEN     = 32;  // L
  localparam logic [31:0] LFSR_POLY    = 32'h0040_0007; // x^22 + x^2 + x + 1 (+ x^32)
  localparam logic [31:0] LFSR_SEED    = 32'h0000_0001;

  // Width of the configuration counter: d = ceil(log2 g), at least 1.
  function automatic int unsigned cfg_width(int unsigned g);
    return (g > 1) ? $clog2(g) : 1;
  endfunction

endpackage
