// crin_control_store: the stored control bits of the CRIN BIST.
//
// A read-only table with one PCNT_W-bit word per configuration: the number of
// BIST patterns applied in that configuration. The pattern counter is preset
// from the word addressed by the configuration counter. Reading is combinational
// (asynchronous ROM); addresses beyond the last configuration read 0.
//
// The storage organisation (one pattern count per configuration, PCNT_W bits each)
// matches the reported storage figures, which are the number of configurations
// times 17 or 18 bits. The contents are circuit-specific and therefore a
// parameter, word k at bit offset k*PCNT_W. The default splits the 186503
// patterns reported for s5378 as evenly as possible over its 11 configurations;
// the real per-configuration counts come from the embedding simulation.
module crin_control_store #(
  parameter int unsigned NUM_CFG  = crin_pkg::NUM_CFG,
  parameter int unsigned CFG_W    = crin_pkg::cfg_width(NUM_CFG),
  parameter int unsigned PCNT_W   = crin_pkg::PCNT_W,
  parameter int unsigned TOTAL    = crin_pkg::TOTAL_PATTERNS,
  parameter logic [NUM_CFG*PCNT_W-1:0] CONTENTS = even_split()
) (
  input  logic [CFG_W-1:0]  cfg,
  output logic [PCNT_W-1:0] count
);

  function automatic logic [NUM_CFG*PCNT_W-1:0] even_split();
    logic [NUM_CFG*PCNT_W-1:0] tbl;
    for (int unsigned k = 0; k < NUM_CFG; k++)
      tbl[k*PCNT_W +: PCNT_W] = PCNT_W'(TOTAL / NUM_CFG + ((k < TOTAL % NUM_CFG) ? 1 : 0));
    return tbl;
  endfunction

  initial begin
    for (int unsigned k = 0; k < NUM_CFG; k++)
      assert (CONTENTS[k*PCNT_W +: PCNT_W] != '0)
        else $error("crin_control_store: configuration %0d has no patterns", k);
  end

  logic [PCNT_W-1:0] rom [NUM_CFG];

  always_comb begin
    for (int unsigned k = 0; k < NUM_CFG; k++)
      rom[k] = CONTENTS[k*PCNT_W +: PCNT_W];
  end

  always_comb begin
    count = '0;
    if (int'(cfg) < NUM_CFG) count = rom[cfg];
  end

endmodule
