// crin_decoder: d-to-g configuration decoder of the CRIN BIST.
//
// Turns the d-bit configuration number C_0..C_{d-1} from the configuration
// counter into the one-hot RIN control inputs D_0..D_{g-1}: D_k is high when the
// number equals k and `en` is high. Codes g..2^d-1 (unused when g is not a power
// of two) and `en` low give all-zero D, which disconnects every RIN. Purely
// combinational. The enable input is this design's addition, used to hold the
// RINs idle outside a BIST session.
module crin_decoder #(
  parameter int unsigned NUM_CFG = crin_pkg::NUM_CFG,
  parameter int unsigned CFG_W   = crin_pkg::cfg_width(NUM_CFG)
) (
  input  logic               en,
  input  logic [CFG_W-1:0]   cfg,
  output logic [NUM_CFG-1:0] d
);

  always_comb begin
    d = '0;
    for (int unsigned k = 0; k < NUM_CFG; k++)
      d[k] = en && (cfg == CFG_W'(k));
  end

endmodule
