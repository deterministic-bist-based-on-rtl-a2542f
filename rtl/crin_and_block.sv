// crin_and_block: the AND Block of the CRIN BIST.
//
// A bank of LFSR-tapped 2-input AND gates. Each output is 1 only when both of
// its LFSR taps are 1, so with a well-mixed LFSR an output is 1 with probability
// about 1/4: the patterns are weighted towards 0, which suits the AND-Chains that
// hold scan cells whose care bits are mostly 0.
//
// The architecture gives the gate type and the two-input structure; the number of
// gates and which stages they tap are this design's choice: NUM_OUT gates, gate i
// ANDs LFSR stages i mod L and (i + TAP_OFFSET) mod L. TAP_OFFSET = L/2 - 1 makes
// every gate's tap pair distinct for even L. Purely combinational.
module crin_and_block #(
  parameter int unsigned L          = crin_pkg::LFSR_LEN,
  parameter int unsigned NUM_OUT    = L,
  parameter int unsigned TAP_OFFSET = L / 2 - 1
) (
  input  logic [L-1:0]       lfsr,
  output logic [NUM_OUT-1:0] weighted
);

  initial assert (TAP_OFFSET % L != 0)
    else $error("crin_and_block: both taps of a gate would be the same stage");

  always_comb begin
    for (int unsigned i = 0; i < NUM_OUT; i++)
      weighted[i] = lfsr[i % L] & lfsr[(i + TAP_OFFSET) % L];
  end

endmodule
