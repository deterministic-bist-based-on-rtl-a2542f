// crin_lfsr: pseudo-random pattern source of the CRIN BIST.
//
// An L-stage internal-XOR (Galois) linear feedback shift register. Every clock
// with `en` high the register shifts towards the MSB; when the bit leaving the
// MSB is 1 the feedback polynomial's low coefficients (POLY, bit i = coefficient
// of x^i, the x^L term implied) are XORed into the state. With a primitive
// polynomial and a non-zero seed the state visits all 2^L-1 non-zero values.
// All L stages are outputs: they feed the LFSR-Chains through their RIN and the
// 2-input gates of the AND and OR Blocks.
//
// The architecture only names the LFSR; its length, polynomial, seed and the
// Galois form are this design's choices. `rst_n` (asynchronous, active low)
// loads SEED; `load` loads SEED synchronously, so every BIST session starts from
// the same state. Output `state` is the register itself (no combinational path).
module crin_lfsr #(
  parameter int unsigned L    = crin_pkg::LFSR_LEN,
  parameter logic [L-1:0] POLY = L'(crin_pkg::LFSR_POLY),
  parameter logic [L-1:0] SEED = L'(crin_pkg::LFSR_SEED)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [L-1:0] state
);

  initial begin
    assert (L >= 2) else $error("crin_lfsr: L must be at least 2");
    assert (SEED != '0) else $error("crin_lfsr: an all-zero seed locks the LFSR");
  end

  logic [L-1:0] next_state;

  always_comb begin
    next_state = {state[L-2:0], 1'b0};
    if (state[L-1]) next_state = next_state ^ POLY;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= next_state;
  end

endmodule
