// crin_pattern_counter: BIST pattern counter and scan-load sequencer.
//
// Counts the BIST patterns of the active configuration. At the start of each
// configuration it spends one LOAD cycle presetting itself with that
// configuration's pattern count `preset` (read from the stored control bits).
// Each pattern then takes CHAIN_LEN SHIFT cycles, in which `shift_en` loads one
// bit into every scan chain, and one CAPTURE cycle, in which the pattern is
// complete in the chains (`capture` high) and the count is decremented. At the
// capture of the configuration's last pattern it pulses `advance`, which
// triggers the configuration counter, and returns to LOAD for the next
// configuration. In LOAD, `halt` high (the configuration counter reports the end
// of the session) returns it to IDLE instead. `start` in IDLE begins a session.
//
// Timing: a configuration with N patterns takes 1 + N*(CHAIN_LEN+1) cycles.
// `remaining` is the number of patterns still to come in this configuration,
// including the one being loaded.
//
// The preset-and-trigger behaviour follows the architecture; the bit counter
// that marks pattern boundaries, the capture cycle and the LOAD cycle are this
// design's own completion of it. A preset of 0 is not allowed.
module crin_pattern_counter #(
  parameter int unsigned CHAIN_LEN = crin_pkg::CHAIN_LEN,
  parameter int unsigned PCNT_W    = crin_pkg::PCNT_W,
  parameter int unsigned BIT_W     = (CHAIN_LEN > 1) ? $clog2(CHAIN_LEN) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              halt,
  input  logic [PCNT_W-1:0] preset,
  output logic              busy,
  output logic              shift_en,
  output logic              capture,
  output logic              advance,
  output logic [PCNT_W-1:0] remaining
);

  typedef enum logic [1:0] {IDLE, LOAD, SHIFT, CAPTURE} state_e;

  state_e           state;
  logic [BIT_W-1:0] bit_cnt;

  assign busy     = (state != IDLE);
  assign shift_en = (state == SHIFT);
  assign capture  = (state == CAPTURE);
  assign advance  = (state == CAPTURE) && (remaining == PCNT_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      bit_cnt   <= '0;
      remaining <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) state <= LOAD;
        LOAD: begin
          bit_cnt <= '0;
          if (halt) state <= IDLE;
          else begin
            remaining <= preset;
            state     <= SHIFT;
          end
        end
        SHIFT: begin
          if (bit_cnt == BIT_W'(CHAIN_LEN - 1)) begin
            bit_cnt <= '0;
            state   <= CAPTURE;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
          end
        end
        CAPTURE: begin
          remaining <= remaining - 1'b1;
          state     <= (remaining == PCNT_W'(1)) ? LOAD : SHIFT;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A configuration must hold at least one pattern.
  always_ff @(posedge clk)
    if (state == LOAD && !halt)
      assert (preset != '0) else $error("crin_pattern_counter: preset of 0 patterns");

endmodule
