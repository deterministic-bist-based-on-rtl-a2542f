// crin_config_counter: d-bit configuration counter of the CRIN BIST.
//
// Holds the number of the active configuration. `clear` (start of a session)
// sets it to 0 and clears `done`. Each `advance` pulse from the pattern counter
// moves it to the next configuration; an advance while the last configuration
// (NUM_CFG-1) is active ends the session instead: the count stays and `done`
// goes high until the next `clear`. `last` flags the last configuration.
//
// The architecture says the counter cycles through all 2^d codes; with a number
// of configurations g that is not a power of two this design stops after g
// configurations, since codes g..2^d-1 select no RIN configuration. Registers
// use an asynchronous active-low reset (own choice).
module crin_config_counter #(
  parameter int unsigned NUM_CFG = crin_pkg::NUM_CFG,
  parameter int unsigned CFG_W   = crin_pkg::cfg_width(NUM_CFG)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             advance,
  output logic [CFG_W-1:0] cfg,
  output logic             last,
  output logic             done
);

  assign last = (cfg == CFG_W'(NUM_CFG - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg  <= '0;
      done <= 1'b0;
    end else if (clear) begin
      cfg  <= '0;
      done <= 1'b0;
    end else if (advance && !done) begin
      if (last) done <= 1'b1;
      else      cfg  <= cfg + 1'b1;
    end
  end

endmodule
