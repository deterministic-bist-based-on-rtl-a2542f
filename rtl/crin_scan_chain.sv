// crin_scan_chain: one scan chain of the circuit under test, as seen by the BIST.
//
// LEN scan cells form a shift register. While `shift_en` is high, every clock
// moves the chain by one cell: `scan_in` enters cell 0 and cell LEN-1 leaves on
// `scan_out`. After LEN shifts the first bit shifted in sits in cell LEN-1.
// `cells` shows all cells, i.e. the test pattern currently applied to the logic.
//
// Only the scan-in side is modelled: the architecture describes how chains are
// loaded, not how responses are captured or compacted, so there is no capture
// path here. The asynchronous active-low reset clears the chain (own choice).
module crin_scan_chain #(
  parameter int unsigned LEN = crin_pkg::CHAIN_LEN
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           scan_in,
  output logic           scan_out,
  output logic [LEN-1:0] cells
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cells <= '0;
    else if (shift_en) begin
      if (LEN > 1) cells <= {cells[LEN-2:0], scan_in};
      else         cells <= LEN'(scan_in);
    end
  end

  assign scan_out = cells[LEN-1];

endmodule
