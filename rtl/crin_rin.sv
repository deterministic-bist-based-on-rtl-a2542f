// crin_rin: reconfigurable interconnection network (RIN) between a pattern
// source and a group of scan chains.
//
// The network is a row of multiplexer switches, one per scan chain of the group.
// It is reconfigured by the one-hot control inputs D_0..D_{g-1} from the
// configuration decoder: while D_k is high, scan-chain input j is connected to
// source output SEL_TABLE[k][j]. When no D_k is high all chain inputs are 0.
// Each switch is an AND-OR multiplexer over the g configurations, so the path is
// purely combinational from `src` and `d` to `chain_in`.
//
// Which source output feeds which chain in each configuration is found for each
// circuit by simulating the test cubes; it is therefore a parameter. SEL_TABLE
// packs one IDX_W-bit source index per (configuration k, chain j) at bit offset
// (k*NUM_OUT + j)*IDX_W. The default table is only a placeholder of this design:
// in configuration k, chain j takes source output (j + k*NUM_OUT) mod NUM_IN,
// so neighbouring configurations use different source stages.
module crin_rin #(
  parameter int unsigned NUM_IN  = crin_pkg::LFSR_LEN,
  parameter int unsigned NUM_OUT = crin_pkg::NUM_LFSR,
  parameter int unsigned NUM_CFG = crin_pkg::NUM_CFG,
  parameter int unsigned IDX_W   = (NUM_IN > 1) ? $clog2(NUM_IN) : 1,
  parameter logic [NUM_CFG*NUM_OUT*IDX_W-1:0] SEL_TABLE = default_table()
) (
  input  logic [NUM_IN-1:0]  src,
  input  logic [NUM_CFG-1:0] d,
  output logic [NUM_OUT-1:0] chain_in
);

  function automatic logic [NUM_CFG*NUM_OUT*IDX_W-1:0] default_table();
    logic [NUM_CFG*NUM_OUT*IDX_W-1:0] tbl;
    tbl = '0;
    for (int unsigned k = 0; k < NUM_CFG; k++)
      for (int unsigned j = 0; j < NUM_OUT; j++)
        tbl[(k*NUM_OUT + j)*IDX_W +: IDX_W] = IDX_W'((j + k*NUM_OUT) % NUM_IN);
    return tbl;
  endfunction

  initial begin
    for (int unsigned k = 0; k < NUM_CFG; k++)
      for (int unsigned j = 0; j < NUM_OUT; j++)
        assert (int'(SEL_TABLE[(k*NUM_OUT + j)*IDX_W +: IDX_W]) < NUM_IN)
          else $error("crin_rin: source index out of range at config %0d chain %0d", k, j);
  end

  // Only one configuration may be active at a time.
  always_comb assert ((d & (d - 1'b1)) == '0) else $error("crin_rin: more than one configuration selected");

  always_comb begin
    chain_in = '0;
    for (int unsigned k = 0; k < NUM_CFG; k++)
      for (int unsigned j = 0; j < NUM_OUT; j++)
        chain_in[j] = chain_in[j] | (d[k] & src[SEL_TABLE[(k*NUM_OUT + j)*IDX_W +: IDX_W]]);
  end

endmodule
