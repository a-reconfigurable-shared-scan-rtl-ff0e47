// chain_mux - the optimized per-chain input multiplexer.
//
// Once the test configurations of a design are known, a scan chain no longer
// needs to choose freely among every scan input and its inverse. Input j of
// this k-way multiplexer (k = N_CFG) is hard-wired to the scan input, or its
// inverse, that drives the chain in configuration j, so the same select value
// picks configuration j in every chain and one control signal serves all of
// them. If two configurations use the same scan input, that input is simply
// wired to both multiplexer positions.
//
// ENTRIES[j] names the input (idx) and the inversion (inv) for configuration
// j. A select value of N_CFG or more drives 0 into the chain (this design's
// choice; the architecture leaves unused select codes open).
//
// Interface: si (all scan inputs), cfg_sel (shared configuration select),
// chain_in (to the chain's first cell). Purely combinational, so cfg_sel may
// change between any two shift cycles (dynamic configuration).
module chain_mux
  import rssa_pkg::*;
#(
  parameter int unsigned M_IN  = DEF_M_IN,
  parameter int unsigned N_CFG = DEF_N_CFG,
  parameter int unsigned SEL_W = (N_CFG > 1) ? $clog2(N_CFG) : 1,
  parameter map_entry_t [N_CFG-1:0] ENTRIES = '0
) (
  input  logic [M_IN-1:0]  si,
  input  logic [SEL_W-1:0] cfg_sel,
  output logic             chain_in
);

  logic [N_CFG-1:0] cand;

  for (genvar j = 0; j < N_CFG; j++) begin : g_cfg
    if (32'(ENTRIES[j].idx) >= M_IN) begin : g_bad
      $error("chain_mux: configuration %0d names scan input %0d of %0d",
             j, ENTRIES[j].idx, M_IN);
    end
    assign cand[j] = si[32'(ENTRIES[j].idx) % M_IN] ^ ENTRIES[j].inv;
  end

  always_comb begin
    chain_in = 1'b0;
    for (int unsigned j = 0; j < N_CFG; j++)
      if (cfg_sel == SEL_W'(j)) chain_in = cand[j];
  end

endmodule
