// mapping_logic - connects M_IN scan inputs to N_CHAINS scan chains.
//
// One chain_mux per chain, all sharing a single configuration select. With
// cfg_sel = j every chain is driven by the scan input configuration j assigns
// to it, so a configuration is a whole broadcast pattern: chains driven by the
// same input receive the same bits in the same shift cycle. Holding cfg_sel
// for a whole load gives a static configuration; changing it between shift
// cycles gives a dynamic one, where each row of scan cells can use a
// different configuration.
//
// Configurations come from one of two sources:
//  - prime-based (CUSTOM_TABLE = 0, the default): configuration j uses
//    CFG_M[j] scan inputs and chain n is driven by input n mod CFG_M[j], i.e.
//    every CFG_M[j]-th chain shares an input. CFG_M defaults to 2, 3, 5, 7.
//  - a table (CUSTOM_TABLE = 1): CFG_TABLE[j][n] gives input and inversion of
//    chain n in configuration j, as produced for instance by a
//    compatibility analysis.
//
// Interface: si (scan input pins), cfg_sel, chain_in[n] (first cell of chain
// n). Purely combinational.
module mapping_logic
  import rssa_pkg::*;
#(
  parameter int unsigned N_CHAINS = DEF_N_CHAINS,
  parameter int unsigned M_IN     = DEF_M_IN,
  parameter int unsigned N_CFG    = DEF_N_CFG,
  parameter int unsigned SEL_W    = (N_CFG > 1) ? $clog2(N_CFG) : 1,
  parameter logic [N_CFG-1:0][7:0] CFG_M = {8'd7, 8'd5, 8'd3, 8'd2},
  parameter bit CUSTOM_TABLE = 1'b0,
  parameter map_entry_t [N_CFG-1:0][N_CHAINS-1:0] CFG_TABLE = '0
) (
  input  logic [M_IN-1:0]     si,
  input  logic [SEL_W-1:0]    cfg_sel,
  output logic [N_CHAINS-1:0] chain_in
);

  typedef map_entry_t [N_CFG-1:0] entries_t;

  // Configuration entries of one chain, in multiplexer input order.
  function automatic entries_t chain_entries(int unsigned n);
    entries_t e;
    for (int unsigned j = 0; j < N_CFG; j++)
      e[j] = CUSTOM_TABLE ? CFG_TABLE[j][n] : prime_entry(n, 32'(CFG_M[j]));
    return e;
  endfunction

  for (genvar j = 0; j < N_CFG; j++) begin : g_chk
    if (!CUSTOM_TABLE && (CFG_M[j] == 0 || 32'(CFG_M[j]) > M_IN)) begin : g_bad
      $error("mapping_logic: configuration %0d uses %0d inputs of %0d",
             j, CFG_M[j], M_IN);
    end
  end

  for (genvar n = 0; n < N_CHAINS; n++) begin : g_chain
    chain_mux #(
      .M_IN    (M_IN),
      .N_CFG   (N_CFG),
      .SEL_W   (SEL_W),
      .ENTRIES (chain_entries(n))
    ) u_mux (
      .si       (si),
      .cfg_sel  (cfg_sel),
      .chain_in (chain_in[n])
    );
  end

endmodule
