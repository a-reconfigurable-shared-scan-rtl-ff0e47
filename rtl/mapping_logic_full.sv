// mapping_logic_full - unoptimized mapping logic with free per-chain choice.
//
// Before the configurations of a design are fixed, each scan chain gets a
// 2*M_IN-way multiplexer over every scan input and its inverse, with its own
// select of $clog2(2*M_IN) bits. Any configuration can then be applied, but
// the control costs N_CHAINS * $clog2(2*M_IN) signals, which is why the
// optimized mapping_logic, with one shared select, replaces it once the
// configurations are known.
//
// Select encoding (this design's choice): chain_ctl[n] = {input index, inv},
// so value 2i drives chain n from scan input i and 2i+1 from its inverse.
// An index of M_IN or above drives 0.
//
// Interface: si (scan inputs), chain_ctl[n] (select of chain n), chain_in[n]
// (first cell of chain n). Purely combinational.
module mapping_logic_full #(
  parameter int unsigned N_CHAINS = rssa_pkg::DEF_N_CHAINS,
  parameter int unsigned M_IN     = rssa_pkg::DEF_M_IN,
  parameter int unsigned CTL_W    = $clog2(2 * M_IN)
) (
  input  logic [M_IN-1:0]                 si,
  input  logic [N_CHAINS-1:0][CTL_W-1:0]  chain_ctl,
  output logic [N_CHAINS-1:0]             chain_in
);

  // The 2*M_IN multiplexer inputs: each scan input followed by its inverse.
  logic [2*M_IN-1:0] choices;

  always_comb
    for (int unsigned i = 0; i < M_IN; i++) begin
      choices[2*i]   = si[i];
      choices[2*i+1] = ~si[i];
    end

  always_comb
    for (int unsigned n = 0; n < N_CHAINS; n++)
      chain_in[n] = (32'(chain_ctl[n]) < 2 * M_IN) ? choices[chain_ctl[n]] : 1'b0;

endmodule
