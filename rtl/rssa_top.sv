// rssa_top - reconfigurable shared scan-in test architecture.
//
// N_CHAINS short scan chains are loaded in parallel from only M_IN scan input
// pins. Sharing inputs cuts test data volume and shift time by about
// N_CHAINS / M_IN, but chains that share an input must hold the same bits.
// Here the input that drives each chain is not fixed: a multiplexer in front
// of every chain, steered by one configuration select (cfg_sel) common to all
// chains, switches the whole design between N_CFG broadcast configurations,
// statically for a pattern or dynamically from one shift cycle to the next.
// The chain outputs are compacted in a MISR.
//
// Of the N_CHAINS chains the first N_CHAINS - N_WRAP are internal scan chains
// built from the circuit's flip-flops; the last N_WRAP are wrapper chains
// around its primary inputs, loaded like any other chain. The logic under test
// itself is outside this module: func_d/cell_q are the functional input and
// output of every scan cell, pi_pin/pi_core the primary inputs before and
// after the wrapper.
//
// Mapping: by default the optimized mapping_logic with prime-based
// configurations (CFG_M = 2, 3, 5, 7 inputs: configuration j drives chain n
// from input n mod CFG_M[j]). Setting CUSTOM_TABLE and CFG_TABLE loads any
// other set of configurations, e.g. from compatibility analysis, including
// inverted connections. FULL_MAPPING = 1 instead builds the unoptimized
// mapping_logic_full, where each chain has its own select on chain_ctl; in the
// default build chain_ctl is unused.
//
// Test protocol (one pattern): se = 1 for CHAIN_LEN clocks with cfg_sel set
// per shift cycle and one bit per scan input per clock; then one clock with
// se = 0 captures the circuit response (wrapper cells hold); then se = 1 for
// CHAIN_LEN clocks shifts the response out into the MISR (misr_en = 1) while
// the next pattern shifts in. test_mode routes the wrapper cells to the logic.
//
// Sizes follow the largest example design (537 chains of 135 cells, 7 scan
// inputs); the wrapper chain count, the chain ordering (wrappers last) and the
// MISR are this design's choices.
module rssa_top
  import rssa_pkg::*;
#(
  parameter int unsigned N_CHAINS  = DEF_N_CHAINS,
  parameter int unsigned N_WRAP    = DEF_N_WRAP,
  parameter int unsigned CHAIN_LEN = DEF_CHAIN_LEN,
  parameter int unsigned M_IN      = DEF_M_IN,
  parameter int unsigned N_CFG     = DEF_N_CFG,
  parameter logic [N_CFG-1:0][7:0] CFG_M = {8'd7, 8'd5, 8'd3, 8'd2},
  parameter bit CUSTOM_TABLE = 1'b0,
  parameter map_entry_t [N_CFG-1:0][N_CHAINS-1:0] CFG_TABLE = '0,
  parameter bit FULL_MAPPING = 1'b0,
  parameter int unsigned MISR_W = DEF_MISR_W,
  parameter logic [MISR_W-1:0] MISR_POLY = MISR_W'(DEF_MISR_POLY),
  // derived
  parameter int unsigned N_SCAN = N_CHAINS - N_WRAP,
  parameter int unsigned SEL_W  = (N_CFG > 1) ? $clog2(N_CFG) : 1,
  parameter int unsigned CTL_W  = $clog2(2 * M_IN)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  se,
  input  logic                                  test_mode,
  input  logic [M_IN-1:0]                       si,
  input  logic [SEL_W-1:0]                      cfg_sel,
  input  logic [N_CHAINS-1:0][CTL_W-1:0]        chain_ctl,
  input  logic                                  misr_en,
  input  logic [N_SCAN-1:0][CHAIN_LEN-1:0]      func_d,
  output logic [N_SCAN-1:0][CHAIN_LEN-1:0]      cell_q,
  input  logic [N_WRAP-1:0][CHAIN_LEN-1:0]      pi_pin,
  output logic [N_WRAP-1:0][CHAIN_LEN-1:0]      pi_core,
  output logic [N_CHAINS-1:0]                   so,
  output logic [MISR_W-1:0]                     signature
);

  if (N_WRAP == 0 || N_WRAP >= N_CHAINS) begin : g_bad
    $error("rssa_top: need 1 <= N_WRAP < N_CHAINS, got %0d of %0d", N_WRAP, N_CHAINS);
  end

  logic [N_CHAINS-1:0] chain_in;

  // A select code with no configuration behind it loads zeros into every
  // chain; during shifting that is a tester error.
  a_cfg_sel_valid: assert property (@(posedge clk)
    (se && !FULL_MAPPING) |-> (32'(cfg_sel) < N_CFG))
    else $error("rssa_top: cfg_sel %0d selects no configuration", cfg_sel);

  // ---------------------------------------------------------------- mapping
  if (FULL_MAPPING) begin : g_full_map
    mapping_logic_full #(
      .N_CHAINS (N_CHAINS),
      .M_IN     (M_IN),
      .CTL_W    (CTL_W)
    ) u_map (
      .si        (si),
      .chain_ctl (chain_ctl),
      .chain_in  (chain_in)
    );
  end else begin : g_opt_map
    mapping_logic #(
      .N_CHAINS     (N_CHAINS),
      .M_IN         (M_IN),
      .N_CFG        (N_CFG),
      .SEL_W        (SEL_W),
      .CFG_M        (CFG_M),
      .CUSTOM_TABLE (CUSTOM_TABLE),
      .CFG_TABLE    (CFG_TABLE)
    ) u_map (
      .si       (si),
      .cfg_sel  (cfg_sel),
      .chain_in (chain_in)
    );
  end

  // ---------------------------------------------------------- scan chains
  for (genvar n = 0; n < N_SCAN; n++) begin : g_scan
    scan_chain #(.LEN(CHAIN_LEN)) u_chain (
      .clk (clk),
      .se  (se),
      .si  (chain_in[n]),
      .d   (func_d[n]),
      .q   (cell_q[n]),
      .so  (so[n])
    );
  end

  // ------------------------------------------------------- wrapper chains
  for (genvar w = 0; w < N_WRAP; w++) begin : g_wrap
    wrapper_chain #(.LEN(CHAIN_LEN)) u_wrap (
      .clk       (clk),
      .se        (se),
      .test_mode (test_mode),
      .si        (chain_in[N_SCAN+w]),
      .pin       (pi_pin[w]),
      .core_in   (pi_core[w]),
      .so        (so[N_SCAN+w])
    );
  end

  // ----------------------------------------------------------------- MISR
  misr #(
    .N_IN (N_CHAINS),
    .W    (MISR_W),
    .POLY (MISR_POLY)
  ) u_misr (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (misr_en),
    .in        (so),
    .signature (signature)
  );

endmodule
