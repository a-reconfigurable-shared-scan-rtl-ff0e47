// rssa_workload_runner - testbench helper: one rssa_top sized for one
// benchmark design, driven through a short pattern set.
//
// For every static configuration j it loads one pattern that uses only the
// CFG_M[j] active scan inputs (the rest are held at 0), then one dynamic
// pattern that steps the select every shift cycle over all configurations.
// Each load is followed by a capture and overlapped with the unload of the
// previous response into the MISR. After each load all cells are checked
// against a model; the MISR against a model at the end. The tester data is
// counted the way the volume is accounted for prime-based testing:
// static pattern = CFG_M[j] * L + (M_IN - CFG_M[j]) bits (one bit for each
// idle pin), dynamic pattern = M_IN * L bits, and each pattern takes L shift
// clocks plus one capture clock. Results: checks, failures, bits, cycles,
// done.
module rssa_workload_runner #(
  parameter string       NAME  = "design",
  parameter int unsigned N     = 14,
  parameter int unsigned NW    = 1,
  parameter int unsigned L     = 6,
  parameter int unsigned MI    = 7,
  parameter int unsigned NCFG  = 4,
  parameter logic [NCFG-1:0][7:0] CFGM = {8'd7, 8'd5, 8'd3, 8'd2}
) (
  input logic clk
);
  localparam int unsigned S = N - NW;
  localparam int unsigned SW = (NCFG > 1) ? $clog2(NCFG) : 1;
  localparam int unsigned CW = $clog2(2 * MI);

  logic rst_n, se, men;
  logic [MI-1:0] si;
  logic [SW-1:0] sel;
  logic [N-1:0][CW-1:0] ctl;
  logic [S-1:0][L-1:0] fd, q;
  logic [NW-1:0][L-1:0] pin, core;
  logic [N-1:0] so;
  logic [31:0] sig;

  rssa_top #(.N_CHAINS(N), .N_WRAP(NW), .CHAIN_LEN(L), .M_IN(MI), .N_CFG(NCFG), .CFG_M(CFGM)) dut (
    .clk(clk), .rst_n(rst_n), .se(se), .test_mode(1'b1), .si(si), .cfg_sel(sel),
    .chain_ctl(ctl), .misr_en(men), .func_d(fd), .cell_q(q), .pi_pin(pin),
    .pi_core(core), .so(so), .signature(sig));

  int checks = 0, failures = 0;
  longint bits = 0, bits_formula = 0, cycles = 0;
  int n_static = 0, n_dynamic = 0;
  bit done = 1'b0;

  logic [L-1:0] m [N];
  logic [31:0] msig;

  function automatic logic [31:0] misr_step(logic [31:0] s, logic [N-1:0] x);
    logic [31:0] nx;
    nx = {s[30:0], 1'b0};
    if (s[31]) nx ^= 32'h0040_0007;
    for (int k = 0; k < N; k++) nx[k % 32] ^= x[k];
    return nx;
  endfunction

  // one pattern: cfg < NCFG static, cfg == NCFG dynamic
  task automatic pattern(input int cfg, input bit compact);
    int active;
    active = (cfg < NCFG) ? int'(CFGM[cfg]) : int'(MI);
    for (int t = 0; t < L; t++) begin
      logic [N-1:0] o;
      int c;
      @(negedge clk);
      c = (cfg < NCFG) ? cfg : (t % NCFG);
      se = 1'b1; sel = SW'(c); men = compact;
      si = '0;
      for (int i = 0; i < active; i++) si[i] = 1'($urandom);
      bits += active;
      for (int n = 0; n < N; n++) o[n] = m[n][L-1];
      if (compact) msig = misr_step(msig, o);
      for (int n = 0; n < N; n++) m[n] = {m[n][L-2:0], si[n % CFGM[c]]};
      cycles++;
      @(posedge clk);
    end
    if (cfg < NCFG) begin
      bits += MI - active;      // idle pins are specified once per pattern
      bits_formula += CFGM[cfg] * L + (MI - CFGM[cfg]);
      n_static++;
    end else begin
      bits_formula += MI * L;
      n_dynamic++;
    end
    #1;
    checks++;
    begin
      int bad = 0;
      for (int n = 0; n < S; n++) if (q[n] !== m[n]) bad++;
      for (int w = 0; w < NW; w++) if (core[w] !== m[S+w]) bad++;
      if (bad != 0) begin
        failures++; $display("%s: pattern cfg %0d, %0d chains wrong", NAME, cfg, bad);
      end
    end
    // capture
    @(negedge clk);
    se = 1'b0; men = 1'b0;
    for (int n = 0; n < S; n++) begin
      for (int k = 0; k < L; k++) fd[n][k] = 1'($urandom);
      m[n] = fd[n];
    end
    cycles++;
    @(posedge clk);
  endtask

  initial begin
    rst_n = 1'b0; se = 1'b1; men = 1'b0; si = '0; sel = '0; ctl = '0; fd = '0; pin = '0;
    msig = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int j = 0; j <= NCFG; j++) pattern(j, j > 0);
    // final unload in configuration 0
    for (int t = 0; t < L; t++) begin
      logic [N-1:0] o;
      @(negedge clk);
      se = 1'b1; men = 1'b1; sel = '0; si = '0;
      for (int n = 0; n < N; n++) o[n] = m[n][L-1];
      msig = misr_step(msig, o);
      for (int n = 0; n < N; n++) m[n] = {m[n][L-2:0], 1'b0};
      @(posedge clk);
    end
    #1;
    checks++;
    if (sig !== msig) begin failures++; $display("%s: signature %h expected %h", NAME, sig, msig); end
    checks++;
    if (bits != bits_formula) begin failures++; $display("%s: %0d tester bits, formula %0d", NAME, bits, bits_formula); end
    checks++;
    if (cycles != longint'(NCFG + 1) * (L + 1)) begin failures++; $display("%s: %0d cycles", NAME, cycles); end
    checks++;
    if (n_static != NCFG || n_dynamic != 1) failures++;
    $display("%-10s N=%0d L=%0d M_p=%0d: %0d static + %0d dynamic patterns, %0d tester bits, %0d clocks",
             NAME, N, L, MI, n_static, n_dynamic, bits, cycles);
    done = 1'b1;
  end
endmodule
