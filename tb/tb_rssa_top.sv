// tb_rssa_top - end-to-end test of the reconfigurable shared scan-in design.
//
// Three reduced instances share one clock:
//  A  prime-based configurations (M = 2, 3, 5, 7) on 12 scan chains and
//     2 wrapper chains of 6 cells, 7 scan inputs. Patterns are loaded in each
//     static configuration and in dynamic configurations that change the
//     select every shift cycle, captured, and shifted out into the MISR while
//     the next pattern shifts in. Every cell, every scan output, the wrapped
//     primary inputs and the signature are compared each cycle with a model
//     kept in this testbench; after a static load the testbench also checks
//     that chains sharing an input hold identical data.
//  B  the four-chain, two-input example with two configurations (select 0:
//     chains 1,2 on input 1 and 3,4 on input 2; select 1: chains 1,3 on
//     input 1 and 2,4 on input 2) plus one wrapper chain fed inverted inputs.
//     The testbench picks a configuration per shift cycle for a target vector
//     (first one that loads the row, else the one with the fewest wrong
//     bits), expects the sequence 0,0,1,1 for the first example vector, and
//     exactly one wrong bit in each of the last two rows of the second.
//     All 16 row-by-row select sequences are then applied with random
//     inputs and every chain is compared with the configuration table.
//  C  the unoptimized mapping (FULL_MAPPING = 1) with a random per-chain
//     select every shift cycle.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_rssa_top;
  import rssa_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ instance A
  localparam int unsigned NA = 14, WA = 2, SA = NA - WA, L = 6, MI = 7, NC = 4;
  localparam int unsigned PRIME [NC] = '{2, 3, 5, 7};

  logic              a_rst_n, a_se, a_tm, a_men;
  logic [MI-1:0]     a_si;
  logic [1:0]        a_sel;
  logic [NA-1:0][3:0] a_ctl;
  logic [SA-1:0][L-1:0] a_fd, a_q;
  logic [WA-1:0][L-1:0] a_pin, a_core;
  logic [NA-1:0]     a_so;
  logic [31:0]       a_sig;

  rssa_top #(.N_CHAINS(NA), .N_WRAP(WA), .CHAIN_LEN(L)) u_a (
    .clk(clk), .rst_n(a_rst_n), .se(a_se), .test_mode(a_tm), .si(a_si), .cfg_sel(a_sel),
    .chain_ctl(a_ctl), .misr_en(a_men), .func_d(a_fd), .cell_q(a_q), .pi_pin(a_pin),
    .pi_core(a_core), .so(a_so), .signature(a_sig));

  // ------------------------------------------------------------ instance C
  logic              c_rst_n, c_se, c_tm, c_men;
  logic [MI-1:0]     c_si;
  logic [1:0]        c_sel;
  logic [NA-1:0][3:0] c_ctl;
  logic [SA-1:0][L-1:0] c_fd, c_q;
  logic [WA-1:0][L-1:0] c_pin, c_core;
  logic [NA-1:0]     c_so;
  logic [31:0]       c_sig;

  rssa_top #(.N_CHAINS(NA), .N_WRAP(WA), .CHAIN_LEN(L), .FULL_MAPPING(1'b1)) u_c (
    .clk(clk), .rst_n(c_rst_n), .se(c_se), .test_mode(c_tm), .si(c_si), .cfg_sel(c_sel),
    .chain_ctl(c_ctl), .misr_en(c_men), .func_d(c_fd), .cell_q(c_q), .pi_pin(c_pin),
    .pi_core(c_core), .so(c_so), .signature(c_sig));

  // ------------------------------------------------------------ instance B
  localparam int unsigned NB = 5, LB = 4;
  // [cfg][chain]; chain 4 is the wrapper chain
  localparam map_entry_t [1:0][NB-1:0] EX = {
    {map_entry_t'{1'b1, 8'd1}, map_entry_t'{1'b0, 8'd1}, map_entry_t'{1'b0, 8'd0},
     map_entry_t'{1'b0, 8'd1}, map_entry_t'{1'b0, 8'd0}},
    {map_entry_t'{1'b1, 8'd0}, map_entry_t'{1'b0, 8'd1}, map_entry_t'{1'b0, 8'd1},
     map_entry_t'{1'b0, 8'd0}, map_entry_t'{1'b0, 8'd0}}
  };
  logic              b_se, b_tm;
  logic [1:0]        b_si;
  logic [0:0]        b_sel;
  logic [NB-1:0][1:0] b_ctl;
  logic [3:0][LB-1:0] b_fd, b_q;
  logic [0:0][LB-1:0] b_pin, b_core;
  logic [NB-1:0]     b_so;
  logic [31:0]       b_sig;

  rssa_top #(.N_CHAINS(NB), .N_WRAP(1), .CHAIN_LEN(LB), .M_IN(2), .N_CFG(2),
             .CFG_M({8'd2, 8'd2}), .CUSTOM_TABLE(1'b1), .CFG_TABLE(EX)) u_b (
    .clk(clk), .rst_n(1'b1), .se(b_se), .test_mode(b_tm), .si(b_si), .cfg_sel(b_sel),
    .chain_ctl(b_ctl), .misr_en(1'b0), .func_d(b_fd), .cell_q(b_q), .pi_pin(b_pin),
    .pi_core(b_core), .so(b_so), .signature(b_sig));

  // ----------------------------------------------------------- mechanisms
  int n_static [NC];
  int n_dynamic = 0, n_capture = 0, n_overlap = 0, n_misr = 0, n_wrap_test = 0;
  int n_wrap_func = 0, n_shared = 0, n_full_map = 0, n_inverted = 0;
  int n_postproc = 0, n_unloadable = 0, n_seq = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- reference model
  logic [L-1:0]  ma [NA];   // chain contents of A, bit i = cell i
  logic [L-1:0]  mc [NA];
  logic [31:0]   sig_a, sig_c;

  function automatic logic [31:0] misr_step(logic [31:0] s, logic [NA-1:0] x);
    logic [31:0] nx;
    nx = {s[30:0], 1'b0};
    if (s[31]) begin nx[0] ^= 1'b1; nx[1] ^= 1'b1; nx[2] ^= 1'b1; nx[22] ^= 1'b1; end
    for (int k = 0; k < NA; k++) nx[k % 32] ^= x[k];
    return nx;
  endfunction

  function automatic logic [NA-1:0] outs(ref logic [L-1:0] m [NA]);
    logic [NA-1:0] o;
    for (int n = 0; n < NA; n++) o[n] = m[n][L-1];
    return o;
  endfunction

  task automatic compare(string tag, ref logic [L-1:0] m [NA],
                         input logic [SA-1:0][L-1:0] q, input logic [WA-1:0][L-1:0] core,
                         input logic [WA-1:0][L-1:0] pin, input logic tm,
                         input logic [NA-1:0] so, input logic [31:0] sig,
                         input logic [31:0] msig);
    checks++;
    for (int n = 0; n < SA; n++)
      if (q[n] !== m[n]) begin
        failures++; $display("%s chain %0d: %b expected %b", tag, n, q[n], m[n]); break;
      end
    checks++;
    for (int w = 0; w < WA; w++)
      if (core[w] !== (tm ? m[SA+w] : pin[w])) begin
        failures++; $display("%s wrapper %0d: %b", tag, w, core[w]); break;
      end
    checks++;
    if (so !== outs(m)) begin failures++; $display("%s so %b expected %b", tag, so, outs(m)); end
    checks++;
    if (sig !== msig) begin failures++; $display("%s signature %h expected %h", tag, sig, msig); end
  endtask

  // One shift cycle of A and C together. sel_seq: configuration of A.
  task automatic shift_ac(input logic [1:0] sel, input logic misr_on);
    logic [NA-1:0] o_a, o_c;
    @(negedge clk);
    a_se = 1'b1; c_se = 1'b1;
    a_sel = sel;
    a_si = 7'($urandom); c_si = 7'($urandom);
    for (int n = 0; n < NA; n++) c_ctl[n] = 4'($urandom);
    a_men = misr_on; c_men = misr_on;
    o_a = outs(ma); o_c = outs(mc);
    if (misr_on) begin
      sig_a = misr_step(sig_a, o_a); sig_c = misr_step(sig_c, o_c); n_misr++;
    end
    for (int n = 0; n < NA; n++) begin
      logic bc;
      int unsigned idx;
      ma[n] = {ma[n][L-2:0], a_si[n % PRIME[sel]]};
      idx = c_ctl[n] / 2;
      bc = (idx < MI) ? (c_si[idx] ^ c_ctl[n][0]) : 1'b0;
      mc[n] = {mc[n][L-2:0], bc};
      n_full_map++;
    end
    @(posedge clk); #1;
    compare("A", ma, a_q, a_core, a_pin, a_tm, a_so, a_sig, sig_a);
    compare("C", mc, c_q, c_core, c_pin, c_tm, c_so, c_sig, sig_c);
    if (a_tm) n_wrap_test++;
  endtask

  task automatic capture_ac();
    @(negedge clk);
    a_se = 1'b0; c_se = 1'b0; a_men = 1'b0; c_men = 1'b0;
    for (int n = 0; n < SA; n++) begin
      a_fd[n] = L'($urandom); c_fd[n] = L'($urandom);
      ma[n] = a_fd[n]; mc[n] = c_fd[n];
    end
    a_pin = {WA{L'($urandom)}}; c_pin = a_pin;
    // functional mode: the logic sees the pins instead of the wrapper cells
    a_tm = 1'b0; c_tm = 1'b0;
    #1;
    checks++;
    if (a_core !== a_pin || c_core !== c_pin) begin failures++; $display("functional mode inputs"); end
    n_wrap_func++;
    a_tm = 1'b1; c_tm = 1'b1;
    @(posedge clk); #1;
    compare("A capture", ma, a_q, a_core, a_pin, a_tm, a_so, a_sig, sig_a);
    compare("C capture", mc, c_q, c_core, c_pin, c_tm, c_so, c_sig, sig_c);
    n_capture++;
  endtask

  // Check that in static configuration sel, chains on the same input match.
  task automatic check_shared(input int sel);
    for (int n = 0; n < SA; n++)
      for (int k = n + 1; k < SA; k++)
        if (n % PRIME[sel] == k % PRIME[sel]) begin
          checks++; n_shared++;
          if (a_q[n] !== a_q[k]) begin
            failures++; $display("cfg %0d: chains %0d and %0d differ", sel, n, k);
          end
        end
  endtask

  // ---------------------------------------------- example (instance B) helpers
  // Post-processing: choose a configuration per shift cycle for a target
  // vector tgt[chain][t] (bit shifted in on cycle t) of chains 0..3.
  function automatic int mismatches(int cfg, logic [3:0][LB-1:0] tgt, int t, output logic [1:0] si_v);
    int bad = 0;
    for (int i = 0; i < 2; i++) begin
      int ones = 0, zeros = 0;
      for (int n = 0; n < 4; n++)
        if (EX[cfg][n].idx == 8'(i)) begin
          if (tgt[n][t] ^ EX[cfg][n].inv) ones++; else zeros++;
        end
      si_v[i] = (ones >= zeros);
      bad += (ones >= zeros) ? zeros : ones;
    end
    return bad;
  endfunction

  task automatic load_example(input logic [3:0][LB-1:0] tgt, output logic [LB-1:0] chosen,
                              output int wrong_rows, output int wrong_bits);
    logic [1:0] si_v [LB];
    logic [LB-1:0] mw;
    wrong_rows = 0;
    for (int t = 0; t < LB; t++) begin
      int best = 1 << 30;
      for (int cfg = 0; cfg < 2; cfg++) begin
        logic [1:0] v;
        int bad;
        bad = mismatches(cfg, tgt, t, v);
        if (bad < best) begin best = bad; chosen[t] = cfg[0]; si_v[t] = v; end
      end
      if (best > 0) wrong_rows++;
    end
    mw = '0;
    for (int t = 0; t < LB; t++) begin
      @(negedge clk);
      b_se = 1'b1; b_sel = chosen[t]; b_si = si_v[t];
      mw = {mw[LB-2:0], b_si[EX[chosen[t]][4].idx] ^ EX[chosen[t]][4].inv};
      @(posedge clk); #1;
    end
    n_inverted++;
    // chain n cell LB-1-t holds the bit of cycle t
    wrong_bits = 0;
    for (int n = 0; n < 4; n++)
      for (int t = 0; t < LB; t++)
        if (b_q[n][LB-1-t] !== tgt[n][t]) wrong_bits++;
    checks++;
    if (b_core[0] !== mw) begin failures++; $display("example wrapper %b expected %b", b_core[0], mw); end
  endtask

  // Apply one select per shift cycle (bit t of seq on cycle t) with random
  // scan inputs, then compare every chain of the example with the
  // configuration table: row t of chain n must hold input idx of the
  // configuration chosen on cycle t, inverted where the table says so.
  task automatic sweep_example(input logic [LB-1:0] seq);
    logic [LB-1:0] exp_q [NB];
    for (int n = 0; n < NB; n++) exp_q[n] = '0;
    for (int t = 0; t < LB; t++) begin
      @(negedge clk);
      b_se = 1'b1; b_sel = seq[t]; b_si = 2'($urandom);
      for (int n = 0; n < NB; n++)
        exp_q[n] = {exp_q[n][LB-2:0], b_si[EX[seq[t]][n].idx] ^ EX[seq[t]][n].inv};
      @(posedge clk); #1;
    end
    checks++;
    for (int n = 0; n < 4; n++)
      if (b_q[n] !== exp_q[n]) begin
        failures++; $display("sequence %b chain %0d: %b expected %b", seq, n, b_q[n], exp_q[n]);
        break;
      end
    checks++;
    if (b_core[0] !== exp_q[4]) begin
      failures++; $display("sequence %b wrapper: %b expected %b", seq, b_core[0], exp_q[4]);
    end
    n_seq++;
  endtask

  // ------------------------------------------------------------- stimulus
  initial begin
    logic [LB-1:0] chosen;
    int rows, bits;
    logic [3:0][LB-1:0] tgt;
    foreach (n_static[i]) n_static[i] = 0;
    a_se = 1'b1; c_se = 1'b1; a_tm = 1'b1; c_tm = 1'b1; a_men = 1'b0; c_men = 1'b0;
    a_sel = '0; c_sel = '0; a_si = '0; c_si = '0; a_ctl = '0; c_ctl = '0;
    a_fd = '0; c_fd = '0; a_pin = '0; c_pin = '0;
    b_se = 1'b0; b_tm = 1'b1; b_si = '0; b_sel = '0; b_ctl = '0; b_fd = '0; b_pin = '0;
    a_rst_n = 1'b0; c_rst_n = 1'b0;
    sig_a = '0; sig_c = '0;
    // Flush: the cells start at unknown values; fill every chain through
    // configuration 0 with the MISR held in reset.
    for (int n = 0; n < NA; n++) begin ma[n] = 'x; mc[n] = 'x; end
    for (int t = 0; t < L; t++) begin
      @(negedge clk);
      a_si = 7'($urandom); c_si = 7'($urandom);
      for (int n = 0; n < NA; n++) c_ctl[n] = 4'($urandom);
      for (int n = 0; n < NA; n++) begin
        int unsigned idx;
        ma[n] = {ma[n][L-2:0], a_si[n % 2]};
        idx = c_ctl[n] / 2;
        mc[n] = {mc[n][L-2:0], (idx < MI) ? (c_si[idx] ^ c_ctl[n][0]) : 1'b0};
      end
      if (t == L - 1) begin a_rst_n = 1'b1; c_rst_n = 1'b1; end
      @(posedge clk);
    end
    #1;
    compare("A flush", ma, a_q, a_core, a_pin, a_tm, a_so, a_sig, sig_a);
    compare("C flush", mc, c_q, c_core, c_pin, c_tm, c_so, c_sig, sig_c);

    // Patterns: static in each configuration, then dynamic ones. The
    // response of each pattern is compacted while the next one loads.
    for (int p = 0; p < 10; p++) begin
      bit dynamic;
      int s;
      dynamic = (p >= NC);
      s = p % NC;
      for (int t = 0; t < L; t++) begin
        logic [1:0] sel;
        sel = dynamic ? 2'($urandom) : 2'(s);
        if (dynamic && t > 0 && sel == a_sel) sel = sel + 2'd1;
        shift_ac(sel, 1'b1);
      end
      n_overlap++;
      if (dynamic) n_dynamic++;
      else begin n_static[s]++; check_shared(s); end
      capture_ac();
    end
    // last unload
    for (int t = 0; t < L; t++) shift_ac(2'(t % NC), 1'b1);

    // Example: ATPG post-processing picks 0,0,1,1.
    tgt[0] = 4'b1111;  // bit t = value shifted on cycle t
    tgt[1] = 4'b0011;
    tgt[2] = 4'b1100;
    tgt[3] = 4'b0000;
    load_example(tgt, chosen, rows, bits);
    checks++;
    if (chosen !== 4'b1100 || rows != 0 || bits != 0) begin
      failures++; $display("example 1: configs %b (t=0 first is bit 0) rows %0d bits %0d", chosen, rows, bits);
    end else n_postproc++;
    tgt[3] = 4'b1100;  // chain 4 now needs {0,0,1,1}: rows 3 and 4 cannot load
    load_example(tgt, chosen, rows, bits);
    checks++;
    if (rows != 2 || bits != 2) begin
      failures++; $display("example 2: rows %0d bits %0d, expected 2 and 2", rows, bits);
    end else n_unloadable++;

    // Two configurations chosen row by row give 2**LB = 16 load patterns.
    for (int q = 0; q < (1 << LB); q++) sweep_example(LB'(q));

    // every mechanism must have happened
    for (int s = 0; s < NC; s++) begin
      checks++; if (n_static[s] == 0) begin failures++; $display("no static load in cfg %0d", s); end
    end
    checks++; if (n_dynamic == 0)    begin failures++; $display("no dynamic load"); end
    checks++; if (n_capture == 0)    begin failures++; $display("no capture"); end
    checks++; if (n_overlap == 0)    begin failures++; $display("no overlapped unload"); end
    checks++; if (n_misr == 0)       begin failures++; $display("no compaction"); end
    checks++; if (n_wrap_test == 0)  begin failures++; $display("no wrapper stimulus"); end
    checks++; if (n_wrap_func == 0)  begin failures++; $display("no functional mode"); end
    checks++; if (n_shared == 0)     begin failures++; $display("no shared-input check"); end
    checks++; if (n_full_map == 0)   begin failures++; $display("no full mapping"); end
    checks++; if (n_inverted == 0)   begin failures++; $display("no inverted connection"); end
    checks++; if (n_postproc == 0)   begin failures++; $display("no post-processed load"); end
    checks++; if (n_unloadable == 0) begin failures++; $display("no unloadable row"); end
    checks++; if (n_seq != (1 << LB)) begin failures++; $display("%0d select sequences", n_seq); end
    $display("static loads %0d/%0d/%0d/%0d dynamic %0d captures %0d compactions %0d",
             n_static[0], n_static[1], n_static[2], n_static[3], n_dynamic, n_capture, n_misr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
