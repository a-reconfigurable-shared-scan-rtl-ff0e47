// tb_rssa_full - one complete test pattern on the design at its default size
// (537 chains of 135 cells, 25 of them wrapper chains, 7 scan inputs, prime-
// based configurations M = 2, 3, 5, 7, 32-bit MISR).
//
// With the MISR held in reset the pattern is shifted in over 135 cycles in a
// dynamic configuration (the select steps 0,1,2,3,0,... each shift cycle);
// afterwards every scan cell and wrapper cell is compared with the bits a
// model in this testbench predicts (cell 134 - t of chain n holds scan input
// n mod M of shift cycle t). One capture clock loads random responses, then
// 135 shift cycles unload them into the MISR while a static configuration-0
// pattern enters. The scan outputs are checked every cycle, the signature at
// the end, and the load and unload must take exactly 135 cycles each.
module tb_rssa_full;
  import rssa_pkg::*;
  localparam int unsigned N = DEF_N_CHAINS, W = DEF_N_WRAP, S = N - W;
  localparam int unsigned L = DEF_CHAIN_LEN, MI = DEF_M_IN;
  localparam int unsigned PRIME [4] = '{2, 3, 5, 7};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, se, tm, men;
  logic [MI-1:0] si;
  logic [1:0] sel;
  logic [N-1:0][3:0] ctl;
  logic [S-1:0][L-1:0] fd, q;
  logic [W-1:0][L-1:0] pin, core;
  logic [N-1:0] so;
  logic [31:0] sig;

  rssa_top dut (
    .clk(clk), .rst_n(rst_n), .se(se), .test_mode(tm), .si(si), .cfg_sel(sel),
    .chain_ctl(ctl), .misr_en(men), .func_d(fd), .cell_q(q), .pi_pin(pin),
    .pi_core(core), .so(so), .signature(sig));

  int checks = 0, failures = 0;
  logic [L-1:0] m [N];
  logic [31:0] msig;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] misr_step(logic [31:0] s, logic [N-1:0] x);
    logic [31:0] nx;
    nx = {s[30:0], 1'b0};
    if (s[31]) nx ^= 32'h0040_0007;
    for (int k = 0; k < N; k++) nx[k % 32] ^= x[k];
    return nx;
  endfunction

  initial begin
    int load_cycles = 0, unload_cycles = 0;
    logic [MI-1:0] pat [L];
    rst_n = 1'b0; se = 1'b1; tm = 1'b1; men = 1'b0; si = '0; sel = '0; ctl = '0;
    fd = '0; pin = '0; msig = '0;
    // load, dynamic configuration
    for (int t = 0; t < L; t++) begin
      @(negedge clk);
      sel = 2'(t % 4);
      pat[t] = 7'($urandom);
      si = pat[t];
      load_cycles++;
      @(posedge clk);
    end
    #1;
    for (int n = 0; n < N; n++)
      for (int t = 0; t < L; t++)
        m[n][L-1-t] = pat[t][n % PRIME[t % 4]];
    checks++;
    begin
      int bad = 0;
      for (int n = 0; n < S; n++) if (q[n] !== m[n]) bad++;
      for (int w = 0; w < W; w++) if (core[w] !== m[S+w]) bad++;
      if (bad != 0) begin failures++; $display("%0d chains loaded wrongly", bad); end
    end
    checks++;
    if (load_cycles != L) failures++;
    // capture
    @(negedge clk);
    rst_n = 1'b1; se = 1'b0;
    for (int n = 0; n < S; n++) begin
      for (int k = 0; k < L; k += 32) fd[n][k +: 32] = $urandom;
      m[n] = fd[n];
    end
    @(posedge clk); #1;
    checks++;
    begin
      int bad = 0;
      for (int n = 0; n < S; n++) if (q[n] !== m[n]) bad++;
      if (bad != 0) begin failures++; $display("%0d chains captured wrongly", bad); end
    end
    // unload into the MISR while the next pattern (configuration 0) loads
    for (int t = 0; t < L; t++) begin
      logic [N-1:0] o;
      @(negedge clk);
      se = 1'b1; men = 1'b1; sel = 2'd0; si = 7'($urandom);
      for (int n = 0; n < N; n++) o[n] = m[n][L-1];
      checks++;
      if (so !== o) begin failures++; $display("unload cycle %0d: scan outputs differ", t); end
      msig = misr_step(msig, o);
      for (int n = 0; n < N; n++) m[n] = {m[n][L-2:0], si[n % 2]};
      unload_cycles++;
      @(posedge clk);
    end
    #1;
    checks++;
    if (sig !== msig) begin failures++; $display("signature %h expected %h", sig, msig); end
    checks++;
    if (unload_cycles != L) failures++;
    $display("signature %h after %0d load and %0d unload cycles", sig, load_cycles, unload_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
