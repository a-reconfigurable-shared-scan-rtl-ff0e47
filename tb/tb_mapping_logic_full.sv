// tb_mapping_logic_full - gives every chain of the unoptimized mapping logic
// its own random select and checks chain n against scan input ctl/2, inverted
// when ctl is odd, and 0 for select codes beyond the inputs.
module tb_mapping_logic_full;
  localparam int unsigned N = 537, M_IN = 7, CTL_W = 4;
  logic [M_IN-1:0] si;
  logic [N-1:0][CTL_W-1:0] ctl;
  logic [N-1:0] chain_in;
  int checks = 0, failures = 0;
  int n_inv = 0, n_direct = 0, n_unused = 0;

  mapping_logic_full dut (.si(si), .chain_ctl(ctl), .chain_in(chain_in));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    for (int r = 0; r < 50; r++) begin
      si = 7'($urandom);
      for (int n = 0; n < N; n++) ctl[n] = 4'($urandom);
      #1;
      for (int n = 0; n < N; n++) begin
        int unsigned idx;
        idx = ctl[n] / 2;
        if (idx >= M_IN) begin e = 1'b0; n_unused++; end
        else if (ctl[n] % 2 == 1) begin e = !si[idx]; n_inv++; end
        else begin e = si[idx]; n_direct++; end
        checks++;
        if (chain_in[n] !== e) begin
          failures++;
          if (failures < 10) $display("chain %0d ctl %0d: %b expected %b", n, ctl[n], chain_in[n], e);
        end
      end
    end
    checks++;
    if (n_inv == 0 || n_direct == 0 || n_unused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
