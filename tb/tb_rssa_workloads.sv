// tb_rssa_workloads - the architecture at the sizes of the prime-based
// benchmark experiments (chains N, chain length L, scan pins M_p), each run
// through one static pattern per prime configuration and one dynamic pattern:
//   Circuit A 487/20/7, Circuit B 516/26/7, S13207 80/11/7, S15850 77/10/11,
//   S38417 129/14/5, S38584 139/13/7.
// (Circuit C, 537/135/7, is the default size and is run by tb_rssa_full.)
// One wrapper chain each; the benchmark logic itself is replaced by random
// capture data. Checks per design: cell contents after every load, the
// signature, the pattern cycle count (L + 1 each) and the tester data volume
// against the static/dynamic volume formula.
module tb_rssa_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  rssa_workload_runner #(.NAME("CircuitA"), .N(487), .L(20), .MI(7)) u_a (.clk(clk));
  rssa_workload_runner #(.NAME("CircuitB"), .N(516), .L(26), .MI(7)) u_b (.clk(clk));
  rssa_workload_runner #(.NAME("S13207"), .N(80), .L(11), .MI(7)) u_s13207 (.clk(clk));
  rssa_workload_runner #(.NAME("S15850"), .N(77), .L(10), .MI(11), .NCFG(5),
                         .CFGM({8'd11, 8'd7, 8'd5, 8'd3, 8'd2})) u_s15850 (.clk(clk));
  rssa_workload_runner #(.NAME("S38417"), .N(129), .L(14), .MI(5), .NCFG(3),
                         .CFGM({8'd5, 8'd3, 8'd2})) u_s38417 (.clk(clk));
  rssa_workload_runner #(.NAME("S38584"), .N(139), .L(13), .MI(7)) u_s38584 (.clk(clk));

  int checks, failures;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (u_a.done && u_b.done && u_s13207.done && u_s15850.done && u_s38417.done && u_s38584.done);
    checks = u_a.checks + u_b.checks + u_s13207.checks + u_s15850.checks + u_s38417.checks + u_s38584.checks;
    failures = u_a.failures + u_b.failures + u_s13207.failures + u_s15850.failures
             + u_s38417.failures + u_s38584.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
