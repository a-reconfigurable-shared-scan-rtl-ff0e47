// tb_scan_chain - loads random patterns into a scan chain, checks every cell
// and the scan output after each shift, captures random functional data with
// se low and shifts it out again, checking the bit order on so.
module tb_scan_chain;
  localparam int unsigned LEN = 135;
  logic clk = 1'b0;
  logic se, si, so;
  logic [LEN-1:0] d, q;
  logic [LEN-1:0] model;
  int checks = 0, failures = 0;

  scan_chain #(.LEN(LEN)) dut (.clk(clk), .se(se), .si(si), .d(d), .q(q), .so(so));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clock_and_check(string what);
    @(posedge clk); #1;
    checks++;
    if (q !== model || so !== model[LEN-1]) begin
      failures++;
      $display("%s: q=%h expected %h", what, q, model);
    end
  endtask

  initial begin
    logic [LEN-1:0] pattern;
    int shift_cycles;
    se = 1'b1; si = 1'b0; d = '0;
    // flush to a known state
    model = '0;
    for (int i = 0; i < LEN; i++) begin
      @(negedge clk); se = 1'b1; si = 1'b0;
    end
    @(posedge clk); #1;
    for (int p = 0; p < 6; p++) begin
      // shift in a pattern; bit t enters on shift cycle t
      for (int k = 0; k < LEN; k += 32) pattern[k +: 32] = $urandom;
      shift_cycles = 0;
      for (int t = 0; t < LEN; t++) begin
        @(negedge clk);
        se = 1'b1; si = pattern[t];
        // the bit leaving the chain this cycle is the oldest one
        checks++;
        if (so !== model[LEN-1]) begin failures++; $display("so mismatch t=%0d", t); end
        model = {model[LEN-2:0], pattern[t]};
        shift_cycles++;
        clock_and_check("shift");
      end
      // after LEN shifts, bit t sits in cell LEN-1-t
      checks++;
      for (int t = 0; t < LEN; t++)
        if (q[LEN-1-t] !== pattern[t]) begin failures++; $display("cell %0d", LEN-1-t); break; end
      checks++;
      if (shift_cycles != LEN) failures++;
      // capture cycle: se low loads d in one clock
      @(negedge clk);
      se = 1'b0;
      for (int k = 0; k < LEN; k += 32) d[k +: 32] = $urandom;
      model = d;
      clock_and_check("capture");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
