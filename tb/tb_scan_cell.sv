// tb_scan_cell - checks the mux-D scan cell: with se high it loads si, with
// se low it loads d, on every rising edge, for random stimulus.
module tb_scan_cell;
  logic clk = 1'b0;
  logic se, d, si, q;
  int checks = 0, failures = 0;

  scan_cell dut (.clk(clk), .se(se), .d(d), .si(si), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_q;
    int n_shift = 0, n_capture = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      se = 1'($urandom); d = 1'($urandom); si = 1'($urandom);
      exp_q = se ? si : d;
      if (se) n_shift++; else n_capture++;
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("cycle %0d: se=%b d=%b si=%b q=%b expected %b", i, se, d, si, q, exp_q);
      end
    end
    checks++;
    if (n_shift == 0 || n_capture == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
