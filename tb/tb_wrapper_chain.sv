// tb_wrapper_chain - shifts stimulus into a wrapper chain, checks that the
// cells hold through a se-low (capture) cycle, that core_in follows the cells
// in test mode and the pins otherwise, and that so delivers the oldest bit.
module tb_wrapper_chain;
  localparam int unsigned LEN = 40;
  logic clk = 1'b0;
  logic se, test_mode, si, so;
  logic [LEN-1:0] pin, core_in, model;
  int checks = 0, failures = 0;
  int n_hold = 0, n_func = 0, n_test = 0;

  wrapper_chain #(.LEN(LEN)) dut (.clk(clk), .se(se), .test_mode(test_mode), .si(si),
                                  .pin(pin), .core_in(core_in), .so(so));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    checks++;
    if (core_in !== (test_mode ? model : pin) || so !== model[LEN-1]) begin
      failures++;
      $display("test_mode=%b core_in=%h model=%h pin=%h so=%b", test_mode, core_in, model, pin, so);
    end
  endtask

  initial begin
    se = 1'b1; si = 1'b0; test_mode = 1'b1; pin = '0;
    model = '0;
    repeat (LEN) begin @(negedge clk); si = 1'b0; end
    @(posedge clk); #1;
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      se = ($urandom_range(0, 3) != 0);
      si = 1'($urandom);
      test_mode = 1'($urandom);
      pin = {$urandom, $urandom};
      #1 check_outputs();
      if (test_mode) n_test++; else n_func++;
      if (se) model = {model[LEN-2:0], si};
      else n_hold++;
      @(posedge clk); #1;
      check_outputs();
    end
    checks++;
    if (n_hold == 0 || n_func == 0 || n_test == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
