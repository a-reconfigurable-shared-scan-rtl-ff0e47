// tb_misr - compacts random 537-bit chain output words into the 32-bit MISR
// and compares the signature every cycle with a bit-level model of
// x^32 + x^22 + x^2 + x + 1 with input i XORed into bit i mod 32. Also checks
// reset, that en low freezes the signature, and that flipping a single input
// bit changes the final signature.
module tb_misr;
  localparam int unsigned N = 537, W = 32;
  logic clk = 1'b0, rst_n, en;
  logic [N-1:0] in;
  logic [W-1:0] signature, model;
  int checks = 0, failures = 0;

  misr dut (.clk(clk), .rst_n(rst_n), .en(en), .in(in), .signature(signature));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] step(logic [W-1:0] s, logic [N-1:0] x);
    logic [W-1:0] nx;
    logic fb;
    fb = s[W-1];
    for (int i = 0; i < W; i++) begin
      nx[i] = (i > 0) ? s[i-1] : 1'b0;
      if (i == 0 || i == 1 || i == 2 || i == 22) nx[i] ^= fb;
      for (int k = i; k < N; k += W) nx[i] ^= x[k];
    end
    return nx;
  endfunction

  task automatic run(input int unsigned seed, input int flip, output logic [W-1:0] sig);
    void'($urandom(seed));
    @(negedge clk); rst_n = 1'b0; en = 1'b0; in = '0;
    @(negedge clk); rst_n = 1'b1;
    checks++;
    if (signature !== '0) begin failures++; $display("reset value %h", signature); end
    model = '0;
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      for (int k = 0; k < N; k += 32) in[k +: 32] = $urandom;
      if (c == 150 && flip >= 0) in[flip] = ~in[flip];
      en = ($urandom_range(0, 7) != 0);
      if (en) model = step(model, in);
      @(posedge clk); #1;
      checks++;
      if (signature !== model) begin
        failures++;
        if (failures < 10) $display("cycle %0d en=%b sig=%h model=%h", c, en, signature, model);
      end
    end
    sig = signature;
  endtask

  initial begin
    logic [W-1:0] a, b;
    run(7, -1, a);
    run(7, 400, b);
    checks++;
    if (a === b) begin failures++; $display("single-bit error not seen in signature"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
