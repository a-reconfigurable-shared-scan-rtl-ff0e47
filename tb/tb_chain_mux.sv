// tb_chain_mux - a 3-configuration chain multiplexer over 3 scan inputs with
// one inverted connection; every input combination and every select value,
// including the unused code 3, is checked against the wiring table.
module tb_chain_mux;
  import rssa_pkg::*;
  localparam int unsigned M_IN = 3, N_CFG = 3;
  // configuration 0: ~input 2, configuration 1: input 0, configuration 2: ~input 1
  localparam map_entry_t [N_CFG-1:0] ENT = {
    map_entry_t'{inv: 1'b1, idx: 8'd1},
    map_entry_t'{inv: 1'b0, idx: 8'd0},
    map_entry_t'{inv: 1'b1, idx: 8'd2}
  };
  logic [M_IN-1:0] si;
  logic [1:0] cfg_sel;
  logic chain_in, expected;
  int checks = 0, failures = 0;

  chain_mux #(.M_IN(M_IN), .N_CFG(N_CFG), .ENTRIES(ENT)) dut (
    .si(si), .cfg_sel(cfg_sel), .chain_in(chain_in));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++)
      for (int c = 0; c < 4; c++) begin
        si = 3'(s); cfg_sel = 2'(c);
        case (c)
          0: expected = ~si[2];
          1: expected = si[0];
          2: expected = ~si[1];
          default: expected = 1'b0;
        endcase
        #1;
        checks++;
        if (chain_in !== expected) begin
          failures++;
          $display("si=%b cfg=%0d chain_in=%b expected %b", si, c, chain_in, expected);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
