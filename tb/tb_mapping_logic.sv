// tb_mapping_logic - checks the shared-select mapping logic two ways.
// 1. Default size and prime-based configurations (537 chains, 7 inputs,
//    M = 2, 3, 5, 7): for random scan-input values and every select value,
//    chain n must carry scan input n mod M.
// 2. A table-driven instance with the four-chain, two-input example: with
//    select 0 chains 1,2 share input 1 and chains 3,4 input 2; with select 1
//    chains 1,3 share input 1 and chains 2,4 input 2. Chain 4 is also given
//    an inverted connection in a third configuration.
module tb_mapping_logic;
  import rssa_pkg::*;
  localparam int unsigned N = 537, M_IN = 7, N_CFG = 4;
  localparam int unsigned PRIMES [N_CFG] = '{2, 3, 5, 7};

  logic [M_IN-1:0] si;
  logic [1:0] cfg_sel;
  logic [N-1:0] chain_in;

  mapping_logic dut (.si(si), .cfg_sel(cfg_sel), .chain_in(chain_in));

  // example table: [cfg][chain], chains 0..3 here are chains 1..4 in the text
  localparam map_entry_t [2:0][3:0] EX = {
    // configuration 2: chains 1..3 on input 1, chain 4 on ~input 1
    {map_entry_t'{1'b1, 8'd0}, map_entry_t'{1'b0, 8'd0}, map_entry_t'{1'b0, 8'd0}, map_entry_t'{1'b0, 8'd0}},
    // configuration 1: chains 1,3 -> input 1; chains 2,4 -> input 2
    {map_entry_t'{1'b0, 8'd1}, map_entry_t'{1'b0, 8'd0}, map_entry_t'{1'b0, 8'd1}, map_entry_t'{1'b0, 8'd0}},
    // configuration 0: chains 1,2 -> input 1; chains 3,4 -> input 2
    {map_entry_t'{1'b0, 8'd1}, map_entry_t'{1'b0, 8'd1}, map_entry_t'{1'b0, 8'd0}, map_entry_t'{1'b0, 8'd0}}
  };
  logic [1:0] ex_si;
  logic [1:0] ex_sel;
  logic [3:0] ex_in;

  mapping_logic #(.N_CHAINS(4), .M_IN(2), .N_CFG(3), .CUSTOM_TABLE(1'b1), .CFG_TABLE(EX))
    dut_ex (.si(ex_si), .cfg_sel(ex_sel), .chain_in(ex_in));

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] ex_exp;
    for (int r = 0; r < 64; r++) begin
      si = 7'($urandom);
      for (int c = 0; c < N_CFG; c++) begin
        cfg_sel = 2'(c);
        #1;
        for (int n = 0; n < N; n++) begin
          checks++;
          if (chain_in[n] !== si[n % PRIMES[c]]) begin
            failures++;
            if (failures < 10)
              $display("cfg %0d chain %0d: got %b, expected input %0d = %b",
                       c, n, chain_in[n], n % PRIMES[c], si[n % PRIMES[c]]);
          end
        end
      end
    end
    for (int s = 0; s < 4; s++)
      for (int c = 0; c < 4; c++) begin
        ex_si = 2'(s); ex_sel = 2'(c);
        case (c)
          0: ex_exp = {ex_si[1], ex_si[1], ex_si[0], ex_si[0]};
          1: ex_exp = {ex_si[1], ex_si[0], ex_si[1], ex_si[0]};
          2: ex_exp = {~ex_si[0], ex_si[0], ex_si[0], ex_si[0]};
          default: ex_exp = 4'b0000;
        endcase
        #1;
        checks++;
        if (ex_in !== ex_exp) begin
          failures++;
          $display("example si=%b cfg=%0d chains=%b expected %b", ex_si, c, ex_in, ex_exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
