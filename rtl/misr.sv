// misr - multiple-input signature register on the scan chain outputs.
//
// The chain outputs are not compared bit by bit; they are compacted into a
// signature that is compared once with the expected one. The register is a
// W-bit internal-feedback LFSR: every enabled clock it shifts toward the MSB,
// XORs POLY in when the bit shifted out was 1, and XORs the N_IN input bits
// in, input i into bit i mod W (inputs beyond W are folded by an XOR tree, so
// any number of chains can be compacted by a register of fixed width).
//
// The architecture only says a MISR is used and that its length grows with
// the number of bits compacted; width, polynomial (default x^32 + x^22 + x^2
// + x + 1), folding, reset value 0 and the enable are this design's choices.
//
// Interface: rst_n (asynchronous, clears the signature), en (compact this
// cycle), in (chain outputs), signature.
// Timing: the input of a cycle is in the signature after that clock edge.
module misr #(
  parameter int unsigned N_IN = rssa_pkg::DEF_N_CHAINS,
  parameter int unsigned W    = rssa_pkg::DEF_MISR_W,
  parameter logic [W-1:0] POLY = W'(rssa_pkg::DEF_MISR_POLY)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [N_IN-1:0] in,
  output logic [W-1:0]    signature
);

  logic [W-1:0] folded;

  always_comb begin
    folded = '0;
    for (int unsigned i = 0; i < N_IN; i++)
      folded[i % W] ^= in[i];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)
      signature <= '0;
    else if (en)
      signature <= {signature[W-2:0], 1'b0}
                   ^ (signature[W-1] ? POLY : '0)
                   ^ folded;

endmodule
