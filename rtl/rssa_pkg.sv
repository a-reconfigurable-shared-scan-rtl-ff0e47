// rssa_pkg - types, default sizes and helper functions shared by the
// reconfigurable shared scan-in (RSSA) modules.
//
// A configuration says, for every scan chain, which scan input drives it and
// whether the chain receives that input or its inverse. One such choice is a
// map_entry_t. The prime-based configuration for M inputs connects chain n
// (counting from 0) to input n mod M, so chains 0, M, 2M, ... share input 0,
// which is the "every M-th chain on the same input" rule of the architecture.
//
// Default sizes are those of the largest example design (537 internal chains
// of length 135, up to 7 scan inputs, configurations for M = 2, 3, 5 and 7).
// The number of wrapper chains (25) and the MISR width and polynomial are
// this design's own choices; see the README.
package rssa_pkg;

  // Widest scan-input index a configuration entry can name.
  localparam int unsigned IDX_W = 8;

  typedef struct packed {
    logic             inv;  // chain receives the inverted scan input
    logic [IDX_W-1:0] idx;  // scan input number, 0-based
  } map_entry_t;

  // Default architecture sizes.
  localparam int unsigned DEF_N_CHAINS  = 537;  // internal chains incl. wrapper chains
  localparam int unsigned DEF_N_WRAP    = 25;   // wrapper chains among them
  localparam int unsigned DEF_CHAIN_LEN = 135;  // cells per chain (L)
  localparam int unsigned DEF_M_IN      = 7;    // scan input pins (M_p)
  localparam int unsigned DEF_N_CFG     = 4;    // configurations (M = 2, 3, 5, 7)
  localparam int unsigned DEF_MISR_W    = 32;
  // x^32 + x^22 + x^2 + x + 1 (feedback taps, bit i = coefficient of x^i)
  localparam logic [31:0] DEF_MISR_POLY = 32'h0040_0007;

  // Prime-based mapping: chain n is driven by input n mod m, not inverted.
  function automatic map_entry_t prime_entry(int unsigned chain, int unsigned m);
    map_entry_t e;
    e.inv = 1'b0;
    e.idx = IDX_W'(chain % m);
    return e;
  endfunction

endpackage
