// wrapper_chain - shift register wrapped around primary inputs.
//
// Primary inputs of the circuit under test would otherwise have to be driven
// serially by the tester for every pattern. A wrapper chain holds one cell per
// primary input and is loaded from a scan input exactly like a scan chain, so
// that its stimulus arrives in parallel with the internal chains. Several
// wrapper chains, none longer than the internal chains, cover a large input
// count.
//
// Each cell is a scan cell whose functional input is its own output: with se
// high the chain shifts (cell 0 next to si, cell LEN-1 drives so), with se low
// the cells hold the stimulus through the capture cycle. In test mode the
// circuit's inputs core_in are taken from the cells, otherwise from the pins.
// Holding during capture and the test_mode selector are this design's choices;
// the architecture only asks for a shift register around the inputs.
//
// Interface: si/so scan in/out, pin (package pins), core_in (to the logic).
// Timing: shifting as in scan_chain; core_in is combinational from test_mode.
module wrapper_chain #(
  parameter int unsigned LEN = rssa_pkg::DEF_CHAIN_LEN
) (
  input  logic           clk,
  input  logic           se,
  input  logic           test_mode,
  input  logic           si,
  input  logic [LEN-1:0] pin,
  output logic [LEN-1:0] core_in,
  output logic           so
);

  logic [LEN-1:0] held;

  for (genvar i = 0; i < LEN; i++) begin : g_cell
    scan_cell u_cell (
      .clk (clk),
      .se  (se),
      .d   (held[i]),
      .si  ((i == 0) ? si : held[(i == 0) ? 0 : i-1]),
      .q   (held[i])
    );
  end

  assign so      = held[LEN-1];
  assign core_in = test_mode ? held : pin;

endmodule
