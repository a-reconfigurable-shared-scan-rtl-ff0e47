// scan_cell - mux-D scan flip-flop.
//
// A 2:1 multiplexer in front of a D flip-flop. With scan enable high the
// flip-flop loads the scan input (shift), with it low it loads the functional
// D input from the logic under test (capture). This is the classic scan cell
// of a full-scan design; the cell has no reset of its own, as it is a
// functional flip-flop of the circuit and is initialised by shifting.
//
// Interface: clk, se (scan enable), d (functional data), si (scan in),
// q (cell value, also the scan output to the next cell).
// Timing: q takes its new value on the rising clock edge.
module scan_cell (
  input  logic clk,
  input  logic se,
  input  logic d,
  input  logic si,
  output logic q
);

  always_ff @(posedge clk)
    q <= se ? si : d;

endmodule
