// scan_chain - LEN scan cells joined into a shift register.
//
// Cell 0 sits next to the scan input and cell LEN-1 drives the scan output.
// While se is high every clock moves each value one cell toward the output,
// so after LEN shift cycles the first bit shifted in sits in cell LEN-1 and
// the last one in cell 0; what was in the chain leaves through so, the last
// cell first. With se low every cell captures its functional input d.
//
// Interface: si / so scan in and out; d[i] and q[i] are the functional input
// and output of cell i, the connections to the logic under test.
// Timing: one bit per clock in and out; so is q[LEN-1], no extra latency.
module scan_chain #(
  parameter int unsigned LEN = rssa_pkg::DEF_CHAIN_LEN
) (
  input  logic           clk,
  input  logic           se,
  input  logic           si,
  input  logic [LEN-1:0] d,
  output logic [LEN-1:0] q,
  output logic           so
);

  for (genvar i = 0; i < LEN; i++) begin : g_cell
    scan_cell u_cell (
      .clk (clk),
      .se  (se),
      .d   (d[i]),
      .si  ((i == 0) ? si : q[(i == 0) ? 0 : i-1]),
      .q   (q[i])
    );
  end

  assign so = q[LEN-1];

endmodule
