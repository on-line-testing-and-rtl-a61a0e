// swapper: programmable realignment of a bus of wires under test.
//
// A combinational cell that maps its N inputs onto its N outputs in any
// configured order, so that the signals of one WUT group arrive at the ORA
// inputs where they meet their partners from the other group. It undoes bus
// rotations along the route and suits the ORA's input constraints.
// sel[i] names the input driven onto output i (out[i] = in[sel[i]]); sel is
// configuration and is constant during a test phase. Purely combinational.
//
// The document gives the function (a logic block programmed as a mapping);
// the select-per-output encoding is this design's own.
module swapper #(
  parameter int unsigned N  = 4,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]         in,
  input  logic [N-1:0][SW-1:0] sel,
  output logic [N-1:0]         out
);

  for (genvar i = 0; i < N; i++) begin : g_map
    assign out[i] = in[sel[i]];
  end

endmodule
