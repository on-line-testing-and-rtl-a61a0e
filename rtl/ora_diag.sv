// ora_diag: ORA with greater diagnostic resolution.
//
// Instead of one flip-flop for all compared pairs, the PAIRS output pairs are
// split into groups of GROUP pairs, and each group gets its own compare,
// latch and scan stage (an ora_scan_cell). The stages form a chain: scan_in
// enters stage 0 and scan_out leaves the last stage, so the failing group is
// known after scan-out. GROUP = 1 locates the failing output; GROUP = 2 is the
// two-pairs-per-flip-flop case of logic blocks with fewer flip-flops.
// fail[g] is the latched result of group g. Timing as ora_scan_cell.
//
// Following the document, resolution is traded for more result bits to scan
// out (PAIRS/GROUP instead of one). PAIRS must be a multiple of GROUP.
module ora_diag #(
  parameter int unsigned PAIRS = 4,
  parameter int unsigned GROUP = 1,
  localparam int unsigned NFF  = PAIRS / GROUP
) (
  input  logic             clk,
  input  logic             bist_rst,
  input  logic             scan_mode,
  input  logic             scan_in,
  input  logic [PAIRS-1:0] a,
  input  logic [PAIRS-1:0] b,
  output logic [NFF-1:0]   fail,
  output logic             scan_out
);

  initial assert (PAIRS % GROUP == 0) else $error("PAIRS must be a multiple of GROUP");

  for (genvar g = 0; g < NFF; g++) begin : g_cell
    ora_scan_cell #(.PAIRS(GROUP)) u_cell (
      .clk       (clk),
      .bist_rst  (bist_rst),
      .scan_mode (scan_mode),
      .scan_in   ((g == 0) ? scan_in : fail[(g == 0) ? 0 : g-1]),
      .a         (a[g*GROUP +: GROUP]),
      .b         (b[g*GROUP +: GROUP]),
      .pass_fail (fail[g])
    );
  end

  assign scan_out = fail[NFF-1];

endmodule
