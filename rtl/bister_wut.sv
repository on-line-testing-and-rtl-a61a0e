// bister_wut: BIST element for the programmable interconnect.
//
// A 2N-bit counter is the test pattern generator. Its low N bits drive both
// groups of wires under test (WUT group A and WUT group B) with the same
// pattern; its high N bits drive the busses lying next to the WUTs, so that
// across the 2^(2N) patterns every wire sees both values against every
// neighbour, which exposes shorts between and within the groups as well as
// opens and stuck wires. At the far end of the route the B group passes
// through a swapper that puts its wires back into the A group's order, and
// an ORA compares the two groups pairwise and latches any mismatch.
//
// The WUTs themselves are routing resources outside this block: wut_drv and
// adj_drv leave it, wut_a_rx and wut_b_rx come back. Everything runs on tck;
// bist_rst restarts the counter and clears the ORA; the counter steps while
// scan_mode is high and done rises after all 2^TW patterns (TW = 2N, or the
// grouped width below). The ORA samples
// the returned wires on the rising tck edge after the pattern changed, so the
// route may take up to one tck period. With scan_mode low the result shifts
// from scan_in to scan_out (= pass_fail).
//
// For wide busses the exhaustive set grows as 4^N, so K < N splits the N
// wires into groups of K. One group at a time gets the 2K-bit exhaustive
// patterns (low K bits on its wires, high K bits on their neighbours), while
// every other wire is held at a constant c and its neighbour at ~c. The
// counter is then 2K + GW + 1 bits wide: above the 2K pattern bits come GW
// bits selecting the group (a value past the last group repeats the last
// group) and, on top, c, so every group is run once with the others at 0 and
// once at 1. A short between a wire of the active group and any other wire
// or neighbour therefore still sees both values against each other. With
// K = N (the default) there is one group and the counter is the plain 2N
// bits.
//
// The counter split, the swapper on the B group, the comparison ORA and the
// K-wire grouping follow the document; N = 4 wires per group follows its
// bus-realignment drawing. The bit layout of the grouped counter and the
// choice of c and ~c for the idle wires are this design's own.
module bister_wut #(
  parameter int unsigned N  = 4,
  parameter int unsigned K  = N,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned G  = (K >= N) ? 1 : (N + K - 1) / K,
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1,
  localparam int unsigned TW = (G > 1) ? 2 * K + GW + 1 : 2 * N
) (
  input  logic                 tck,
  input  logic                 bist_rst,
  input  logic                 scan_mode,
  input  logic                 scan_in,
  input  logic [N-1:0][SW-1:0] swap_sel,
  output logic [N-1:0]         wut_drv,
  output logic [N-1:0]         adj_drv,
  input  logic [N-1:0]         wut_a_rx,
  input  logic [N-1:0]         wut_b_rx,
  output logic                 pass_fail,
  output logic                 done
);

  logic [TW-1:0]  pattern;
  logic [N-1:0]   b_aligned;

  tpg_counter #(.W(TW)) u_tpg (
    .clk      (tck),
    .bist_rst (bist_rst),
    .en       (scan_mode),
    .pattern  (pattern),
    .done     (done)
  );

  if (G == 1) begin : g_full
    assign wut_drv = pattern[N-1:0];
    assign adj_drv = pattern[2*N-1:N];
  end else begin : g_grouped
    logic [GW-1:0] gsel;
    logic          c;
    if (G == (1 << GW)) begin : g_pow2
      assign gsel = pattern[2*K +: GW];
    end else begin : g_clamp
      assign gsel = (int'(pattern[2*K +: GW]) < int'(G)) ? pattern[2*K +: GW] : GW'(G - 1);
    end
    assign c    = pattern[TW-1];
    always_comb begin
      for (int i = 0; i < N; i++) begin
        if (GW'(i / K) == gsel) begin
          wut_drv[i] = pattern[i % K];
          adj_drv[i] = pattern[K + i % K];
        end else begin
          wut_drv[i] = c;
          adj_drv[i] = ~c;
        end
      end
    end
  end

  swapper #(.N(N)) u_swap (
    .in  (wut_b_rx),
    .sel (swap_sel),
    .out (b_aligned)
  );

  ora_scan_cell #(.PAIRS(N)) u_ora (
    .clk       (tck),
    .bist_rst  (bist_rst),
    .scan_mode (scan_mode),
    .scan_in   (scan_in),
    .a         (wut_a_rx),
    .b         (b_aligned),
    .pass_fail (pass_fail)
  );

endmodule
