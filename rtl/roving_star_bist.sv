// roving_star_bist: the self-testing area (STAR) of an FPGA under on-line
// test, with the clock and transfer logic used when the STAR roves.
//
// An FPGA under on-line test keeps running its application in most of the
// array while a narrow strip, the STAR, is taken off-line and tested; the
// strip then swaps places with the neighbouring working logic and so roves
// across the whole chip. This module holds what is configured into one STAR
// and what the test controller (TREC) uses around it:
//   * N_LOGIC tiles of 3x2 PLBs, each tested by one logic BISTER (TPG + two
//     PLBs under test + ORA) whose roles rotate through the six floorplans
//     selected by tile_rot, so that every PLB is a BUT twice. A two-column
//     STAR of a 20-row array holds 40 PLBs: six tiles take 36 and the
//     seventh takes the last four together with two PLBs of the sixth, which
//     are tested again (each tile models its own six sites, so those two
//     PLBs appear twice in the model); with
//     tile_combined set, each tile instead runs a combined session, three
//     BUTs compared pairwise by three ORAs;
//   * N_WUT interconnect BISTERs (2n-bit counter TPG + swapper + ORA), whose
//     wires under test are the routing outside this module;
//   * one scan chain through every ORA pass/fail flip-flop, read over the
//     four-wire bus (tck, bist_rst, scan_mode, scan_out) that links the
//     boundary-scan port to the STAR;
//   * the adaptive system clock, whose period TREC sets and which TREC stops
//     while logic is relocated;
//   * the transfer controller that copies RAM contents from a working block to
//     its new place in the STAR during relocation.
//
// Test flow (all on tck): load configurations with cfg_load; pulse bist_rst
// (BIST Start/Reset); hold scan_mode high until every done is high
// (2^TPG_W cycles for a counter-driven logic phase, 160 for a march phase,
// 2^(2*WUT_N) for interconnect); then hold scan_mode low and shift
// 3*N_LOGIC + N_WUT result bits out of scan_out. The first bit out is the last
// interconnect BISTER's; then come tile N_LOGIC-1's ORAs 0, 1, 2, and so on
// down to tile 0's. A 1 is a fail.
// All tiles use the same rotation; a test session is one rotation, and a
// PLB whose two sessions as a BUT both fail is the faulty one.
// The chain's input is tied low, so it fills with passes as it shifts.
//
// The structure follows the document; the numbers of BISTERs per STAR, the
// clock generator's word width and the RAM size are taken from its example
// device (ORCA 2C15A, 20x20 logic blocks, 16x4 LUT RAM) or are this design's
// own where it gives none. The document's ORCA STAR uses 4x2 tiles; their
// rotation table is not available, so the 3x2 rotation it also gives is used.
module roving_star_bist
  import star_pkg::*;
#(
  parameter int unsigned N_LOGIC = 7,
  parameter int unsigned N_WUT   = 2,
  parameter int unsigned WUT_N   = 4,
  parameter int unsigned TPG_W   = 12,
  parameter int unsigned CLK_PW  = 8,
  parameter int unsigned RAM_AW  = 4,
  parameter int unsigned RAM_DW  = 4,
  localparam int unsigned SW     = (WUT_N > 1) ? $clog2(WUT_N) : 1
) (
  // four-wire bus to the boundary-scan port
  input  logic                              tck,
  input  logic                              bist_rst,
  input  logic                              scan_mode,
  output logic                              scan_out,
  // configuration written by TREC
  input  logic                              cfg_load,
  input  plb_cfg_t                          site_cfg  [N_LOGIC][TILE_SITES],
  input  logic [2:0]                        tile_rot,
  input  logic                              tile_combined,
  input  tpg_sel_e                          tpg_sel   [N_LOGIC],
  input  logic [WUT_N-1:0][SW-1:0]          swap_sel  [N_WUT],
  output logic [N_LOGIC-1:0]                logic_done,
  output logic [2:0]                        logic_fail [N_LOGIC],
  // interconnect under test (routing outside the STAR's logic)
  output logic [WUT_N-1:0]                  wut_drv   [N_WUT],
  output logic [WUT_N-1:0]                  adj_drv   [N_WUT],
  input  logic [WUT_N-1:0]                  wut_a_rx  [N_WUT],
  input  logic [WUT_N-1:0]                  wut_b_rx  [N_WUT],
  output logic [N_WUT-1:0]                  wut_done,
  output logic [N_WUT-1:0]                  wut_fail,
  // adaptive system clock
  input  logic                              ref_clk,
  input  logic                              clk_rst,
  input  logic                              period_wr,
  input  logic [CLK_PW-1:0]                 period_in,
  input  logic                              sys_stop,
  output logic                              sys_clk,
  output logic                              sys_tick,
  output logic                              sys_stopped,
  output logic [CLK_PW-1:0]                 sys_period,
  // RAM state transfer during relocation (runs on tck)
  input  logic                              xfer_start,
  output logic                              xfer_src_re,
  output logic [RAM_AW-1:0]                 xfer_src_addr,
  input  logic [RAM_DW-1:0]                 xfer_src_rdata,
  output logic                              xfer_dst_we,
  output logic [RAM_AW-1:0]                 xfer_dst_addr,
  output logic [RAM_DW-1:0]                 xfer_dst_wdata,
  output logic                              xfer_busy,
  output logic                              xfer_done
);

  localparam int unsigned NCHAIN = N_LOGIC + N_WUT;

  // chain[i] is the scan input of stage i and chain[i+1] its scan output
  // (a tile is one stage of three flip-flops, a WUT BISTER one of one).
  logic [NCHAIN:0] chain;
  assign chain[0] = 1'b0;

  for (genvar i = 0; i < N_LOGIC; i++) begin : g_logic
    bister_tile #(.TPG_W(TPG_W)) u_tile (
      .tck       (tck),
      .bist_rst  (bist_rst),
      .scan_mode (scan_mode),
      .scan_in   (chain[i]),
      .cfg_load  (cfg_load),
      .site_cfg  (site_cfg[i]),
      .rot       (tile_rot),
      .combined  (tile_combined),
      .tpg_sel   (tpg_sel[i]),
      .pass_fail (chain[i+1]),
      .ora_fail  (logic_fail[i]),
      .done      (logic_done[i])
    );
  end

  for (genvar j = 0; j < N_WUT; j++) begin : g_wut
    bister_wut #(.N(WUT_N)) u_bister (
      .tck       (tck),
      .bist_rst  (bist_rst),
      .scan_mode (scan_mode),
      .scan_in   (chain[N_LOGIC+j]),
      .swap_sel  (swap_sel[j]),
      .wut_drv   (wut_drv[j]),
      .adj_drv   (adj_drv[j]),
      .wut_a_rx  (wut_a_rx[j]),
      .wut_b_rx  (wut_b_rx[j]),
      .pass_fail (chain[N_LOGIC+j+1]),
      .done      (wut_done[j])
    );
    assign wut_fail[j] = chain[N_LOGIC+j+1];
  end

  assign scan_out = chain[NCHAIN];

  adaptive_clock #(.PW(CLK_PW)) u_clk (
    .ref_clk   (ref_clk),
    .rst       (clk_rst),
    .period_wr (period_wr),
    .period_in (period_in),
    .stop      (sys_stop),
    .sys_clk   (sys_clk),
    .sys_tick  (sys_tick),
    .stopped   (sys_stopped),
    .period    (sys_period)
  );

  transfer_controller #(.AW(RAM_AW), .DW(RAM_DW), .SRC_LAT(0)) u_xfer (
    .clk       (tck),
    .rst       (bist_rst),
    .start     (xfer_start),
    .src_re    (xfer_src_re),
    .src_addr  (xfer_src_addr),
    .src_rdata (xfer_src_rdata),
    .dst_we    (xfer_dst_we),
    .dst_addr  (xfer_dst_addr),
    .dst_wdata (xfer_dst_wdata),
    .busy      (xfer_busy),
    .done      (xfer_done)
  );

endmodule
