// bister_tile: a 3-by-2 tile of PLBs tested by rotating BISTER roles, in
// single configurations or in combined sessions.
//
// A BISTER tests only its BUTs, so the roles of the six PLBs of a tile are
// rotated through six configurations: in each, two PLBs are BUTs, one is the
// ORA and three form the TPG. Across the six configurations every PLB is a
// BUT twice, each time compared with a different PLB, which is what lets a
// single faulty PLB be detected twice and located uniquely from the set of
// failing configurations. star_pkg::TILE_3X2 holds the six floorplans.
//
// The BUTs of configurations 1, 3 and 5 are only ever compared among
// themselves, and so are those of 2, 4 and 6. A combined session tests one
// such group of three PLBs at once: three ORAs each compare one pair of the
// group, so every BUT is observed by two ORAs, and a BUT that fails shows at
// exactly the two ORAs that share it. Two combined sessions test the tile.
//
// Modes: combined = 0 runs configuration rot (0..5, the document's 1..6) and
// uses ORA 0 only; combined = 1 runs combined session rot[0] (0: the BUT
// pairs of configurations 1, 3, 5; 1: those of 2, 4, 6), ORA k comparing the
// pair of configuration 2k + rot[0] + 1. Every site receives the test
// patterns; site_cfg[s] is its configuration word. A configuration change is
// applied with cfg_load and followed by bist_rst, as a partial
// reconfiguration is followed by BIST Start/Reset.
//
// Scan path: scan_in -> ORA 2 -> ORA 1 -> ORA 0 -> pass_fail, so a tile
// always shifts out three result bits, ORA 0's first; ora_fail shows all
// three. Timing is that of bister_logic.
//
// The six floorplans and the two combined sessions are the document's. The
// site numbering and the ORA order are this design's own. The TPG and ORAs
// are modelled as logic (bister_logic, ora_scan_cell) instead of as the PLBs
// that hold them in the real array, so a site's fault shows only when the
// site is a BUT.
module bister_tile
  import star_pkg::*;
#(
  parameter int unsigned TPG_W = 12
) (
  input  logic     tck,
  input  logic     bist_rst,
  input  logic     scan_mode,
  input  logic     scan_in,
  input  logic     cfg_load,
  input  plb_cfg_t site_cfg [TILE_SITES],
  input  logic [2:0] rot,
  input  logic     combined,
  input  tpg_sel_e tpg_sel,
  output logic     pass_fail,
  output logic [2:0] ora_fail,
  output logic     done
);

  logic [3:0]          pat_a, pat_b, pat_ctl;
  logic [PLB_OUTS-1:0] site_out [TILE_SITES];
  logic [PLB_OUTS-1:0] cmp_a [3], cmp_b [3];
  tile_rot_t           pair [3];
  logic                o2_q, o1_q;

  for (genvar s = 0; s < TILE_SITES; s++) begin : g_site
    plb u_plb (
      .clk      (tck),
      .cfg_load (cfg_load),
      .cfg      (site_cfg[s]),
      .a        (pat_a),
      .b        (pat_b),
      .ctl      (pat_ctl),
      .out      (site_out[s])
    );
  end

  // Pair compared by each ORA.
  always_comb begin
    for (int k = 0; k < 3; k++) pair[k] = TILE_3X2[2 * k + int'(rot[0])];
    if (!combined) pair[0] = TILE_3X2[(rot < 3'(TILE_ROTS)) ? rot : 3'd0];
    for (int k = 0; k < 3; k++) begin
      cmp_a[k] = site_out[pair[k].but0];
      cmp_b[k] = site_out[pair[k].but1];
      // outside a combined session ORAs 1 and 2 compare nothing
      if (!combined && k != 0) begin cmp_a[k] = '0; cmp_b[k] = '0; end
    end
  end

  ora_scan_cell #(.PAIRS(PLB_OUTS)) u_ora2 (
    .clk       (tck),
    .bist_rst  (bist_rst),
    .scan_mode (scan_mode),
    .scan_in   (scan_in),
    .a         (cmp_a[2]),
    .b         (cmp_b[2]),
    .pass_fail (o2_q)
  );

  ora_scan_cell #(.PAIRS(PLB_OUTS)) u_ora1 (
    .clk       (tck),
    .bist_rst  (bist_rst),
    .scan_mode (scan_mode),
    .scan_in   (o2_q),
    .a         (cmp_a[1]),
    .b         (cmp_b[1]),
    .pass_fail (o1_q)
  );

  bister_logic #(.TPG_W(TPG_W)) u_bister (
    .tck       (tck),
    .bist_rst  (bist_rst),
    .scan_mode (scan_mode),
    .scan_in   (o1_q),
    .tpg_sel   (tpg_sel),
    .pat_a     (pat_a),
    .pat_b     (pat_b),
    .pat_ctl   (pat_ctl),
    .but_out0  (cmp_a[0]),
    .but_out1  (cmp_b[0]),
    .pass_fail (pass_fail),
    .done      (done)
  );

  assign ora_fail = {o2_q, o1_q, pass_fail};

  // The ORA sites are recorded in the floorplan table but have no separate model.
  logic unused_ora;
  assign unused_ora = ^{pair[0].ora, pair[1].ora, pair[2].ora};

endmodule
