// tb_logic_phases: the complete logic test of one 3x2 tile, as a STAR runs
// it. For each of the six rotations the tile is put through fifteen phases:
// phase 0 checks the scan path (every PLB gets a different configuration, so
// the ORA must fail), and phases 1..14 are the PLB modes of the ORCA 2C/2CA
// phase list:
//    1 asynchronous RAM          8 FF, sync reset, rising edge, PLB-pin data,
//    2 adder/subtracter            4-input LUTs
//    3 5-input multiplexer       9 latch, active-high clock, active-low enable,
//    4 5-input XOR                 dynamically selected data
//    5 FF, async reset, falling 10 multiplier
//      edge, active-low enable, 11 a >= b comparator
//      LUT data, count up       12 a != b comparator
//    6 FF, async set, falling   13 synchronous RAM
//      edge, PLB-pin data,      14 dual-port RAM
//      count up/down
//    7 latch, sync set, active-low clock, active-high enable, count down
// The RAM phases 1 and 13 use the march generator, the rest the 12-bit
// counter. Each result is read through the scan path.
//
// Run A, fault-free tile: phase 0 must fail and phases 1..14 must pass in
// every rotation. Run B, one PLB with a defect in the clock path shared by
// its flip-flops (wrong clock polarity, clock enable ignored; the kind of
// fault seen in a device whose PLB failed only its FF phases). A latch's
// clock polarity alone cannot be seen here, since the patterns change on the
// edge on which the ORA samples. Exactly phases 5..9 must fail, and only in the two
// rotations in which that PLB is a BUT; the PLB must then be located from
// the failing rotations, and classed as still usable for LUT and RAM work
// because all its LUT/RAM phases passed.
//
// Run C, the additional diagnostic phases on the located PLB, in one
// floorplan where it is a BUT (first on a fault-free tile, where all must
// pass): phases 1..4 route each register bit to its output (latch, active
// high, always enabled, PLB-pin data) and phases 5..8 each LUT output, to
// test the output multiplexer; phases 9..12 test the register as FFs and
// 13..16 as latches, each with its own set/reset, clock and enable options.
// With the defect above, 1..8 must pass and 9..16 fail: the fault lies in
// the register, and the LUTs and output multiplexer are fault free.
module tb_logic_phases;
  import star_pkg::*;
  localparam int NPH = 15;

  logic tck = 1'b0, bist_rst = 1'b1, scan_mode = 1'b0, scan_in = 1'b0, cfg_load = 1'b0;
  plb_cfg_t site_cfg [TILE_SITES];
  logic [2:0] rot = '0;
  tpg_sel_e tpg_sel = TPG_COUNT;
  logic combined = 1'b0;
  logic pass_fail, done;
  logic [2:0] ora_fail;
  int checks = 0, failures = 0;

  bister_tile dut (.tck, .bist_rst, .scan_mode, .scan_in, .cfg_load, .site_cfg, .rot, .combined,
                   .tpg_sel, .pass_fail, .ora_fail, .done);

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (1800000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_but(int r, int s);
    return int'(TILE_3X2[r].but0) == s || int'(TILE_3X2[r].but1) == s;
  endfunction

  // Configuration of the BUTs for phase p (1..14).
  function automatic plb_cfg_t phase_cfg(int p, output tpg_sel_e sel);
    plb_cfg_t c;
    c = '0;
    c.storage = ST_FF; c.sr = SR_NONE; c.ce = CE_ALWAYS; c.dsel = D_LUT;
    for (int k = 0; k < 4; k++) c.truth[k] = 16'($urandom);
    sel = TPG_COUNT;
    case (p)
      1:  begin c.mode = LM_RAM_ASYNC; sel = TPG_MARCH; end
      2:  c.mode = LM_ADDSUB;
      3:  c.mode = LM_LUT5;
      4:  begin
            // a 5-input XOR: each LUT pair holds XOR4 and its complement
            c.mode = LM_LUT5;
            c.truth[0] = 16'h6996; c.truth[1] = 16'h9669;
            c.truth[2] = 16'h6996; c.truth[3] = 16'h9669;
          end
      5:  begin c.mode = LM_CNT_UP; c.sr = SR_ASYNC_RESET; c.clk_inv = 1'b1; c.ce = CE_LOW;
                c.dsel = D_LUT; c.out_reg = 4'hF; end
      6:  begin c.mode = LM_CNT_UPDN; c.sr = SR_ASYNC_SET; c.clk_inv = 1'b1; c.ce = CE_ALWAYS;
                c.dsel = D_PIN; c.out_reg = 4'hF; end
      7:  begin c.mode = LM_CNT_DOWN; c.storage = ST_LATCH; c.sr = SR_SYNC_SET; c.clk_inv = 1'b1;
                c.ce = CE_HIGH; c.dsel = D_LUT; c.out_reg = 4'hF; end
      8:  begin c.mode = LM_LUT4; c.sr = SR_SYNC_RESET; c.clk_inv = 1'b0; c.ce = CE_ALWAYS;
                c.dsel = D_PIN; c.out_reg = 4'hF; end
      9:  begin c.mode = LM_LUT4; c.storage = ST_LATCH; c.clk_inv = 1'b0; c.ce = CE_LOW;
                c.dsel = D_DYNAMIC; c.out_reg = 4'hF; end
      10: c.mode = LM_MULT;
      11: c.mode = LM_CMP_GE;
      12: c.mode = LM_CMP_NE;
      13: begin c.mode = LM_RAM_SYNC; sel = TPG_MARCH; end
      default: c.mode = LM_RAM_DP;
    endcase
    return c;
  endfunction

  // One phase of one rotation; returns the ORA result read through the scan path.
  task automatic run_phase(input int r, input int p, input int faulty_site, output bit fail);
    plb_cfg_t c, f;
    tpg_sel_e sel;
    int cyc, want_len;
    if (p == 0) begin
      c = phase_cfg(3, sel);
      foreach (site_cfg[s]) begin
        site_cfg[s] = c;
        site_cfg[s].truth[s % 4] = ~c.truth[s % 4] ^ 16'(s);
      end
    end else begin
      c = phase_cfg(p, sel);
      foreach (site_cfg[s]) site_cfg[s] = c;
      if (faulty_site >= 0) begin
        // the defect is in the clock path shared by the flip-flops: they
        // see the wrong clock polarity and ignore their clock enable
        f = c;
        if (c.out_reg != '0) begin f.clk_inv = ~c.clk_inv; f.ce = CE_ALWAYS; end
        site_cfg[faulty_site] = f;
      end
    end
    tpg_sel = sel;
    rot = 3'(r);
    scan_mode = 1'b0;
    @(negedge tck); cfg_load = 1'b1; bist_rst = 1'b1;
    @(negedge tck); cfg_load = 1'b0;
    @(negedge tck); bist_rst = 1'b0; scan_mode = 1'b1;
    cyc = 0;
    while (!done && cyc < 10000) begin @(negedge tck); cyc++; end
    want_len = (sel == TPG_MARCH) ? 160 : 4096;
    check(cyc == want_len, $sformatf("rotation %0d phase %0d: length %0d", r + 1, p, cyc));
    @(negedge tck);
    scan_mode = 1'b0; scan_in = 1'b0;
    fail = pass_fail;
    @(negedge tck);
    check(pass_fail == 1'b0, $sformatf("rotation %0d phase %0d: scan path", r + 1, p));
  endtask

  logic [NPH-1:0] res [TILE_ROTS];

  // Additional diagnostic phase p (1..16).
  function automatic plb_cfg_t diag_cfg(int p);
    plb_cfg_t c;
    c = '0;
    c.mode = LM_LUT4; c.storage = ST_FF; c.sr = SR_NONE; c.ce = CE_ALWAYS; c.dsel = D_PIN;
    for (int k = 0; k < 4; k++) c.truth[k] = 16'($urandom);
    case (p)
      1, 2, 3, 4: begin c.storage = ST_LATCH; c.clk_inv = 1'b0; c.out_reg = 4'(1 << (p - 1)); end
      5, 6, 7, 8: begin c.dsel = D_LUT; c.out_reg = '0; end
      9:  begin c.sr = SR_ASYNC_SET;  c.clk_inv = 1'b1; c.ce = CE_LOW;  end
      10: begin c.sr = SR_NONE;       c.clk_inv = 1'b0; c.ce = CE_ALWAYS; end
      11: begin c.sr = SR_SYNC_SET;   c.clk_inv = 1'b0; c.ce = CE_LOW;  end
      12: begin c.sr = SR_SYNC_RESET; c.clk_inv = 1'b1; c.ce = CE_HIGH; end
      13: begin c.storage = ST_LATCH; c.sr = SR_ASYNC_SET;   c.clk_inv = 1'b1; c.ce = CE_LOW;  end
      14: begin c.storage = ST_LATCH; c.sr = SR_ASYNC_RESET; c.clk_inv = 1'b0; c.ce = CE_HIGH; end
      15: begin c.storage = ST_LATCH; c.sr = SR_SYNC_SET;    c.clk_inv = 1'b0; c.ce = CE_LOW;  end
      default: begin c.storage = ST_LATCH; c.sr = SR_SYNC_RESET; c.clk_inv = 1'b1; c.ce = CE_HIGH; end
    endcase
    if (p >= 9) c.out_reg = 4'hF;
    return c;
  endfunction

  // One diagnostic phase in floorplan r; the defect as in run B.
  task automatic run_diag(input int r, input int p, input int faulty_site, output bit fail);
    plb_cfg_t c, f;
    int cyc;
    c = diag_cfg(p);
    foreach (site_cfg[s]) site_cfg[s] = c;
    if (faulty_site >= 0) begin
      f = c;
      if (c.out_reg != '0) begin f.clk_inv = ~c.clk_inv; f.ce = CE_ALWAYS; end
      site_cfg[faulty_site] = f;
    end
    tpg_sel = TPG_COUNT;
    rot = 3'(r);
    scan_mode = 1'b0;
    @(negedge tck); cfg_load = 1'b1; bist_rst = 1'b1;
    @(negedge tck); cfg_load = 1'b0;
    @(negedge tck); bist_rst = 1'b0; scan_mode = 1'b1;
    cyc = 0;
    while (!done && cyc < 10000) begin @(negedge tck); cyc++; end
    check(cyc == 4096, $sformatf("diagnostic phase %0d: length %0d", p, cyc));
    @(negedge tck);
    scan_mode = 1'b0;
    fail = pass_fail;
    @(negedge tck);
  endtask

  task automatic run_all(input int faulty_site);
    for (int r = 0; r < TILE_ROTS; r++)
      for (int p = 0; p < NPH; p++) begin
        bit fail;
        run_phase(r, p, faulty_site, fail);
        res[r][p] = fail;
      end
  endtask

  initial begin
    int fsite, found, n_rot;
    logic [NPH-1:0] ff_phases;
    ff_phases = '0;
    for (int p = 5; p <= 9; p++) ff_phases[p] = 1'b1;
    repeat (2) @(negedge tck);

    // Run A: fault-free tile
    run_all(-1);
    for (int r = 0; r < TILE_ROTS; r++)
      check(res[r] == NPH'(1), $sformatf("fault free, rotation %0d: failing phases %b", r + 1, res[r]));

    // Run B: one PLB with faulty flip-flops
    fsite = int'($urandom % TILE_SITES);
    run_all(fsite);
    n_rot = 0;
    for (int r = 0; r < TILE_ROTS; r++) begin
      logic [NPH-1:0] want;
      want = NPH'(1) | (is_but(r, fsite) ? ff_phases : '0);
      check(res[r] == want, $sformatf("faulty site %0d, rotation %0d: failing phases %b expected %b",
                                      fsite, r + 1, res[r], want));
      if (res[r][NPH-1:1] != '0) n_rot++;
    end
    check(n_rot == 2, $sformatf("faulty PLB seen in %0d rotations", n_rot));
    found = -1;
    for (int s = 0; s < TILE_SITES; s++) begin
      bit fits;
      fits = 1'b1;
      for (int r = 0; r < TILE_ROTS; r++) if ((res[r][NPH-1:1] != '0) != is_but(r, s)) fits = 1'b0;
      if (fits) begin
        check(found == -1, "diagnosis is unique");
        found = s;
      end
    end
    check(found == fsite, $sformatf("diagnosed site %0d, faulty site %0d", found, fsite));
    // partially usable: the failing phases are FF phases only
    for (int r = 0; r < TILE_ROTS; r++)
      check((res[r] & ~ff_phases & ~NPH'(1)) == '0,
            $sformatf("rotation %0d: no LUT/RAM phase failed", r + 1));
    $display("faulty site %0d located; failing phases 5..9 only: LUT/RAM module usable", found);

    // Run C: additional diagnostic phases in a floorplan where the PLB is a BUT
    begin
      int r_but;
      logic [16:1] dres_good, dres_bad;
      r_but = -1;
      for (int r = TILE_ROTS - 1; r >= 0; r--) if (is_but(r, fsite)) r_but = r;
      for (int p = 1; p <= 16; p++) begin
        bit fail;
        run_diag(r_but, p, -1, fail);
        dres_good[p] = fail;
        run_diag(r_but, p, fsite, fail);
        dres_bad[p] = fail;
      end
      check(dres_good == '0, $sformatf("diagnostic phases, fault free: failing %b", dres_good));
      check(dres_bad == 16'hFF00, $sformatf("diagnostic phases, faulty PLB: failing %b expected phases 9..16",
                                          dres_bad));
      if (dres_bad[8:1] == '0 && dres_bad[16:9] != '0)
        $display("site %0d: register faulty; LUTs and output multiplexer fault free", fsite);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
