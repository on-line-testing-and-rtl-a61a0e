// tb_roving_star_bist: end-to-end run of one STAR at the default sizes
// (seven 3x2 logic tiles, two interconnect BISTERs, 12-bit logic TPG).
//   1. scan-chain check: every ORA is set up to fail on purpose, and all
//      twenty-three result bits (three per tile, one per interconnect BISTER) must
//      shift out as fails;
//   2. a fault-free logic + interconnect session: all must pass;
//   3. sessions with emulated faults in a BUT of chosen tiles and in the
//      routing of chosen interconnect BISTERs: exactly those bits must fail;
//   3b. diagnosis: one faulty PLB in one tile, all six rotations run; exactly
//      the two rotations in which it is a BUT must fail in that tile, and the
//      PLB common to them must be the faulty one;
//   3c. the same fault in the two combined sessions: exactly the two ORAs
//      observing the faulty PLB fail, and their common BUT is that PLB;
//   4. a RAM-mode session with the march generator;
//   5. one roving step as the document orders it: configure the new
//      location, stop the system clock, copy RAM state with the transfer
//      controller, restart the clock, then slow the clock (new period) as
//      after a fault-bypassing reconfiguration.
// Each mechanism is counted and must happen at least once.
module tb_roving_star_bist;
  import star_pkg::*;
  localparam int NL = 7, NW = 2, WN = 4, PW = 8, NCH = 3 * NL + NW;

  logic tck = 1'b0, ref_clk = 1'b0;
  logic bist_rst = 1'b1, scan_mode = 1'b0, scan_out, cfg_load = 1'b0;
  plb_cfg_t site_cfg [NL][TILE_SITES];
  logic [2:0] tile_rot = '0;
  logic tile_combined = 1'b0;
  tpg_sel_e tpg_sel [NL];
  logic [WN-1:0][1:0] swap_sel [NW];
  logic [NL-1:0] logic_done;
  logic [2:0] logic_fail [NL];
  logic [WN-1:0] wut_drv [NW], adj_drv [NW], wut_a_rx [NW], wut_b_rx [NW];
  logic [NW-1:0] wut_done, wut_fail;
  logic clk_rst = 1'b1, period_wr = 1'b0, sys_stop = 1'b0;
  logic [PW-1:0] period_in = '0, sys_period;
  logic sys_clk, sys_tick, sys_stopped;
  logic xfer_start = 1'b0, xfer_src_re, xfer_dst_we, xfer_busy, xfer_done;
  logic [3:0] xfer_src_addr, xfer_dst_addr, xfer_src_rdata, xfer_dst_wdata;

  roving_star_bist dut (.*);

  int rot [NW], kind [NW], wi [NW], wj [NW];
  for (genvar j = 0; j < NW; j++) begin : g_route
    wut_route_model #(.N(WN)) route (.drv(wut_drv[j]), .adj(adj_drv[j]), .rot(rot[j]),
      .kind(kind[j]), .wi(wi[j]), .wj(wj[j]), .a_rx(wut_a_rx[j]), .b_rx(wut_b_rx[j]));
  end

  // Working-area RAM (runs on the system clock) and its new place in the STAR
  // (written by the transfer controller on the test clock).
  plb_cfg_t ram_cfg;
  logic [3:0] w_a, w_b, w_ctl, s_a, s_ctl;
  logic [4:0] w_out, s_out;
  logic       w_load = 1'b0, s_load = 1'b0;
  plb u_work (.clk(sys_clk), .cfg_load(w_load), .cfg(ram_cfg), .a(w_a), .b(w_b), .ctl(w_ctl), .out(w_out));
  plb u_star (.clk(tck), .cfg_load(s_load), .cfg(ram_cfg), .a(s_a), .b(xfer_dst_wdata), .ctl(s_ctl), .out(s_out));
  assign xfer_src_rdata = w_out[3:0];
  logic [3:0] s_rd_addr = '0;
  logic [3:0] w_sys_addr = '0;
  always_comb begin
    // the transfer controller's read address overrides the system's while it runs
    w_a   = xfer_src_re ? xfer_src_addr : w_sys_addr;
    s_a   = xfer_dst_we ? xfer_dst_addr : s_rd_addr;
    s_ctl = {2'b00, xfer_dst_we, 1'b0};
  end

  always #5 tck = ~tck;
  always #3 ref_clk = ~ref_clk;

  int checks = 0, failures = 0;
  int m_scan_check = 0, m_logic_pass = 0, m_logic_detect = 0, m_wut_pass = 0, m_wut_detect = 0;
  int m_diagnose = 0, m_combined = 0;
  int m_march = 0, m_swap = 0, m_clk_stop = 0, m_clk_retime = 0, m_ram_copy = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic plb_cfg_t mk(lut_mode_e m);
    plb_cfg_t c;
    c = '0;
    c.mode = m; c.storage = ST_FF; c.sr = SR_NONE; c.ce = CE_ALWAYS; c.dsel = D_LUT;
    for (int k = 0; k < 4; k++) c.truth[k] = 16'($urandom);
    return c;
  endfunction

  // Run one session and return the bits shifted out (index 0 = first out).
  task automatic session(input string name, output logic [NCH-1:0] shifted);
    int cyc, longest;
    scan_mode = 1'b0;
    @(negedge tck); cfg_load = 1'b1; bist_rst = 1'b1;
    @(negedge tck); cfg_load = 1'b0;
    @(negedge tck); bist_rst = 1'b0; scan_mode = 1'b1;
    cyc = 0;
    while (!((&logic_done) && (&wut_done)) && cyc < 20000) begin @(negedge tck); cyc++; end
    // the longest generator sets the session length: 2^12 logic patterns,
    // else 2^8 interconnect patterns (a march run is 160 operations)
    longest = 1 << (2 * WN);
    foreach (tpg_sel[i]) if (tpg_sel[i] == TPG_COUNT) longest = 1 << 12;
    check(cyc == longest, $sformatf("%s: session length %0d expected %0d", name, cyc, longest));
    @(negedge tck);
    scan_mode = 1'b0;
    for (int s = 0; s < NCH; s++) begin
      shifted[s] = scan_out;
      @(negedge tck);
    end
    check(scan_out == 1'b0, $sformatf("%s: chain refilled with passes", name));
  endtask

  // Position in the shifted-out bits of ORA k of tile i: the last WUT
  // BISTER comes first, then the tiles from the last down, ORA 0 first.
  function automatic int tile_bit(int i, int k);
    return NW + 3 * (NL - 1 - i) + k;
  endfunction

  // Expected shift order for single configurations (only ORA 0 of a tile in use).
  function automatic logic [NCH-1:0] order(input logic [NL-1:0] lf, input logic [NW-1:0] wf);
    logic [NCH-1:0] o;
    o = '0;
    for (int j = 0; j < NW; j++) o[j] = wf[NW-1-j];
    for (int i = 0; i < NL; i++) o[tile_bit(i, 0)] = lf[i];
    return o;
  endfunction

  function automatic bit chain_clear();
    bit ok;
    ok = (wut_fail == '0);
    foreach (logic_fail[i]) if (logic_fail[i] != '0) ok = 1'b0;
    return ok;
  endfunction

  task automatic set_logic(input logic [NL-1:0] faulty, input lut_mode_e m, input tpg_sel_e sel);
    for (int i = 0; i < NL; i++) begin
      plb_cfg_t c;
      c = mk(m);
      if (m == LM_CNT_UPDN) begin c.out_reg = 4'hF; c.clk_inv = 1'b1; end
      for (int s = 0; s < TILE_SITES; s++) site_cfg[i][s] = c;
      tpg_sel[i] = sel;
      if (faulty[i]) begin
        // the fault is placed in a BUT of the current rotation, alternating
        // between the first and the second BUT
        int fs;
        fs = (i % 2 == 1) ? int'(TILE_3X2[tile_rot].but1) : int'(TILE_3X2[tile_rot].but0);
        site_cfg[i][fs] = faulted(c, m, sel, i);
      end
    end
  endtask

  function automatic plb_cfg_t faulted(plb_cfg_t c, lut_mode_e m, tpg_sel_e sel, int i);
    plb_cfg_t f;
    f = c;
    if (sel == TPG_MARCH) f.mode = (m == LM_RAM_SYNC) ? LM_RAM_ASYNC : LM_RAM_SYNC;
    else if (m == LM_CNT_UPDN) f.clk_inv = 1'b0;
    else f.truth[i % 4][(3 * i) % 16] = ~c.truth[i % 4][(3 * i) % 16];
    return f;
  endfunction

  task automatic set_wut(input logic [NW-1:0] faulty, input int fault_kind);
    for (int j = 0; j < NW; j++) begin
      rot[j] = (j + 1) % WN;
      for (int o = 0; o < WN; o++) swap_sel[j][o] = 2'((o + rot[j]) % WN);
      kind[j] = faulty[j] ? fault_kind : 0; wi[j] = j; wj[j] = (j + 1) % WN;
    end
  endtask

  task automatic tally(input logic [NL-1:0] lf, input logic [NW-1:0] wf, input logic [NCH-1:0] got,
                       input string name);
    check(got == order(lf, wf), $sformatf("%s: scan-out %b expected %b", name, got, order(lf, wf)));
    check(chain_clear(), $sformatf("%s: chain clear after shift", name));
    for (int i = 0; i < NL; i++) if (lf[i]) m_logic_detect++; else m_logic_pass++;
    for (int j = 0; j < NW; j++) begin
      if (wf[j]) m_wut_detect++; else m_wut_pass++;
      if (rot[j] != 0) m_swap++;
    end
  endtask

  initial begin
    logic [NCH-1:0] got;
    logic [NL-1:0] lf;
    logic [NW-1:0] wf;
    int t_edges;

    repeat (3) @(negedge tck);
    clk_rst = 1'b0;

    // 1. scan-chain check: every ORA fails on purpose (combined sessions, with
    //    all six PLBs of every tile configured differently)
    set_logic('0, LM_LUT4, TPG_COUNT);
    for (int i = 0; i < NL; i++)
      for (int s = 0; s < TILE_SITES; s++) site_cfg[i][s].truth[s % 4] ^= 16'(1 << s);
    set_wut('1, 2);
    tile_combined = 1'b1;
    session("scan check", got);
    tile_combined = 1'b0;
    check(got == '1, $sformatf("scan check: all results read as fail (%b)", got));
    if (got == '1) m_scan_check++;

    // 2. fault-free session
    set_logic('0, LM_LUT4, TPG_COUNT);
    set_wut('0, 0);
    session("fault free", got);
    tally('0, '0, got, "fault free");

    // 3. sessions with emulated faults
    for (int t = 0; t < 4; t++) begin
      lf = NL'($urandom); wf = NW'($urandom);
      tile_rot = 3'(t);
      set_logic(lf, (t % 2 == 1) ? LM_CNT_UPDN : LM_LUT4, TPG_COUNT);
      set_wut(wf, 4 + t);
      session($sformatf("faults %0d", t), got);
      tally(lf, wf, got, $sformatf("faults %0d", t));
    end

    // 3b. diagnosis of one faulty PLB by rotating the tile roles
    begin
      int ft, fsite, n_fail_rot, found;
      logic [TILE_ROTS-1:0] failed;
      plb_cfg_t c;
      ft = int'($urandom % NL); fsite = int'($urandom % TILE_SITES);
      c = mk(LM_LUT4);
      set_wut('0, 0);
      for (int r = 0; r < TILE_ROTS; r++) begin
        logic [NL-1:0] want;
        tile_rot = 3'(r);
        for (int i = 0; i < NL; i++) begin
          for (int s = 0; s < TILE_SITES; s++) site_cfg[i][s] = c;
          tpg_sel[i] = TPG_COUNT;
        end
        site_cfg[ft][fsite] = faulted(c, LM_LUT4, TPG_COUNT, 1);
        want = '0;
        want[ft] = (int'(TILE_3X2[r].but0) == fsite) || (int'(TILE_3X2[r].but1) == fsite);
        session($sformatf("rotation %0d", r + 1), got);
        tally(want, '0, got, $sformatf("rotation %0d", r + 1));
        failed[r] = got[tile_bit(ft, 0)];
      end
      n_fail_rot = 0;
      for (int r = 0; r < TILE_ROTS; r++) n_fail_rot += int'(failed[r]);
      check(n_fail_rot == 2, $sformatf("faulty PLB failed %0d rotations, expected 2", n_fail_rot));
      // locate: the only site that is a BUT in every failing rotation and in no passing one
      found = -1;
      for (int s = 0; s < TILE_SITES; s++) begin
        bit fits;
        fits = 1'b1;
        for (int r = 0; r < TILE_ROTS; r++)
          if (failed[r] != ((int'(TILE_3X2[r].but0) == s) || (int'(TILE_3X2[r].but1) == s))) fits = 1'b0;
        if (fits) begin
          check(found == -1, "diagnosis is unique");
          found = s;
        end
      end
      check(found == fsite, $sformatf("diagnosed site %0d, fault in site %0d", found, fsite));
      if (found == fsite) m_diagnose++;
      tile_rot = '0;

      // 3c. the same fault in the two combined sessions (Theorem 2)
      tile_combined = 1'b1;
      for (int cs = 0; cs < 2; cs++) begin
        logic [NCH-1:0] want;
        int common, nfail;
        tile_rot = 3'(cs);
        want = '0;
        for (int k = 0; k < 3; k++) begin
          tile_rot_t pr;
          pr = TILE_3X2[2 * k + cs];
          want[tile_bit(ft, k)] = (int'(pr.but0) == fsite) || (int'(pr.but1) == fsite);
        end
        session($sformatf("combined session %0d", cs + 1), got);
        check(got == want, $sformatf("combined session %0d: scan-out %b expected %b", cs + 1, got, want));
        check(chain_clear(), "combined session: chain clear after shift");
        nfail = 0;
        for (int k = 0; k < 3; k++) nfail += int'(got[tile_bit(ft, k)]);
        common = -1;
        if (nfail == 2)
          for (int s = 0; s < TILE_SITES; s++) begin
            bit all;
            all = 1'b1;
            for (int k = 0; k < 3; k++)
              if (got[tile_bit(ft, k)] && !(int'(TILE_3X2[2 * k + cs].but0) == s ||
                                             int'(TILE_3X2[2 * k + cs].but1) == s)) all = 1'b0;
            if (all) common = s;
          end
        if (want != '0) begin
          check(common == fsite, $sformatf("combined session %0d located site %0d, fault in %0d",
                                           cs + 1, common, fsite));
          if (common == fsite) m_combined++;
        end
      end
      tile_combined = 1'b0;
      tile_rot = '0;
    end

    // 4. RAM modes with the march generator
    lf = NL'(4);
    set_logic(lf, LM_RAM_ASYNC, TPG_MARCH);
    set_wut('0, 0);
    session("march", got);
    tally(lf, '0, got, "march");
    m_march++;

    // 5. one roving step
    // the working RAM runs on the system clock, with data written by the system
    ram_cfg = mk(LM_RAM_ASYNC);
    @(negedge tck); w_load = 1'b1; w_ctl = '0;
    @(posedge sys_clk); @(negedge sys_clk); w_load = 1'b0;
    begin
      logic [3:0] img [16];
      for (int w = 0; w < 16; w++) begin
        img[w] = 4'($urandom);
        w_sys_addr = 4'(w); w_b = img[w]; w_ctl = 4'b0010;
        @(posedge sys_clk); #1;
      end
      w_ctl = '0;
      // (1) configure the new location
      @(negedge tck); s_load = 1'b1; @(negedge tck); s_load = 1'b0;
      // (2) stop the system clock
      sys_stop = 1'b1;
      while (!sys_stopped) @(negedge ref_clk);
      t_edges = 0;
      fork
        begin : count_edges forever begin @(posedge sys_clk); t_edges++; end end
      join_none
      // (3) copy the RAM state on the test clock
      @(negedge tck); xfer_start = 1'b1; @(negedge tck); xfer_start = 1'b0;
      begin
        int cyc;
        cyc = 0;
        while (!xfer_done && cyc < 100) begin @(negedge tck); cyc++; end
        check(cyc == 16, $sformatf("RAM copy took %0d test clocks", cyc));
      end
      check(t_edges == 0, "system clock stayed stopped during the copy");
      disable fork;
      if (t_edges == 0) m_clk_stop++;
      for (int w = 0; w < 16; w++) begin
        s_rd_addr = 4'(w); #1;
        check(s_out[3:0] == img[w], $sformatf("word %0d relocated", w));
      end
      m_ram_copy++;
      // (5) restart the system clock
      sys_stop = 1'b0;
      repeat (20) @(negedge ref_clk);
      check(!sys_stopped, "system clock restarted");
    end

    // after a fault-bypassing reconfiguration the clock is slowed
    begin
      time t0, t1;
      @(negedge ref_clk); period_wr = 1'b1; period_in = 9;
      @(negedge ref_clk); period_wr = 1'b0;
      repeat (3) @(posedge sys_clk);
      t0 = $time; @(posedge sys_clk); t1 = $time;
      check(t1 - t0 == 9 * 6, $sformatf("new system clock period %0t", t1 - t0));
      check(sys_period == 9, "period register");
      if (t1 - t0 == 9 * 6) m_clk_retime++;
    end

    $display("mechanisms: diagnose=%0d combined=%0d", m_diagnose, m_combined);
    $display("mechanisms: scan_check=%0d logic_pass=%0d logic_detect=%0d wut_pass=%0d wut_detect=%0d swap=%0d march=%0d clk_stop=%0d ram_copy=%0d clk_retime=%0d",
             m_scan_check, m_logic_pass, m_logic_detect, m_wut_pass, m_wut_detect, m_swap, m_march,
             m_clk_stop, m_ram_copy, m_clk_retime);
    check(m_scan_check > 0, "scan-chain check happened");
    check(m_logic_pass > 0, "passing logic BISTER seen");
    check(m_logic_detect > 0, "logic fault detected");
    check(m_wut_pass > 0, "passing interconnect BISTER seen");
    check(m_wut_detect > 0, "interconnect fault detected");
    check(m_swap > 0, "swapper realignment used");
    check(m_march > 0, "march phase run");
    check(m_diagnose > 0, "faulty PLB located by rotation");
    check(m_combined > 0, "faulty PLB located by a combined session");
    check(m_clk_stop > 0, "system clock stop");
    check(m_ram_copy > 0, "RAM state transfer");
    check(m_clk_retime > 0, "clock period change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
