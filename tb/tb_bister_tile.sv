// tb_bister_tile: checks the rotating 3x2 tile and single-fault diagnosis.
// First, every one of the six floorplans must have two BUT sites that differ
// and an ORA site apart from both, and across the six every site must be a
// BUT exactly twice. Then, for a fault-free tile, all six rotations must
// pass. Then, for each site in turn, one emulated fault (flipped LUT bit,
// wrong clock edge or latch in place of flip-flop) is put in that site, all
// six rotations are run and read through the scan path: exactly the two
// rotations in which the site is a BUT must fail, and the site that is a BUT
// in exactly the failing rotations must be unique and be the faulty one.
// Then the same faults are run in the two combined sessions: in the session
// whose three BUTs include the faulty site, exactly the two ORAs observing it
// must fail and their common BUT must be the faulty site; the other session
// must pass. Then every pair of sites is given the same fault: a rotation
// in which both are BUTs cannot see it (their outputs agree), every rotation
// in which exactly one is a BUT must fail, so the pair is still detected.
// Every result is read as the tile's three scan bits.
module tb_bister_tile;
  import star_pkg::*;
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
    repeat (1200000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_but(int r, int s);
    return int'(TILE_3X2[r].but0) == s || int'(TILE_3X2[r].but1) == s;
  endfunction

  // One run: load, run to done, then shift the three ORA bits out
  // (ORA 0 first) and compare them with ora_fail.
  task automatic run(input int r, input bit comb, output logic [2:0] res);
    int cyc;
    logic [2:0] seen;
    rot = 3'(r); combined = comb;
    scan_mode = 1'b0;
    @(negedge tck); cfg_load = 1'b1; bist_rst = 1'b1;
    @(negedge tck); cfg_load = 1'b0;
    @(negedge tck); bist_rst = 1'b0; scan_mode = 1'b1;
    cyc = 0;
    while (!done && cyc < 10000) begin @(negedge tck); cyc++; end
    check(cyc == 4096, $sformatf("run %0d/%0d: length %0d", r, comb, cyc));
    @(negedge tck);
    scan_mode = 1'b0; scan_in = 1'b0;
    seen = ora_fail;
    for (int k = 0; k < 3; k++) begin
      res[k] = pass_fail;
      @(negedge tck);
    end
    check(res == seen, $sformatf("run %0d/%0d: scanned %b, ORAs held %b", r, comb, res, seen));
    check(ora_fail == '0, $sformatf("run %0d/%0d: chain refilled", r, comb));
  endtask

  task automatic run_rot(input int r, output bit fail);
    logic [2:0] res;
    run(r, 1'b0, res);
    check(res[2:1] == '0, $sformatf("rotation %0d: ORAs 1 and 2 idle", r + 1));
    fail = res[0];
  endtask

  // BUT sites compared by ORA k of combined session cs
  function automatic bit observes(int cs, int k, int s);
    return is_but(2 * k + cs, s);
  endfunction

  function automatic plb_cfg_t mk();
    plb_cfg_t c;
    c = '0;
    c.mode = LM_LUT4; c.storage = ST_FF; c.sr = SR_NONE; c.ce = CE_ALWAYS; c.dsel = D_LUT;
    c.out_reg = 4'b0101;
    for (int k = 0; k < 4; k++) c.truth[k] = 16'($urandom);
    return c;
  endfunction

  initial begin
    plb_cfg_t c, f;
    bit fail;
    logic [TILE_ROTS-1:0] failed;
    repeat (2) @(negedge tck);

    // floorplan table
    for (int s = 0; s < TILE_SITES; s++) begin
      int n;
      n = 0;
      for (int r = 0; r < TILE_ROTS; r++) n += int'(is_but(r, s));
      check(n == 2, $sformatf("site %0d is a BUT %0d times", s, n));
    end
    for (int r = 0; r < TILE_ROTS; r++) begin
      check(TILE_3X2[r].but0 != TILE_3X2[r].but1, $sformatf("rotation %0d: two BUTs", r + 1));
      check(!is_but(r, int'(TILE_3X2[r].ora)), $sformatf("rotation %0d: ORA is not a BUT", r + 1));
    end

    // fault-free tile
    c = mk();
    foreach (site_cfg[s]) site_cfg[s] = c;
    for (int r = 0; r < TILE_ROTS; r++) begin
      run_rot(r, fail);
      check(!fail, $sformatf("fault free, rotation %0d passes", r + 1));
    end

    // one faulty site at a time
    for (int fs = 0; fs < TILE_SITES; fs++) begin
      int found, nf;
      c = mk();
      f = c;
      case (fs % 3)
        0: begin
          int k, b;
          k = int'($urandom % 4); b = int'($urandom % 16);
          f.truth[k][b] = ~c.truth[k][b];
        end
        1: f.clk_inv = 1'b1;
        default: f.storage = ST_LATCH;
      endcase
      foreach (site_cfg[s]) site_cfg[s] = c;
      site_cfg[fs] = f;
      nf = 0;
      for (int r = 0; r < TILE_ROTS; r++) begin
        run_rot(r, fail);
        failed[r] = fail;
        nf += int'(fail);
        check(fail == is_but(r, fs),
              $sformatf("fault in site %0d, rotation %0d: fail=%0d", fs, r + 1, fail));
      end
      check(nf == 2, $sformatf("fault in site %0d detected %0d times", fs, nf));
      found = -1;
      for (int s = 0; s < TILE_SITES; s++) begin
        bit fits;
        fits = 1'b1;
        for (int r = 0; r < TILE_ROTS; r++) if (failed[r] != is_but(r, s)) fits = 1'b0;
        if (fits) begin
          check(found == -1, $sformatf("fault in site %0d: unique diagnosis", fs));
          found = s;
        end
      end
      check(found == fs, $sformatf("fault in site %0d diagnosed as site %0d", fs, found));

      // combined sessions
      for (int cs = 0; cs < 2; cs++) begin
        logic [2:0] res, want;
        int common;
        run(cs, 1'b1, res);
        for (int k = 0; k < 3; k++) want[k] = observes(cs, k, fs);
        check(res == want, $sformatf("fault in site %0d, combined session %0d: ORAs %b expected %b",
                                     fs, cs + 1, res, want));
        // Theorem 2: two failing ORAs locate their common BUT
        common = -1;
        if ($countones(res) == 2)
          for (int s = 0; s < TILE_SITES; s++) begin
            bit all;
            all = 1'b1;
            for (int k = 0; k < 3; k++) if (res[k] && !observes(cs, k, s)) all = 1'b0;
            if (all) common = s;
          end
        if (want != '0) check(common == fs, $sformatf("combined session %0d locates site %0d as %0d",
                                                     cs + 1, fs, common));
      end
    end

    // two faulty sites with functionally identical faults
    for (int a = 0; a < TILE_SITES; a++)
      for (int b = a + 1; b < TILE_SITES; b++) begin
        int nf;
        c = mk();
        f = c;
        f.truth[a % 4][b] = ~c.truth[a % 4][b];
        foreach (site_cfg[s]) site_cfg[s] = c;
        site_cfg[a] = f;
        site_cfg[b] = f;
        nf = 0;
        for (int r = 0; r < TILE_ROTS; r++) begin
          run_rot(r, fail);
          nf += int'(fail);
          check(fail == (is_but(r, a) ^ is_but(r, b)),
                $sformatf("identical faults in sites %0d and %0d, rotation %0d: fail=%0d", a, b, r + 1, fail));
        end
        check(nf >= 2, $sformatf("identical faults in sites %0d and %0d detected %0d times", a, b, nf));
      end

    // fault-free combined sessions
    c = mk();
    foreach (site_cfg[s]) site_cfg[s] = c;
    for (int cs = 0; cs < 2; cs++) begin
      logic [2:0] res;
      run(cs, 1'b1, res);
      check(res == '0, $sformatf("fault free, combined session %0d passes", cs + 1));
    end
    // every site is a BUT in exactly one combined session, observed by two ORAs
    for (int s = 0; s < TILE_SITES; s++) begin
      int n0, n1;
      n0 = 0; n1 = 0;
      for (int k = 0; k < 3; k++) begin n0 += int'(observes(0, k, s)); n1 += int'(observes(1, k, s)); end
      check((n0 == 2 && n1 == 0) || (n0 == 0 && n1 == 2),
            $sformatf("site %0d observed %0d/%0d times in the combined sessions", s, n0, n1));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
