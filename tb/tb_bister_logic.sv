// tb_bister_logic: runs complete logic BIST phases on a BISTER and two PLB BUTs.
// For each phase both BUTs get a configuration; in fault-free phases they get
// the same one and the ORA must pass, in faulty phases one BUT gets an
// emulated fault (a flipped LUT cell_i, the opposite clock edge, a latch in
// place of a flip-flop, a wrong RAM read mode) and the ORA must fail. Checks
// the phase length (4096 cycles for the counter TPG, 160 for the march TPG)
// and reads each result through the scan path. A second BISTER with the
// grouped ORA (two output pairs per flip-flop, three flip-flops) watches the
// same BUTs; its three bits, shifted out, must equal per-group mismatch flags
// the testbench accumulates itself from the BUT outputs.
module tb_bister_logic;
  import star_pkg::*;
  logic tck = 1'b0, bist_rst = 1'b1, scan_mode = 1'b0, scan_in = 1'b0, cfg_load = 1'b0;
  plb_cfg_t but_cfg [2];
  tpg_sel_e tpg_sel;
  logic pass_fail, done;
  int checks = 0, failures = 0;
  int n_pass = 0, n_fail = 0;

  logic [3:0] pat_a, pat_b, pat_ctl;
  logic [PLB_OUTS-1:0] but_out0, but_out1;

  bister_logic dut (.tck, .bist_rst, .scan_mode, .scan_in, .tpg_sel, .pat_a, .pat_b, .pat_ctl,
                    .but_out0, .but_out1, .pass_fail, .done);

  logic [3:0] g_pat_a, g_pat_b, g_pat_ctl;
  logic g_pass_fail, g_done;
  bister_logic #(.ORA_GROUP(2)) dut_grouped (.tck, .bist_rst, .scan_mode, .scan_in, .tpg_sel,
                    .pat_a(g_pat_a), .pat_b(g_pat_b), .pat_ctl(g_pat_ctl),
                    .but_out0, .but_out1, .pass_fail(g_pass_fail), .done(g_done));

  // Reference for the grouped ORA: outputs {0,1}, {2,3} and {4}.
  logic [2:0] grp_ref;
  int n_group_fail = 0;
  always_ff @(posedge tck) begin
    if (bist_rst) grp_ref <= '0;
    else if (scan_mode) begin
      grp_ref[0] <= grp_ref[0] | (|(but_out0[1:0] ^ but_out1[1:0]));
      grp_ref[1] <= grp_ref[1] | (|(but_out0[3:2] ^ but_out1[3:2]));
      grp_ref[2] <= grp_ref[2] | (but_out0[4] ^ but_out1[4]);
    end
  end

  // The two BUTs sit outside the BISTER, as they do in the array.
  plb u_but0 (.clk(tck), .cfg_load, .cfg(but_cfg[0]), .a(pat_a), .b(pat_b), .ctl(pat_ctl),
              .out(but_out0));
  plb u_but1 (.clk(tck), .cfg_load, .cfg(but_cfg[1]), .a(pat_a), .b(pat_b), .ctl(pat_ctl),
              .out(but_out1));

  always #5 tck = ~tck;

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

  task automatic phase(input string name, input plb_cfg_t c0, input plb_cfg_t c1,
                       input tpg_sel_e sel, input bit expect_fail);
    int cyc, exp_len;
    but_cfg[0] = c0; but_cfg[1] = c1; tpg_sel = sel;
    scan_mode = 1'b0;
    @(negedge tck); cfg_load = 1'b1; bist_rst = 1'b1;
    @(negedge tck); cfg_load = 1'b0;
    @(negedge tck); bist_rst = 1'b0; scan_mode = 1'b1;
    cyc = 0;
    while (!done && cyc < 10000) begin @(negedge tck); cyc++; end
    exp_len = (sel == TPG_MARCH) ? 160 : 4096;
    check(cyc == exp_len, $sformatf("%s: phase length %0d", name, cyc));
    @(negedge tck);
    check(pass_fail == expect_fail, $sformatf("%s: result %0d expected %0d", name, pass_fail, expect_fail));
    check(g_done && (pat_a == g_pat_a) && (pat_b == g_pat_b) && (pat_ctl == g_pat_ctl),
          $sformatf("%s: both BISTERs in step", name));
    check((grp_ref != '0) == expect_fail, $sformatf("%s: reference groups %b", name, grp_ref));
    // read the results through the scan path: one shift brings in scan_in;
    // the grouped ORA shifts out group 2, then 1, then 0
    scan_mode = 1'b0; scan_in = 1'b1;
    begin
      logic [2:0] got;
      for (int k = 2; k >= 0; k--) begin
        got[k] = g_pass_fail;
        @(negedge tck);
        if (k == 2) check(pass_fail == 1'b1, $sformatf("%s: scan path shifts", name));
      end
      check(got == grp_ref, $sformatf("%s: grouped ORA %b expected %b", name, got, grp_ref));
      if (got != '0 && got != '1) n_group_fail++;
    end
    scan_in = 1'b0;
    if (expect_fail) n_fail++; else n_pass++;
  endtask

  initial begin
    plb_cfg_t c, f;
    repeat (2) @(negedge tck);

    // Scan-chain check configuration: differently configured BUTs must mismatch.
    c = mk(LM_LUT4); f = c; f.truth[2] = ~c.truth[2];
    phase("scan check", c, f, TPG_COUNT, 1'b1);

    // LUT modes, fault free and with one LUT cell_i flipped
    for (int i = 0; i < 3; i++) begin
      c = mk(LM_LUT4);
      phase("lut4 good", c, c, TPG_COUNT, 1'b0);
      begin
        int cell_i;
        cell_i = int'($urandom % 16);
        f = c; f.truth[i][cell_i] = ~c.truth[i][cell_i];
      end
      phase("lut4 stuck cell_i", c, f, TPG_COUNT, 1'b1);
    end
    c = mk(LM_LUT5);
    phase("lut5 good", c, c, TPG_COUNT, 1'b0);
    f = c; f.truth[3][7] ^= 1'b1;
    phase("lut5 stuck cell_i", c, f, TPG_COUNT, 1'b1);

    // Arithmetic modes
    c = mk(LM_ADDSUB);  phase("addsub good", c, c, TPG_COUNT, 1'b0);
    f = c; f.mode = LM_MULT; phase("addsub vs wrong function", c, f, TPG_COUNT, 1'b1);
    c = mk(LM_CMP_GE);  phase("cmp ge good", c, c, TPG_COUNT, 1'b0);
    c = mk(LM_CMP_NE);  phase("cmp ne good", c, c, TPG_COUNT, 1'b0);

    // Register modes: counter with falling-edge FF, asynchronous reset, active-low enable
    c = mk(LM_CNT_UPDN); c.out_reg = 4'hF; c.clk_inv = 1'b1; c.sr = SR_ASYNC_RESET; c.ce = CE_LOW;
    phase("counter good", c, c, TPG_COUNT, 1'b0);
    f = c; f.clk_inv = 1'b0;
    phase("counter wrong edge", c, f, TPG_COUNT, 1'b1);
    c = mk(LM_LUT4); c.out_reg = 4'hF; c.storage = ST_LATCH; c.sr = SR_SYNC_SET; c.dsel = D_PIN;
    phase("latch good", c, c, TPG_COUNT, 1'b0);
    f = c; f.storage = ST_FF;
    phase("latch acting as FF", c, f, TPG_COUNT, 1'b1);

    // RAM modes with the march TPG
    c = mk(LM_RAM_ASYNC); phase("ram async good", c, c, TPG_MARCH, 1'b0);
    f = c; f.mode = LM_RAM_SYNC; phase("ram read mode fault", c, f, TPG_MARCH, 1'b1);
    c = mk(LM_RAM_SYNC);  phase("ram sync good", c, c, TPG_MARCH, 1'b0);
    c = mk(LM_RAM_DP);    phase("ram dual port good", c, c, TPG_COUNT, 1'b0);

    check(n_pass > 0 && n_fail > 0, "both passing and failing phases seen");
    check(n_group_fail > 0, "grouped ORA narrowed a failure to some groups");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
