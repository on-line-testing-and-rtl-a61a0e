// tb_plb: self-checking test of the PLB model in each mode of operation.
// Combinational modes are swept exhaustively over their inputs and compared
// with arithmetic written out here; RAM, counter and register modes are
// driven with explicit clock edges and compared with expected values.
module tb_plb;
  import star_pkg::*;

  logic       clk = 1'b0;
  logic       cfg_load = 1'b0;
  plb_cfg_t   cfg;
  logic [3:0] a, b, ctl;
  logic [4:0] out;
  int checks = 0, failures = 0;

  plb dut (.clk, .cfg_load, .cfg, .a, .b, .ctl, .out);

  task automatic check(input logic [4:0] got, input logic [4:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  task automatic pulse();
    #1 clk = 1'b1; #1 clk = 1'b0; #1;
  endtask

  task automatic load(input plb_cfg_t c);
    cfg = c; a = '0; b = '0; ctl = '0;
    cfg_load = 1'b1; pulse(); cfg_load = 1'b0; #1;
  endtask

  function automatic plb_cfg_t base_cfg(lut_mode_e m);
    plb_cfg_t c;
    c = '0;
    c.mode = m;
    c.storage = ST_FF; c.sr = SR_NONE; c.ce = CE_ALWAYS; c.dsel = D_LUT;
    return c;
  endfunction

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    plb_cfg_t c;
    logic [4:0] e;
    logic [3:0] q;

    // LUT4: four random truth tables
    c = base_cfg(LM_LUT4);
    for (int k = 0; k < 4; k++) c.truth[k] = 16'($urandom);
    load(c);
    for (int i = 0; i < 256; i++) begin
      a = i[3:0]; b = i[7:4]; ctl = 4'($urandom); #1;
      e = {1'b0, c.truth[3][b], c.truth[2][b], c.truth[1][a], c.truth[0][a]};
      check(out, e, "lut4");
    end

    // LUT5: 5-variable multiplexed functions
    c = base_cfg(LM_LUT5);
    for (int k = 0; k < 4; k++) c.truth[k] = 16'($urandom);
    load(c);
    for (int i = 0; i < 512; i++) begin
      a = i[3:0]; b = i[7:4]; ctl = {3'b0, i[8]}; #1;
      e[0] = i[8] ? c.truth[1][a] : c.truth[0][a];
      e[1] = c.truth[1][a] ^ c.truth[0][a];
      e[2] = i[8] ? c.truth[3][b] : c.truth[2][b];
      e[3] = c.truth[3][b] ^ c.truth[2][b];
      e[4] = 1'b0;
      check(out, e, "lut5");
    end

    // Arithmetic and comparator modes, exhaustive over a, b, ctl[1:0]
    for (int m = 0; m < 4; m++) begin
      lut_mode_e mm;
      mm = (m == 0) ? LM_ADDSUB : (m == 1) ? LM_MULT : (m == 2) ? LM_CMP_GE : LM_CMP_NE;
      load(base_cfg(mm));
      for (int i = 0; i < 1024; i++) begin
        int ia, ib, ic, isub, r;
        ia = i & 15; ib = (i >> 4) & 15; ic = (i >> 8) & 1; isub = (i >> 9) & 1;
        a = 4'(ia); b = 4'(ib); ctl = {2'b00, 1'(isub), 1'(ic)}; #1;
        case (m)
          0: r = isub ? (ia + (15 - ib) + ic) : (ia + ib + ic);
          1: r = (ic ? ia : 0) + ib;
          2: r = ((ia >= ib) ? 16 : 0) + ((ia - ib) & 15);
          default: r = ((ia != ib) ? 16 : 0) + (ia ^ ib);
        endcase
        check(out, 5'(r), mm.name());
      end
    end

    // Asynchronous-read RAM: write a random image, read it back
    begin
      logic [3:0] img [16];
      c = base_cfg(LM_RAM_ASYNC);
      load(c);
      for (int w = 0; w < 16; w++) begin
        img[w] = 4'($urandom);
        a = 4'(w); b = img[w]; ctl = 4'b0010; pulse();
      end
      ctl = 4'b0000;
      for (int w = 0; w < 16; w++) begin
        a = 4'(w); b = 4'($urandom); #1;
        check(out, {1'b0, img[w]}, "ram_async read");
      end
      // synchronous RAM: data only after the clock edge
      c = base_cfg(LM_RAM_SYNC);
      load(c);
      for (int w = 0; w < 16; w++) begin
        img[w] = 4'($urandom);
        a = 4'(w); b = img[w]; ctl = 4'b0010; pulse();
      end
      ctl = 4'b0000;
      for (int w = 0; w < 16; w++) begin
        a = 4'(w); pulse();
        check(out, {1'b0, img[w]}, "ram_sync read");
      end
      // dual-port: write port a, read port b
      c = base_cfg(LM_RAM_DP);
      load(c);
      for (int w = 0; w < 16; w++) begin
        img[w] = {2'b00, 2'($urandom)};
        a = 4'(w); ctl = {img[w][1], 1'b0, 1'b1, img[w][0]}; pulse();
      end
      ctl = 4'b0000;
      for (int w = 0; w < 16; w++) begin
        a = 4'(15 - w); b = 4'(w); #1;
        check({1'b0, out[3:2]}, {3'b0, img[w][1:0]}, "ram_dp port b");
        check({1'b0, out[1:0]}, {3'b0, img[15-w][1:0]}, "ram_dp port a");
      end
    end

    // Counters in the register (outputs from the register)
    c = base_cfg(LM_CNT_UP); c.out_reg = 4'hF;
    load(c);
    q = 4'd0;
    for (int i = 0; i < 20; i++) begin
      pulse(); q = q + 1'b1;
      check(out[3:0], q, "count up");
    end
    c = base_cfg(LM_CNT_UPDN); c.out_reg = 4'hF; c.ce = CE_LOW;
    load(c);
    q = 4'd0;
    for (int i = 0; i < 40; i++) begin
      ctl = {1'b0, 1'($urandom), 1'($urandom), 1'b0};
      #1;
      pulse();
      if (!ctl[2]) q = ctl[1] ? q - 1'b1 : q + 1'b1;
      check(out[3:0], q, "count up/down with active-low enable");
    end

    // Falling-edge FF with PLB-input data: nothing on the rising edge
    c = base_cfg(LM_LUT4); c.out_reg = 4'hF; c.dsel = D_PIN; c.clk_inv = 1'b1;
    load(c);
    b = 4'hA; #1 clk = 1'b1; #1;
    check(out[3:0], 4'h0, "falling-edge FF holds at rising edge");
    clk = 1'b0; #1;
    check(out[3:0], 4'hA, "falling-edge FF captures at falling edge");

    // Asynchronous reset: clears without a clock
    c = base_cfg(LM_LUT4); c.out_reg = 4'hF; c.dsel = D_PIN; c.sr = SR_ASYNC_RESET;
    load(c);
    b = 4'h7; pulse();
    check(out[3:0], 4'h7, "FF loads");
    ctl = 4'b1000; #1;
    check(out[3:0], 4'h0, "async reset");
    ctl = 4'b0000; #1;

    // Synchronous set: only at the edge
    c = base_cfg(LM_LUT4); c.out_reg = 4'hF; c.dsel = D_PIN; c.sr = SR_SYNC_SET;
    load(c);
    b = 4'h2; pulse();
    ctl = 4'b1000; #1;
    check(out[3:0], 4'h2, "sync set waits for edge");
    pulse();
    check(out[3:0], 4'hF, "sync set at edge");

    // Latch, active high: transparent while clk high, holds when low
    c = base_cfg(LM_LUT4); c.out_reg = 4'hF; c.dsel = D_PIN; c.storage = ST_LATCH;
    load(c);
    ctl = 4'b0000; b = 4'h5; #1 clk = 1'b1; #1;
    check(out[3:0], 4'h5, "latch transparent");
    b = 4'h9; #1;
    check(out[3:0], 4'h9, "latch follows");
    clk = 1'b0; #1; b = 4'h3; #1;
    check(out[3:0], 4'h9, "latch holds");

    // Dynamic data select: ctl[0] picks PLB input (1) or LUT output (0)
    c = base_cfg(LM_LUT4); c.out_reg = 4'hF; c.dsel = D_DYNAMIC;
    c.truth = {16'hFFFF, 16'h0000, 16'hFFFF, 16'h0000};
    load(c);
    b = 4'h6; ctl = 4'b0001; pulse();
    check(out[3:0], 4'h6, "dynamic select: pin");
    ctl = 4'b0000; pulse();
    check(out[3:0], 4'b1010, "dynamic select: lut");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
