// tb_march_tpg: drives a reference RAM from the march generator and checks
// every read against the generator's expected value and against an
// independently written March C- operation list; checks the length
// (10 * 2^AW operations) and that a stuck cell in the RAM is caught.
module tb_march_tpg;
  localparam int AW = 4, DW = 4, WORDS = 1 << AW;
  logic clk = 1'b0, bist_rst = 1'b1, en = 1'b0;
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata, exp;
  logic we, done;
  logic [DW-1:0] ram [WORDS];
  int checks = 0, failures = 0;

  march_tpg #(.AW(AW), .DW(DW)) dut (.clk, .bist_rst, .en, .addr, .wdata, .we, .exp, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // Reference operation list: {is_write, value, address}
  typedef struct { bit w; bit v; int adr; } op_t;
  op_t ref_ops [$];

  function automatic void build_ref();
    // up(w0)
    for (int i = 0; i < WORDS; i++) ref_ops.push_back('{1, 0, i});
    // up(r0,w1); up(r1,w0)
    for (int i = 0; i < WORDS; i++) begin ref_ops.push_back('{0, 0, i}); ref_ops.push_back('{1, 1, i}); end
    for (int i = 0; i < WORDS; i++) begin ref_ops.push_back('{0, 1, i}); ref_ops.push_back('{1, 0, i}); end
    // down(r0,w1); down(r1,w0)
    for (int i = WORDS-1; i >= 0; i--) begin ref_ops.push_back('{0, 0, i}); ref_ops.push_back('{1, 1, i}); end
    for (int i = WORDS-1; i >= 0; i--) begin ref_ops.push_back('{0, 1, i}); ref_ops.push_back('{1, 0, i}); end
    // r0
    for (int i = 0; i < WORDS; i++) ref_ops.push_back('{0, 0, i});
  endfunction

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int stuck_word, output int mism, output int nops);
    mism = 0; nops = 0;
    bist_rst = 1'b1; @(negedge clk); bist_rst = 1'b0; en = 1'b1;
    while (!done) begin
      if (nops < ref_ops.size()) begin
        op_t o;
        o = ref_ops[nops];
        check(we == o.w && addr == AW'(o.adr), $sformatf("op %0d kind/address", nops));
        if (o.w) check(wdata == {DW{o.v}}, $sformatf("op %0d write value", nops));
        else     check(exp == {DW{o.v}}, $sformatf("op %0d expected value", nops));
      end
      if (!we && ram[addr] != exp) mism++;
      if (we) ram[addr] = (stuck_word >= 0 && addr == AW'(stuck_word)) ? (wdata & 4'b1110) : wdata;
      @(negedge clk);
      nops++;
    end
    en = 1'b0;
  endtask

  initial begin
    int mism, nops;
    build_ref();
    foreach (ram[i]) ram[i] = '0;
    run(-1, mism, nops);
    check(nops == 10 * WORDS, $sformatf("length %0d ops", nops));
    check(mism == 0, "fault-free RAM passes");
    check(!we, "write enable low after done");
    run(5, mism, nops);
    check(mism > 0, "stuck-at-0 bit detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
