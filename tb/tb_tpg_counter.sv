// tb_tpg_counter: checks that the TPG applies every pattern exactly once, in
// order, that done rises after exactly 2^W enabled cycles, that en pauses it
// and that BIST Start/Reset restarts it.
module tb_tpg_counter;
  localparam int W = 8;
  logic clk = 1'b0, bist_rst = 1'b1, en = 1'b0;
  logic [W-1:0] pattern;
  logic done;
  int checks = 0, failures = 0;
  bit seen [1<<W];

  tpg_counter #(.W(W)) dut (.clk, .bist_rst, .en, .pattern, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    @(negedge clk); bist_rst = 1'b0;
    check(pattern == 0 && !done, "reset state");
    en = 1'b1;
    cycles = 0;
    while (!done) begin
      check(pattern == W'(cycles), $sformatf("pattern %0d in order", cycles));
      seen[pattern] = 1'b1;
      // pause for one cycle half way through
      if (cycles == 100) begin
        en = 1'b0; @(negedge clk);
        check(pattern == W'(cycles), "en low holds pattern");
        en = 1'b1;
      end
      @(negedge clk);
      cycles++;
    end
    check(cycles == (1 << W), $sformatf("done after %0d cycles", cycles));
    foreach (seen[i]) check(seen[i], $sformatf("pattern %0d applied", i));
    @(negedge clk);
    check(done && pattern == '1, "holds after done");
    bist_rst = 1'b1; @(negedge clk); bist_rst = 1'b0;
    check(!done && pattern == 0, "restart by Start/Reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
