// tb_adaptive_clock: measures the generated clock in reference cycles.
// Checks period and duty cycle at the initial period, that a new period takes
// effect only at the next rising edge (no short pulse), that stop parks the
// clock low after the current period and that it restarts with a full period.
module tb_adaptive_clock;
  localparam int PW = 8, INIT = 4;
  logic ref_clk = 1'b0, rst = 1'b1, period_wr = 1'b0, stop = 1'b0;
  logic [PW-1:0] period_in = '0, period;
  logic sys_clk, sys_tick, stopped;
  int checks = 0, failures = 0;

  adaptive_clock #(.PW(PW), .INIT_PERIOD(INIT)) dut (.ref_clk, .rst, .period_wr, .period_in,
                                                   .stop, .sys_clk, .sys_tick, .stopped, .period);

  always #5 ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Sample sys_clk after each ref edge; record rising-edge times and high times.
  int t = 0, last_rise = -1, high_cnt = 0;
  int periods [$], highs [$];
  always @(negedge ref_clk) begin
    t++;
    if (sys_clk) high_cnt++;
  end
  logic prev = 1'b0;
  always @(negedge ref_clk) begin
    if (sys_clk && !prev) begin
      check(sys_tick, "tick with rising edge");
      if (last_rise >= 0) begin periods.push_back(t - last_rise); highs.push_back(high_cnt - 1); end
      last_rise = t; high_cnt = 1;
    end else if (!(sys_clk && !prev)) begin
      check(!sys_tick, "no tick without rising edge");
    end
    prev = sys_clk;
  end

  initial begin : watchdog
    repeat (3000) @(posedge ref_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge ref_clk);
    rst = 1'b0;
    repeat (40) @(negedge ref_clk);
    foreach (periods[i]) check(periods[i] == INIT && highs[i] == INIT/2,
                               $sformatf("initial period %0d high %0d", periods[i], highs[i]));
    check(periods.size() >= 8, "clock runs");
    check(period == INIT, "period register");
    // slow down to 7 after a fault bypass
    periods.delete(); highs.delete();
    @(negedge ref_clk); period_wr = 1'b1; period_in = 7;
    @(negedge ref_clk); period_wr = 1'b0;
    repeat (80) @(negedge ref_clk);
    // the first measured period may still be the old one; no period may be shorter than 4
    foreach (periods[i]) check(periods[i] == INIT || periods[i] == 7, $sformatf("period %0d during change", periods[i]));
    check(periods[periods.size()-1] == 7 && highs[highs.size()-1] == 3, "new period 7, high 3");
    check(period == 7, "period register updated");
    // stop for relocation
    stop = 1'b1;
    repeat (10) @(negedge ref_clk);
    check(stopped && !sys_clk, "parked low");
    begin
      int n0;
      n0 = periods.size();
      repeat (30) @(negedge ref_clk);
      check(periods.size() == n0 && !sys_clk, "no edges while stopped");
    end
    stop = 1'b0;
    periods.delete(); highs.delete(); last_rise = -1;
    repeat (40) @(negedge ref_clk);
    check(!stopped, "restarted");
    foreach (periods[i]) check(periods[i] == 7, "full periods after restart");
    // a request below 2 is raised to 2
    @(negedge ref_clk); period_wr = 1'b1; period_in = 1;
    @(negedge ref_clk); period_wr = 1'b0;
    repeat (30) @(negedge ref_clk);
    check(period == 2, "minimum period 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
