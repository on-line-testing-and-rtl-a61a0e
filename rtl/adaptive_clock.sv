// adaptive_clock: programmable system clock generator.
//
// The system clock runs at the fastest rate the current (possibly
// fault-bypassing) configuration allows, rather than at a rate padded for the
// worst case. TREC writes a new period after it has rerouted around a fault
// and re-timed the affected nets; it can also stop the system clock for the
// few cycles in which working logic is relocated into a tested STAR.
//
// sys_clk is ref_clk divided by the current period P (in ref_clk cycles,
// P >= 2): high for floor(P/2) cycles, then low. sys_tick is high in the
// ref_clk cycle in which sys_clk rises, for logic that prefers an enable to a
// derived clock. period_wr loads period_in as the pending period; it takes
// effect at the next rising edge of sys_clk, so no short or long pulse is ever
// produced. stop = 1 halts sys_clk low at the end of the current period and
// sets stopped; when stop falls the clock restarts with a full period.
// rst is synchronous and active high and loads INIT_PERIOD. Values of
// period_in below 2 are taken as 2.
//
// The document gives the function (a generator whose period TREC programs and
// a stop control); the divider, the pending-period rule and the parameter
// values are this design's own.
module adaptive_clock #(
  parameter int unsigned PW          = 8,
  parameter int unsigned INIT_PERIOD = 4
) (
  input  logic          ref_clk,
  input  logic          rst,
  input  logic          period_wr,
  input  logic [PW-1:0] period_in,
  input  logic          stop,
  output logic          sys_clk,
  output logic          sys_tick,
  output logic          stopped,
  output logic [PW-1:0] period
);

  logic [PW-1:0] pending, cnt;
  logic          boundary;

  assign boundary = stopped || (cnt == period - 1'b1);

  always_ff @(posedge ref_clk) begin
    if (rst) begin
      period   <= PW'(INIT_PERIOD);
      pending  <= PW'(INIT_PERIOD);
      cnt      <= '0;
      sys_clk  <= 1'b0;
      sys_tick <= 1'b0;
      stopped  <= 1'b1;
    end else begin
      if (period_wr) pending <= (period_in < 2) ? PW'(2) : period_in;
      sys_tick <= 1'b0;
      if (boundary) begin
        cnt <= '0;
        if (stop) begin
          stopped <= 1'b1;
          sys_clk <= 1'b0;
        end else begin
          stopped  <= 1'b0;
          sys_clk  <= 1'b1;
          sys_tick <= 1'b1;
          period   <= period_wr ? ((period_in < 2) ? PW'(2) : period_in) : pending;
        end
      end else begin
        cnt     <= cnt + 1'b1;
        sys_clk <= (cnt + 1'b1) < (period >> 1);
      end
    end
  end

endmodule
