// transfer_controller: copies RAM contents during STAR roving.
//
// When working logic that contains RAM is moved into the STAR it has just
// left tested, the new copy of the RAM must start with the old one's
// contents. This controller walks the source RAM and the destination RAM
// through their address space together, reading one word from the source
// and writing it to the same address of the destination each cycle, while
// the system clock is stopped.
//
// Interface: start (one cycle) begins a copy; src_re/src_addr read the
// source, whose data src_rdata arrive SRC_LAT cycles later (0 = asynchronous
// read, 1 = registered read); dst_we/dst_addr/dst_wdata write the
// destination. busy is high from the cycle after start until the last write;
// done pulses for one cycle after it. A copy takes 2^AW + SRC_LAT cycles.
// rst is synchronous, active high. clk is the clock used for the transfer,
// derived from the test clock.
//
// The document gives the function of the controller (sequence both RAMs,
// issue reads and writes); the pipelined one-word-per-cycle form is this
// design's own.
module transfer_controller #(
  parameter int unsigned AW      = 4,
  parameter int unsigned DW      = 4,
  parameter int unsigned SRC_LAT = 0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          src_re,
  output logic [AW-1:0] src_addr,
  input  logic [DW-1:0] src_rdata,
  output logic          dst_we,
  output logic [AW-1:0] dst_addr,
  output logic [DW-1:0] dst_wdata,
  output logic          busy,
  output logic          done
);

  logic          reading;
  logic [AW-1:0] rd_addr;
  // Read-side valid/address delayed by the source latency.
  logic [SRC_LAT:0]         v_pipe;
  logic [SRC_LAT:0][AW-1:0] a_pipe;

  always_ff @(posedge clk) begin
    if (rst) begin
      reading <= 1'b0;
      rd_addr <= '0;
    end else if (start && !busy) begin
      reading <= 1'b1;
      rd_addr <= '0;
    end else if (reading) begin
      if (&rd_addr) reading <= 1'b0;
      rd_addr <= rd_addr + 1'b1;
    end
  end

  assign src_re   = reading;
  assign src_addr = rd_addr;

  assign v_pipe[0] = reading;
  assign a_pipe[0] = rd_addr;
  for (genvar s = 1; s <= SRC_LAT; s++) begin : g_lat
    always_ff @(posedge clk) begin
      if (rst) begin
        v_pipe[s] <= 1'b0;
        a_pipe[s] <= '0;
      end else begin
        v_pipe[s] <= v_pipe[s-1];
        a_pipe[s] <= a_pipe[s-1];
      end
    end
  end

  assign dst_we    = v_pipe[SRC_LAT];
  assign dst_addr  = a_pipe[SRC_LAT];
  assign dst_wdata = src_rdata;
  assign busy      = |v_pipe;

  always_ff @(posedge clk) begin
    if (rst) done <= 1'b0;
    else     done <= dst_we && (&dst_addr);
  end

endmodule
