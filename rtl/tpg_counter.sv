// tpg_counter: counter-based test pattern generator of a BISTER.
//
// A W-bit binary counter applies all 2^W input patterns to the blocks or
// wires under test, one pattern per test-clock cycle. BIST Start/Reset
// (bist_rst, synchronous, active high) clears the count and restarts the
// sequence. While en is high the counter steps; after the all-ones pattern
// has been applied done rises and the counter holds, so each pattern is
// applied exactly once per run: pattern p is on the output in the p-th
// enabled cycle after reset, and done is high from cycle 2^W on.
//
// The document builds this generator from W/4 logic blocks each holding a
// 4-bit counter (three blocks, twelve bits, for the logic BISTER) and uses a
// 2n-bit counter for interconnect, where the low n bits drive the wires under
// test and the high n bits the neighbouring busses. A single W-bit counter is
// the same count sequence. The done flag is this design's own addition.
module tpg_counter #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         bist_rst,
  input  logic         en,
  output logic [W-1:0] pattern,
  output logic         done
);

  always_ff @(posedge clk) begin
    if (bist_rst) begin
      pattern <= '0;
      done    <= 1'b0;
    end else if (en && !done) begin
      if (&pattern) done    <= 1'b1;
      else          pattern <= pattern + 1'b1;
    end
  end

endmodule
