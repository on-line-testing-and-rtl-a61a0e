// ora_scan_cell: comparison-based output response analyzer with its
// pass/fail flip-flop doubling as one stage of the result scan chain.
//
// Each of the PAIRS output pairs of the two BUTs (or two WUT groups) is
// compared; any mismatch sets the flip-flop, and the flip-flop's own output
// is fed back into the OR so the first mismatch stays latched until BIST
// Start/Reset. With scan_mode low the flip-flop instead takes scan_in from
// the previous ORA, so the results of a STAR shift out one bit per test
// clock. pass_fail = 1 means a mismatch was seen (fail).
//
// Timing: the flip-flop samples on the rising edge of the test clock (TCK).
// bist_rst is synchronous and active high. With scan_mode high the value
// held after edge t is the OR of its value before and the mismatch present
// at edge t.
//
// The structure (compare, OR with feedback, a 2-input multiplexer selected by
// Scan Mode, a TCK-clocked flip-flop) is the document's integrated ORA/scan
// cell, with the compare path on the multiplexer input numbered 1 and
// scan-in on input 0 as in its drawing. Four pairs per flip-flop is the
// document's typical ORA; the parameter allows other counts.
module ora_scan_cell #(
  parameter int unsigned PAIRS = 4
) (
  input  logic             clk,
  input  logic             bist_rst,
  input  logic             scan_mode,
  input  logic             scan_in,
  input  logic [PAIRS-1:0] a,
  input  logic [PAIRS-1:0] b,
  output logic             pass_fail
);

  logic mismatch, d;

  assign mismatch = |(a ^ b);
  assign d        = scan_mode ? (mismatch | pass_fail) : scan_in;

  always_ff @(posedge clk) begin
    if (bist_rst) pass_fail <= 1'b0;
    else          pass_fail <= d;
  end

endmodule
