// bister_logic: test pattern generator and output response analyzer of a
// logic BIST element (BISTER).
//
// A BISTER applies the same patterns to two identically configured blocks
// under test (BUTs) and compares their outputs; any difference is latched as
// a fail. This module is the BISTER minus its BUTs: the generators, the
// pattern fan-out and the ORA. The BUTs are PLBs placed around it (see
// bister_tile), so the same control serves whichever two PLBs of a tile are
// the BUTs in the current configuration.
//
// Generators: tpg_sel = TPG_COUNT applies all 2^TPG_W patterns of the twelve
// PLB inputs (pat_a = pattern[3:0], pat_b = pattern[7:4],
// pat_ctl = pattern[11:8]); tpg_sel = TPG_MARCH applies a March C- sequence
// for the RAM modes (pat_a = address, pat_b = data, pat_ctl[1] = write
// enable, other ctl bits 0). The ORA compares all five outputs of the two
// BUTs. With ORA_GROUP = 5 (default) one flip-flop latches any mismatch; a
// smaller ORA_GROUP gives one flip-flop per group of ORA_GROUP output pairs
// (ora_diag), for diagnosis: 2 is what a logic block with two compares per
// flip-flop allows, 1 locates the failing output. The pairs are padded with
// constant-equal pairs up to a multiple of ORA_GROUP.
//
// Interface and timing: everything runs on the test clock tck. bist_rst
// (BIST Start/Reset) restarts the generators and clears the ORA. The
// generators step while scan_mode is high; done rises when the selected
// generator has applied its whole sequence (2^TPG_W cycles for the counter,
// 160 for the march test). BUT outputs are sampled on the rising tck edge
// after the pattern changed. With scan_mode low the result shifts from
// scan_in to pass_fail (the scan output); there are ORA_NFF result
// flip-flops, the one of the highest-numbered output group shifting out first.
//
// The TPG / two BUTs / ORA arrangement, the twelve-bit counter TPG and the
// RAM-test state machine follow the document. Comparing five outputs in one
// ORA (the document's ORA is a four-bit comparator) and the pin assignment
// are this design's own; so is the padding for the grouped ORA.
module bister_logic
  import star_pkg::*;
#(
  parameter int unsigned TPG_W     = 12,
  parameter int unsigned ORA_GROUP = PLB_OUTS,
  localparam int unsigned ORA_NFF  = (PLB_OUTS + ORA_GROUP - 1) / ORA_GROUP
) (
  input  logic                tck,
  input  logic                bist_rst,
  input  logic                scan_mode,
  input  logic                scan_in,
  input  tpg_sel_e            tpg_sel,
  output logic [3:0]          pat_a,
  output logic [3:0]          pat_b,
  output logic [3:0]          pat_ctl,
  input  logic [PLB_OUTS-1:0] but_out0,
  input  logic [PLB_OUTS-1:0] but_out1,
  output logic                pass_fail,
  output logic                done
);

  logic [TPG_W-1:0] cnt_pat;
  logic             cnt_done, march_done;
  logic [3:0]       m_addr, m_data, m_exp;
  logic             m_we;

  tpg_counter #(.W(TPG_W)) u_tpg (
    .clk      (tck),
    .bist_rst (bist_rst),
    .en       (scan_mode && tpg_sel == TPG_COUNT),
    .pattern  (cnt_pat),
    .done     (cnt_done)
  );

  march_tpg #(.AW(4), .DW(4)) u_march (
    .clk      (tck),
    .bist_rst (bist_rst),
    .en       (scan_mode && tpg_sel == TPG_MARCH),
    .addr     (m_addr),
    .wdata    (m_data),
    .we       (m_we),
    .exp      (m_exp),
    .done     (march_done)
  );

  // Counter bits beyond the twelve PLB inputs (TPG_W > 12) are not routed.
  logic [11:0] cnt12;
  assign cnt12 = 12'(cnt_pat);

  always_comb begin
    if (tpg_sel == TPG_MARCH) begin
      pat_a   = m_addr;
      pat_b   = m_data;
      pat_ctl = {2'b00, m_we, 1'b0};
    end else begin
      pat_a   = cnt12[3:0];
      pat_b   = cnt12[7:4];
      pat_ctl = cnt12[11:8];
    end
  end

  localparam int unsigned ORA_PAIRS = ORA_NFF * ORA_GROUP;
  logic [ORA_PAIRS-1:0] ora_a, ora_b;
  logic [ORA_NFF-1:0]   ora_fail;
  assign ora_a = ORA_PAIRS'(but_out0);
  assign ora_b = ORA_PAIRS'(but_out1);

  ora_diag #(.PAIRS(ORA_PAIRS), .GROUP(ORA_GROUP)) u_ora (
    .clk       (tck),
    .bist_rst  (bist_rst),
    .scan_mode (scan_mode),
    .scan_in   (scan_in),
    .a         (ora_a),
    .b         (ora_b),
    .fail      (ora_fail),
    .scan_out  (pass_fail)
  );

  assign done = (tpg_sel == TPG_MARCH) ? march_done : cnt_done;

  // The march expected value is only for stand-alone checking; the group
  // results are read through the scan path.
  logic unused_exp;
  assign unused_exp = ^{m_exp, ora_fail};

endmodule
