// plb: model of a programmable logic block (PLB) as seen by the on-line BIST.
//
// A PLB is a LUT/RAM module, a register and an output logic stage, all set by
// a configuration word (star_pkg::plb_cfg_t). The LUT/RAM module holds
// 4 x 16 memory cells: as lookup tables they are four 4-input LUTs (LUT0/1 on
// input bus a, LUT2/3 on input bus b); as RAM they are one 16x4 memory
// (address a, data b, write enable ctl[1]) or a 16x2 dual-port memory (write
// address a, read address b, data {ctl[3],ctl[0]}). The same module also does
// the special-purpose arithmetic of the logic block: add/subtract, counting
// (from the register contents), a 4x1 multiply-add and two comparators.
// The register holds four bits, each a flip-flop or a latch, with an optional
// synchronous or asynchronous set/reset (ctl[3]), a programmable clock edge /
// latch level, a clock enable (ctl[2]) of either polarity or none, and data
// taken from the LUT outputs, the PLB inputs (b) or chosen by ctl[0].
// The output logic routes either the LUT value or the register bit to each
// of out[3:0]; out[4] is the fifth function output (carry, compare result).
//
// Interface: clk is the clock seen by the block (the test clock in a STAR);
// cfg_load is a configuration download: on a rising clk edge with cfg_load
// high the memory cells take cfg.truth, and while it is high the register is
// cleared. Combinational modes answer in the same cycle; RAM writes and the
// synchronous-RAM read take effect at the rising clk edge.
//
// The three-part structure and the list of modes and register options follow
// the document's typical PLB and its test-phase table. The counter modes
// feed back the edge-triggered register bits (q_ff) even when the outputs
// are taken from the latches, so that a transparent latch never closes a
// combinational loop through the incrementer. Input assignment,
// encodings, the dual-port RAM width and the multiplier form are this
// design's own, since the document leaves the block's insides to the FPGA
// vendor. The latch mode is a real latch on purpose: it is one of the modes
// under test.
module plb
  import star_pkg::*;
(
  input  logic                 clk,
  input  logic                 cfg_load,
  input  plb_cfg_t             cfg,
  input  logic [3:0]           a,
  input  logic [3:0]           b,
  input  logic [3:0]           ctl,     // [0] 5th var/carry/dyn-sel [1] we/sub/down [2] ce [3] set/reset
  output logic [PLB_OUTS-1:0]  out
);

  logic [PLB_LUTS-1:0][PLB_CELLS-1:0] mem;
  logic [3:0] q, q_ff, q_lat, d, rd_sync;
  logic [4:0] f;                       // function outputs of the LUT/RAM/arith module
  logic [3:0] ram_word_a;
  logic       we, ram_mode;

  assign we       = ctl[1];
  assign ram_mode = (cfg.mode == LM_RAM_ASYNC) || (cfg.mode == LM_RAM_SYNC)
                  || (cfg.mode == LM_RAM_DP);

  for (genvar k = 0; k < PLB_LUTS; k++) begin : g_word
    assign ram_word_a[k] = mem[k][a];
  end

  // Memory cells: loaded by configuration, written in RAM modes.
  always_ff @(posedge clk) begin
    if (cfg_load) begin
      mem <= cfg.truth;
    end else if (ram_mode && we) begin
      if (cfg.mode == LM_RAM_DP) begin
        mem[0][a] <= ctl[0];
        mem[1][a] <= ctl[3];
      end else begin
        for (int k = 0; k < PLB_LUTS; k++) mem[k][a] <= b[k];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_load) rd_sync <= '0;
    else          rd_sync <= ram_word_a;
  end

  // LUT/RAM and arithmetic functions.
  always_comb begin
    f = '0;
    unique case (cfg.mode)
      LM_LUT4:      f[3:0] = {mem[3][b], mem[2][b], mem[1][a], mem[0][a]};
      LM_LUT5: begin
        f[0] = ctl[0] ? mem[1][a] : mem[0][a];
        f[1] = mem[0][a] ^ mem[1][a];
        f[2] = ctl[0] ? mem[3][b] : mem[2][b];
        f[3] = mem[2][b] ^ mem[3][b];
      end
      LM_RAM_ASYNC: f[3:0] = ram_word_a;
      LM_RAM_SYNC:  f[3:0] = rd_sync;
      LM_RAM_DP:    f[3:0] = {mem[1][b], mem[0][b], mem[1][a], mem[0][a]};
      LM_ADDSUB:    f = ctl[1] ? ({1'b0, a} + {1'b0, ~b} + {4'd0, ctl[0]})
                               : ({1'b0, a} + {1'b0, b}  + {4'd0, ctl[0]});
      LM_CNT_UP:    f = {1'b0, q_ff} + 5'd1;
      LM_CNT_DOWN:  f = {1'b0, q_ff} - 5'd1;
      LM_CNT_UPDN:  f = ctl[1] ? ({1'b0, q_ff} - 5'd1) : ({1'b0, q_ff} + 5'd1);
      LM_MULT:      f = ({1'b0, a} & {5{ctl[0]}}) + {1'b0, b};
      LM_CMP_GE:    f = {a >= b, a - b};
      LM_CMP_NE:    f = {a != b, a ^ b};
      default:      f = '0;
    endcase
  end

  // Register data source, enable and set/reset.
  logic ce, sr, gclk, arst_set, arst_clr;

  always_comb begin
    unique case (cfg.dsel)
      D_LUT:     d = f[3:0];
      D_PIN:     d = b;
      D_DYNAMIC: d = ctl[0] ? b : f[3:0];
      default:   d = f[3:0];
    endcase
    unique case (cfg.ce)
      CE_HIGH:  ce = ctl[2];
      CE_LOW:   ce = ~ctl[2];
      default:  ce = 1'b1;
    endcase
  end

  assign sr       = ctl[3];
  assign gclk     = clk ^ cfg.clk_inv;
  assign arst_set = (cfg.sr == SR_ASYNC_SET) && sr && !cfg_load;
  assign arst_clr = ((cfg.sr == SR_ASYNC_RESET) && sr) || cfg_load;

  logic arst;
  assign arst = arst_set || arst_clr;

  always_ff @(posedge gclk or posedge arst) begin
    if (arst)                                   q_ff <= {4{!arst_clr}};
    else if ((cfg.sr == SR_SYNC_RESET) && sr)   q_ff <= '0;
    else if ((cfg.sr == SR_SYNC_SET) && sr)     q_ff <= '1;
    else if (ce)                                q_ff <= d;
  end

  always_latch begin
    if (arst_clr)                                     q_lat = '0;
    else if (arst_set)                                q_lat = '1;
    else if (gclk && (cfg.sr == SR_SYNC_RESET) && sr) q_lat = '0;
    else if (gclk && (cfg.sr == SR_SYNC_SET) && sr)   q_lat = '1;
    else if (gclk && ce)                              q_lat = d;
  end

  assign q = (cfg.storage == ST_LATCH) ? q_lat : q_ff;

  // Output logic.
  for (genvar k = 0; k < 4; k++) begin : g_out
    assign out[k] = cfg.out_reg[k] ? q[k] : f[k];
  end
  assign out[4] = f[4];

endmodule
