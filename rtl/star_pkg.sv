// star_pkg: types and constants shared by the roving self-test (STAR) blocks.
//
// The programmable logic block (PLB) is described to the rest of the design
// by a configuration word, plb_cfg_t, in the same way an SRAM FPGA's logic
// block is set by its configuration memory. A PLB has twelve inputs. The fields follow the modes of
// operation a logic BISTER has to test: lookup-table and RAM modes of the
// LUT/RAM module, arithmetic and counter modes, and the register options
// (flip-flop or latch, set/reset kind, clock polarity, clock-enable polarity
// and data source). The list of modes follows the test phases of the ORCA 2C
// and 2CA logic block; the bit-level encoding is this design's own.
// Faults are emulated, as the on-line test method does on real parts, by
// loading a BUT with a configuration word that differs from its twin's.
package star_pkg;

  // Widths of the PLB model: four 4-input LUTs (16 memory cells each),
  // four register bits, five outputs, twelve data/control inputs.
  localparam int unsigned PLB_LUTS   = 4;
  localparam int unsigned PLB_LUT_IN = 4;
  localparam int unsigned PLB_CELLS  = 1 << PLB_LUT_IN;  // 16
  localparam int unsigned PLB_OUTS   = 5;

  // Mode of the LUT/RAM module (one per logic BIST phase family).
  typedef enum logic [3:0] {
    LM_LUT4      = 4'd0,   // four independent 4-input LUTs
    LM_LUT5      = 4'd1,   // two 5-input functions built from LUT pairs
    LM_RAM_ASYNC = 4'd2,   // 16x4 RAM, combinational read
    LM_RAM_SYNC  = 4'd3,   // 16x4 RAM, registered read
    LM_RAM_DP    = 4'd4,   // 16x2 dual-port RAM
    LM_ADDSUB    = 4'd5,   // 4-bit adder/subtracter, carry out on out[4]
    LM_CNT_UP    = 4'd6,   // register + 1
    LM_CNT_DOWN  = 4'd7,   // register - 1
    LM_CNT_UPDN  = 4'd8,   // register +/- 1, direction from an input
    LM_MULT      = 4'd9,   // 4x1 multiply and add
    LM_CMP_GE    = 4'd10,  // a >= b comparator
    LM_CMP_NE    = 4'd11   // a != b comparator
  } lut_mode_e;

  typedef enum logic {ST_FF = 1'b0, ST_LATCH = 1'b1} storage_e;

  typedef enum logic [2:0] {
    SR_NONE        = 3'd0,
    SR_ASYNC_SET   = 3'd1,
    SR_ASYNC_RESET = 3'd2,
    SR_SYNC_SET    = 3'd3,
    SR_SYNC_RESET  = 3'd4
  } setreset_e;

  typedef enum logic [1:0] {CE_ALWAYS = 2'd0, CE_HIGH = 2'd1, CE_LOW = 2'd2} clken_e;

  typedef enum logic [1:0] {D_LUT = 2'd0, D_PIN = 2'd1, D_DYNAMIC = 2'd2} dsel_e;

  typedef struct packed {
    lut_mode_e                            mode;
    logic [PLB_LUTS-1:0][PLB_CELLS-1:0]   truth;    // LUT contents / RAM initial value
    storage_e                             storage;
    setreset_e                            sr;
    logic                                 clk_inv;  // FF: falling edge; latch: active low
    clken_e                               ce;
    dsel_e                                dsel;
    logic [PLB_LUTS-1:0]                  out_reg;  // out[k] from register (1) or LUT (0)
  } plb_cfg_t;

  // 3-by-2 BISTER tile rotations. Sites are numbered row by row:
  //   site 0 = row 0 left, 1 = row 0 right, 2 = row 1 left, ... 5 = row 2 right.
  // For each of the six configurations: the two BUT sites and the ORA site;
  // every other site is a TPG cell. Every site is a BUT in exactly two
  // configurations, each time compared with a different partner.
  localparam int unsigned TILE_SITES = 6;
  localparam int unsigned TILE_ROTS  = 6;
  typedef struct packed {
    logic [2:0] but0;
    logic [2:0] but1;
    logic [2:0] ora;
  } tile_rot_t;
  localparam tile_rot_t TILE_3X2 [TILE_ROTS] = '{
    '{but0: 3'd1, but1: 3'd5, ora: 3'd3},   // 1: T B / T O / T B
    '{but0: 3'd0, but1: 3'd3, ora: 3'd1},   // 2: B O / T B / T T
    '{but0: 3'd1, but1: 3'd2, ora: 3'd0},   // 3: O B / B T / T T
    '{but0: 3'd0, but1: 3'd4, ora: 3'd2},   // 4: B T / O T / B T
    '{but0: 3'd2, but1: 3'd5, ora: 3'd4},   // 5: T T / B T / O B
    '{but0: 3'd3, but1: 3'd4, ora: 3'd5}    // 6: T T / T B / B O
  };

  // Selects which generator feeds the BUTs of a logic BISTER.
  typedef enum logic {TPG_COUNT = 1'b0, TPG_MARCH = 1'b1} tpg_sel_e;

endpackage
