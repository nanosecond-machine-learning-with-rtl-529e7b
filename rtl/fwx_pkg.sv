// fwx_pkg: types and constants shared by the BDT evaluation processor.
//
// The evaluation processor classifies one event per clock with a boosted
// decision tree forest that has been flattened and merged in software. The
// sizes below are the defaults of the benchmark configuration: 4 input
// variables of 8 bits, 10 merged trees, 8-bit scores and the bit shift bin
// engine. The maximum of 8 bins per variable and tree (3-bit bin index), the
// number of bit shift entries per engine and the configuration bus layout are
// this design's own choices.
package fwx_pkg;

  // Bin engine flavours. BSBE is the one used in the benchmark firmware.
  typedef enum logic [0:0] {
    ENG_BSBE = 1'b0,   // bit shift bin engine: equality on shifted input
    ENG_LUBE = 1'b1    // look up bin engine: magnitude compare with thresholds
  } engine_e;

  // Default sizes.
  localparam int unsigned DEF_V    = 4;   // input variables
  localparam int unsigned DEF_N    = 8;   // bits per input variable and cut
  localparam int unsigned DEF_T    = 10;  // merged trees
  localparam int unsigned DEF_SW   = 8;   // bits per tree score
  localparam int unsigned DEF_OW   = 8;   // bits of the BDT output score
  localparam int unsigned DEF_BW   = 3;   // bits per bin index (up to 8 bins)
  localparam int unsigned DEF_E    = 16;  // bit shift entries per engine

  // Configuration bus. The forest is loaded through one write port that is
  // steered to a bin engine, a tree score array or the transform table.
  localparam int unsigned CFG_AW = 16;
  localparam int unsigned CFG_DW = 32;

  typedef enum logic [1:0] {
    CFG_BIN   = 2'd0,  // bin engine of (tree, var): addr = entry/threshold index
    CFG_SCORE = 2'd1,  // score array of tree: addr = concatenated bin indices
    CFG_XFORM = 2'd2   // transform table: addr = summed score (two's complement)
  } cfg_sel_e;

  typedef struct packed {
    logic              we;
    cfg_sel_e          sel;
    logic [7:0]        tree;
    logic [7:0]        var_idx;
    logic [CFG_AW-1:0] addr;
    logic [CFG_DW-1:0] data;
  } cfg_wr_t;

  // Layout of one bit shift bin engine entry in cfg_wr_t.data.
  //   [31]    valid
  //   [28:24] layer l (1..L): how many top bits of x the entry looks at
  //   [23:16] bin index the entry maps to
  //   [15:0]  prefix: the top l bits of x that select the entry (right aligned)
  // A look up bin engine threshold is data[15:0].
  localparam int unsigned BSBE_VALID_BIT = 31;
  localparam int unsigned BSBE_LAYER_LSB = 24;
  localparam int unsigned BSBE_BIN_LSB   = 16;

endpackage
