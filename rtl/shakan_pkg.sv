// shakan_pkg: types and constants shared by the oblique-random-forest
// inference pipeline.
//
// A node instruction is 63 bits, padded to one 64-bit memory word. It holds
// a 16-bit fixed-point threshold, a validity bit, one leaf flag and one
// 10-bit field per child (class label for a leaf child, successor address in
// the next memory element otherwise), three 6-bit feature indices and two
// 3-bit coefficient codes. Field widths follow the published format; the bit
// order inside the word is this design's choice.
//
// A sample carries five 32-bit fixed-point features and seven 16-bit vote
// scores (both as published) plus bookkeeping fields chosen here: a tag, the
// number of completed trees, the number of completed ring passes and a done
// flag.
package shakan_pkg;

  localparam int unsigned INSTR_W    = 64;  // padded instruction word
  localparam int unsigned TH_W       = 16;  // threshold width
  localparam int unsigned FIDX_W     = 6;   // feature index width
  localparam int unsigned GCODE_W    = 3;   // coefficient code width
  localparam int unsigned CHILD_W    = 10;  // child field: class or address
  localparam int unsigned FEAT_W     = 32;  // feature width
  localparam int unsigned N_FEAT     = 5;   // features per sample
  localparam int unsigned SCORE_W    = 16;  // vote counter width
  localparam int unsigned N_CLASSES  = 7;   // vote counters per sample
  localparam int unsigned TAG_W      = 8;   // sample tag width
  localparam int unsigned TREE_CNT_W = 10;  // completed-tree counter width
  localparam int unsigned LOOP_W     = CHILD_W; // ring-pass counter width

  // Threshold LSB weight relative to the feature LSB: a threshold code t
  // stands for t * 2^TH_SHIFT feature LSBs (features Q16.16, threshold Q8.8).
  localparam int unsigned TH_SHIFT   = 8;
  // Extra fractional bits kept so that the 1/2 and 1/4 coefficients are exact.
  localparam int unsigned GFRAC      = 2;
  // Width of the split-condition arithmetic (sign, x2 growth, one add).
  localparam int unsigned ACC_W      = FEAT_W + GFRAC + 3;

  // Coefficient codes, in the order the coefficient set is listed:
  // {0, -1/2, -1, -2, +1/4, +1/2, +1, +2}.
  typedef enum logic [GCODE_W-1:0] {
    G_ZERO   = 3'd0,
    G_NEG_H  = 3'd1,
    G_NEG_1  = 3'd2,
    G_NEG_2  = 3'd3,
    G_POS_Q  = 3'd4,
    G_POS_H  = 3'd5,
    G_POS_1  = 3'd6,
    G_POS_2  = 3'd7
  } gcode_e;

  typedef struct packed {
    logic                    pad;      // alignment to 64 bits
    logic                    valid;    // 0: empty slot, the sample skips this PE
    logic signed [TH_W-1:0]  th;
    logic [FIDX_W-1:0]       f1;
    logic [FIDX_W-1:0]       f2;
    logic [FIDX_W-1:0]       f3;
    logic [GCODE_W-1:0]      g2;
    logic [GCODE_W-1:0]      g3;
    logic                    leaf_l;   // left child (condition true) is a leaf
    logic                    leaf_r;   // right child (condition false) is a leaf
    logic [CHILD_W-1:0]      child_l;
    logic [CHILD_W-1:0]      child_r;
  } instr_t;

  typedef struct packed {
    logic [N_FEAT-1:0][FEAT_W-1:0]     feat;
    logic [N_CLASSES-1:0][SCORE_W-1:0] score;
    logic [TAG_W-1:0]                  tag;
    logic [TREE_CNT_W-1:0]             trees_done;
    logic [LOOP_W-1:0]                 loops;
    logic                              done;
  } sample_t;

endpackage
