// cgra_pkg: types and constants shared by the fused functional unit and the
// CGRA fabric built around it.
//
// The fused FU executes the eight fixed-point functions of the incremental
// FU generator (add, sub, lt, lte, gt, gte, mul, mac). The memory-interface
// tiles of the left-most column add load and store. The opcode encoding,
// the crossbar source numbering and the layout of a configuration word are
// this design's own choices; the set of functions follows the FU generator.
package cgra_pkg;

  // Datapath granularity of the CGRA (16 bits throughout the datapath).
  localparam int unsigned DATA_W = 16;

  // Function select of a tile. FU_NOP keeps the result register.
  typedef enum logic [3:0] {
    FU_NOP = 4'd0,
    FU_ADD = 4'd1,
    FU_SUB = 4'd2,
    FU_LT  = 4'd3,
    FU_LTE = 4'd4,
    FU_GT  = 4'd5,
    FU_GTE = 4'd6,
    FU_MUL = 4'd7,
    FU_MAC = 4'd8,
    FU_LD  = 4'd9,   // memory tiles only: result <= spm[op0]
    FU_ST  = 4'd10   // memory tiles only: spm[op0] <= op1
  } fu_op_e;

  // King-mesh directions. Output direction d of a tile feeds input
  // direction opposite(d) of the neighbour that lies in direction d.
  typedef enum logic [2:0] {
    DIR_N  = 3'd0,
    DIR_S  = 3'd1,
    DIR_W  = 3'd2,
    DIR_E  = 3'd3,
    DIR_NW = 3'd4,
    DIR_NE = 3'd5,
    DIR_SW = 3'd6,
    DIR_SE = 3'd7
  } dir_e;

  localparam int unsigned NUM_DIRS = 8;

  // Crossbar sources: 0..7 neighbour inputs, 8 the tile's own result,
  // 9 the constant of the configuration word, 10..15 read as zero.
  localparam logic [3:0] SRC_RES   = 4'd8;
  localparam logic [3:0] SRC_CONST = 4'd9;

  // Crossbar destinations: 8 tile outputs and 3 FU operands.
  localparam int unsigned NUM_OPNDS = 3;

  // One configuration word: what a tile does in one schedule slot.
  typedef struct packed {
    fu_op_e                        op;
    logic [NUM_OPNDS-1:0][3:0]     opnd_sel;  // FU operand sources
    logic [NUM_DIRS-1:0][3:0]      out_sel;   // output sources per direction
    logic [DATA_W-1:0]             konst;     // constant source
  } tile_cfg_t;

endpackage
