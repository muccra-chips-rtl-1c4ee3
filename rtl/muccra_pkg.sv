// muccra_pkg: shared types, constants and configuration-word builders of the
// MuCCRA dynamically reconfigurable processor array.
//
// The architecture is a template with fixed-format configuration words; the
// sizes of a particular chip (granularity G, array size, context count C,
// channel width W and the flexibilities F_unit, F_pi, F_sw) are module
// parameters of muccra_top. The configuration fields below are sized for the
// largest values those parameters may take (F_unit <= 4, 2*W <= 8, G <= 32,
// C <= 256, array up to 6x6), so the same word format serves every chip.
//
// Configuration delivery follows the row/column multicast idea: a packet names
// a set of rows and a set of columns by two bit masks, and every element of
// the selected kind whose row bit and column bit are both set stores the
// packet's data in the context slot the packet names.
package muccra_pkg;

  // Default chip: the first prototype (24-bit, 4x4, 64 contexts, F=4, Fsw=2).
  localparam int unsigned DEF_G      = 24;
  localparam int unsigned DEF_ROWS   = 4;
  localparam int unsigned DEF_COLS   = 4;
  localparam int unsigned DEF_C      = 64;
  localparam int unsigned DEF_W      = 4;
  localparam int unsigned DEF_FUNIT  = 4;
  localparam int unsigned DEF_FPI    = 4;
  localparam int unsigned DEF_FSW    = 2;
  localparam int unsigned DEF_RF     = 8;

  localparam int unsigned MASK_W     = 8;   // row / column mask bits
  localparam int unsigned SLOT_W     = 8;   // context slot index bits
  localparam int unsigned DATA_W     = 64;  // configuration payload bits

  // Side / corner numbering used everywhere.
  localparam int unsigned NORTH = 0, EAST = 1, SOUTH = 2, WEST = 3;

  typedef enum logic [1:0] {
    K_PE   = 2'd0,
    K_SE   = 2'd1,
    K_EDGE = 2'd2,
    K_CSC  = 2'd3
  } cfg_kind_e;

  // One configuration word as stored in the central configuration memory.
  typedef struct packed {
    cfg_kind_e           kind;
    logic [MASK_W-1:0]   row_mask;
    logic [MASK_W-1:0]   col_mask;
    logic [SLOT_W-1:0]   slot;
    logic [DATA_W-1:0]   data;
  } cfg_word_t;

  // The broadcast configuration bus.
  typedef struct packed {
    logic      valid;
    cfg_word_t w;
  } cfg_pkt_t;

  typedef enum logic [3:0] {
    ALU_PASSA = 4'd0,
    ALU_ADD   = 4'd1,
    ALU_SUB   = 4'd2,
    ALU_AND   = 4'd3,
    ALU_OR    = 4'd4,
    ALU_XOR   = 4'd5,
    ALU_NOTA  = 4'd6,
    ALU_LTU   = 4'd7,
    ALU_LTS   = 4'd8,
    ALU_EQ    = 4'd9,
    ALU_MINU  = 4'd10,
    ALU_MAXU  = 4'd11,
    ALU_MUL   = 4'd12,
    ALU_PASSB = 4'd13
  } alu_op_e;

  typedef enum logic [1:0] {
    SMU_SLL = 2'd0,
    SMU_SRL = 2'd1,
    SMU_SRA = 2'd2,
    SMU_ROL = 2'd3
  } smu_op_e;

  // PE context word (51 bits). Source selector encodings:
  //   in_sel[i]  : track 0..2W-1 of the segment on side i (N,E,S,W)
  //   rf_src     : 0 ALU result, 1..3 PE input 0..2
  //   smu_src    : 0 register file, 1..3 PE input 0..2
  //   alu_a/b    : 0 SMU result, 1 register file, 2..3 PE input 0..1
  //   out_sel[j] : 0 ALU, 1 SMU, 2 register file, 3 PE input j (pass)
  typedef struct packed {
    logic [3:0][2:0] in_sel;
    logic            rf_we;
    logic [2:0]      rf_waddr;
    logic [2:0]      rf_raddr;
    logic [1:0]      rf_src;
    logic [1:0]      smu_src;
    smu_op_e         smu_op;
    logic [4:0]      smu_shamt;
    logic [4:0]      smu_mlen;
    logic [1:0]      alu_a;
    logic [1:0]      alu_b;
    alu_op_e         alu_op;
    logic [3:0][1:0] out_sel;
  } pe_cfg_t;

  // Edge-unit context word: operation and two operand track selectors on the
  // one segment the unit touches.
  typedef struct packed {
    logic [1:0] op;
    logic [2:0] sel_a;
    logic [2:0] sel_b;
  } edge_cfg_t;

  // Context-switch controller entry, one per context.
  typedef struct packed {
    logic [7:0]        stay;      // extra cycles to remain in this context
    logic [SLOT_W-1:0] next;      // context that follows
    logic              last;      // task ends after this context
    logic              wait_cfg;  // do not leave until configuration loading is idle
  } csc_entry_t;

  // SE context word: one selector of SE_SEL_W bits per (side, track),
  // at bit offset (side*W + track)*SE_SEL_W. Selector 0 drives zero,
  // 1..Fsw take an entering link, Fsw+1..Fsw+4 take a corner cell output.
  localparam int unsigned SE_SEL_W = 3;

  function automatic cfg_word_t mk_word(cfg_kind_e kind, logic [MASK_W-1:0] rmask,
                                        logic [MASK_W-1:0] cmask, int unsigned slot,
                                        logic [DATA_W-1:0] data);
    cfg_word_t w;
    w.kind     = kind;
    w.row_mask = rmask;
    w.col_mask = cmask;
    w.slot     = SLOT_W'(slot);
    w.data     = data;
    return w;
  endfunction

  function automatic logic [DATA_W-1:0] se_set(logic [DATA_W-1:0] cur, int unsigned w_tracks,
                                               int unsigned side, int unsigned track,
                                               int unsigned sel);
    logic [DATA_W-1:0] r;
    r = cur;
    r[(side*w_tracks + track)*SE_SEL_W +: SE_SEL_W] = SE_SEL_W'(sel);
    return r;
  endfunction

endpackage
