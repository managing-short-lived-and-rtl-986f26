// cgra_pkg: shared constants and configuration-word types of the CGRA.
//
// The array runs a statically computed modulo schedule. Every configurable
// unit keeps one configuration word per schedule phase; the phase counter
// selects the word that steers the unit in the current cycle. The types below
// fix the layout of those words. Widths of the datapath (32-bit words plus a
// 1-bit control path), 16-entry large register files and 8-entry private
// register blocks follow the architecture description; the schedule depth
// (MAX_II), the operation set of the ALU, the numbering of crossbar ports and
// configuration units and the width of the configuration bus are this
// design's own choices.
package cgra_pkg;

  // ---- sizes -------------------------------------------------------------
  localparam int unsigned DW          = 32;  // datapath word width
  localparam int unsigned MAX_II      = 16;  // depth of every configuration memory
  localparam int unsigned PHW         = $clog2(MAX_II);
  localparam int unsigned CFG_W       = 64;  // configuration write data width
  localparam int unsigned N_FU        = 4;   // functional units per cluster
  localparam int unsigned N_DMEM      = 2;   // embedded memories per cluster
  localparam int unsigned N_LUT       = 2;   // 3-LUTs per cluster
  localparam int unsigned DEF_LRF_ENTRIES = 16;  // large rotating register file
  localparam int unsigned DEF_RB_ENTRIES  = 8;  // private register block of a FU
  localparam int unsigned RFAW        = 4;   // register address field width (up to 16 entries)
  localparam int unsigned N_DIR       = 4;   // grid directions N, E, S, W
  localparam int unsigned N_TO_SB     = 2;   // cluster outputs into its switchbox

  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  // ---- 32-bit crossbar port numbering ----------------------------------------
  // A sink's select field holds (source index + 1); 0 leaves it unrouted.
  localparam int unsigned XW_NIN   = 11;
  localparam int unsigned XW_NOUT  = 15;
  localparam int unsigned XW_SELW  = 4;
  // sources
  localparam int unsigned XWS_FU   = 0;   // 0..3  FU result R
  localparam int unsigned XWS_LRF  = 4;   // large RRF read port
  localparam int unsigned XWS_DM   = 5;   // 5..6  data memory read data
  localparam int unsigned XWS_NET  = 7;   // 7..10 incoming links N,E,S,W
  // sinks
  localparam int unsigned XWD_FU   = 0;   // 0..7  FU i input A = 2i, B = 2i+1
  localparam int unsigned XWD_LRF  = 8;   // large RRF write data
  localparam int unsigned XWD_DM   = 9;   // 9..12 memory j address = 9+2j, write data = 10+2j
  localparam int unsigned XWD_SB   = 13;  // 13..14 to switchbox

  // ---- 1-bit crossbar port numbering -------------------------------------------
  localparam int unsigned XB_NIN   = 11;
  localparam int unsigned XB_NOUT  = 13;
  localparam int unsigned XB_SELW  = 4;
  localparam int unsigned XBS_FU   = 0;   // 0..3  FU condition out
  localparam int unsigned XBS_LUT  = 4;   // 4..5  LUT outputs
  localparam int unsigned XBS_LRF  = 6;   // 1-bit large RRF read port
  localparam int unsigned XBS_NET  = 7;   // 7..10 incoming links
  localparam int unsigned XBD_FU   = 0;   // 0..3  FU condition in
  localparam int unsigned XBD_LUT  = 4;   // 4..9  LUT k input i = 4+3k+i
  localparam int unsigned XBD_LRF  = 10;  // 1-bit large RRF write data
  localparam int unsigned XBD_SB   = 11;  // 11..12 to switchbox

  // ---- configuration unit numbers inside a tile ----------------------------
  localparam logic [3:0] U_FU0  = 4'd0;   // 0..3
  localparam logic [3:0] U_LRF  = 4'd4;
  localparam logic [3:0] U_DM0  = 4'd5;   // 5..6
  localparam logic [3:0] U_LUT0 = 4'd7;   // 7..8
  localparam logic [3:0] U_LRF1 = 4'd9;
  localparam logic [3:0] U_XW   = 4'd10;
  localparam logic [3:0] U_XB   = 4'd11;
  localparam logic [3:0] U_SB   = 4'd12;

  // Configuration write inside a tile. is_static selects the unit's static
  // (configuration-time) word instead of the per-phase word at 'addr'.
  typedef struct packed {
    logic             we;
    logic             is_static;
    logic [3:0]       unit;
    logic [PHW-1:0]   addr;
    logic [CFG_W-1:0] data;
  } cfg_wr_t;

  // ---- functional unit ---------------------------------------------------
  typedef enum logic [3:0] {
    OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR,
    OP_SRA, OP_EQ,  OP_NE,  OP_LT, OP_LTU, OP_SEL, OP_PASSX, OP_PASSY
  } alu_op_e;

  // ALU operand sources
  typedef enum logic [2:0] {
    SRC_A, SRC_AREG, SRC_B, SRC_BREG, SRC_FB, SRC_RB0, SRC_RB1, SRC_ZERO
  } opnd_sel_e;

  // register block write sources
  typedef enum logic [1:0] {WS_ALU, WS_A, WS_B, WS_FB} rb_wsrc_e;

  // FU result (R) sources
  typedef enum logic [1:0] {OUT_ALU, OUT_FB, OUT_RB0, OUT_RB1} out_sel_e;

  typedef struct packed {
    alu_op_e         op;
    opnd_sel_e       xsel;
    opnd_sel_e       ysel;
    logic            a_en;       // load input retiming register A
    logic            b_en;       // load input retiming register B
    logic            fb_en;      // load feedback register
    logic            rb_we;
    rb_wsrc_e        rb_wsrc;
    logic [RFAW-1:0] rb_waddr;
    logic [RFAW-1:0] rb_raddr0;
    logic [RFAW-1:0] rb_raddr1;
    logic            rb_wave_inc;
    out_sel_e        out_sel;
  } fu_cfg_t;

  // ---- large rotating register file ------------------------------------------
  typedef struct packed {
    logic            we;
    logic [RFAW-1:0] waddr;
    logic [RFAW-1:0] raddr;
    logic            wave_inc;
  } lrf_cfg_t;

  // ---- data memory -------------------------------------------------------
  typedef struct packed {
    logic we;
    logic re;
  } dm_cfg_t;

  // ---- switchbox: per outgoing direction a source select ---------------------
  // 0..3 incoming direction, 4..5 cluster output, 6 hold, 7 zero
  typedef struct packed {
    logic [N_DIR-1:0][2:0] wsel;
    logic [N_DIR-1:0][2:0] bsel;
  } sb_cfg_t;

  localparam int unsigned SB_HOLD = 6;
  localparam int unsigned SB_ZERO = 7;

  // Static writes (is_static = 1): data[CFG_W-1] = 0 sets the unit's static
  // word; data[CFG_W-1] = 1 loads data[DW-1:0] into entry 'addr' of the unit's
  // register file (constants of the non-rotating region).
  localparam int unsigned CST_FLAG = CFG_W - 1;

  // static word: number of rotating entries (the rest are fixed / constants)
  localparam int unsigned STAT_W = RFAW + 1;

endpackage
