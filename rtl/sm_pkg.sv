// sm_pkg: types and constants shared by the fast bitmap Aho-Corasick string
// matching engine.
//
// The engine walks an Aho-Corasick automaton stored in bitmap form. The root
// state is numbered 0, and states are STATE_W-bit numbers. The 16-bit width is
// one of the two state-number widths the design's memory budget is given for
// (16 and 32 bits). The FSM state names copy the control-flow diagram. The
// update kinds and the bus map are this implementation's own choices.
package sm_pkg;

  localparam int unsigned STATE_W = 16;
  localparam int unsigned BITMAP_W = 256;
  typedef logic [STATE_W-1:0] state_t;
  localparam state_t ROOT = '0;

  // Control FSM states (names as in the control-flow diagram).
  typedef enum logic [2:0] {
    S_IDLE         = 3'd0,
    S_FETCH        = 3'd1,
    S_MATCH        = 3'd2,
    S_ROOT_MATCH   = 3'd3,
    S_SET_ROOT_IDX = 3'd4,
    S_AC_MATCH     = 3'd5,
    S_SET_AC       = 3'd6
  } fsm_state_e;

  // How the controller updates the current state when the FSM commits.
  typedef enum logic [2:0] {
    UPD_NONE    = 3'd0,
    UPD_RI      = 3'd1,  // state <= root-index result, consume 2 bytes
    UPD_AC_NEXT = 3'd2,  // state <= next table[base + offset], consume 1 byte
    UPD_FAIL    = 3'd3,  // state <= failure state, consume nothing
    UPD_ROOT    = 3'd4,  // state <= root, consume nothing
    UPD_ROOT_1  = 3'd5   // state stays root, consume 1 byte (no goto at root)
  } upd_e;

  // Bus map: word address = {region[3:0], offset[19:0]}.
  localparam int unsigned BUS_AW = 24;
  localparam int unsigned BUS_DW = 32;
  typedef enum logic [3:0] {
    RG_REGS    = 4'd0,
    RG_TEXT0   = 4'd1,
    RG_TEXT1   = 4'd2,
    RG_RES0    = 4'd3,
    RG_RES1    = 4'd4,
    RG_STATE   = 4'd5,
    RG_ACNEXT  = 4'd6,
    RG_IDX1    = 4'd7,
    RG_IDX2    = 4'd8,
    RG_RINEXT  = 4'd9,
    RG_BITVEC  = 4'd10
  } region_e;

  // Register offsets inside RG_REGS.
  localparam logic [19:0] REG_CTRL     = 20'd0;  // [0] enable, [1] direct root index mode
  localparam logic [19:0] REG_LEN0     = 20'd1;  // bytes in text buffer 0
  localparam logic [19:0] REG_LEN1     = 20'd2;  // bytes in text buffer 1
  localparam logic [19:0] REG_TEXT_RDY = 20'd3;  // write 1 to set [1:0]; read back
  localparam logic [19:0] REG_STATUS   = 20'd4;  // [1:0] buffer done (write 1 clears), [3:2] result overflow
  localparam logic [19:0] REG_MCOUNT0  = 20'd5;  // matches recorded for buffer 0
  localparam logic [19:0] REG_MCOUNT1  = 20'd6;  // matches recorded for buffer 1
  localparam logic [19:0] REG_STATE    = 20'd7;  // current automaton state (read only)

  // Word layout of one state record in RG_STATE: offset = {state, word[3:0]}.
  localparam int unsigned SW_BASE = 8;   // next-state table base address
  localparam int unsigned SW_FAIL = 9;   // failure state
  localparam int unsigned SW_INFO = 10;  // [31] match flag, [15:0] matched pointer

  // Per-state record held by the controller (bit vector lives in pre-hashing unit).
  typedef struct packed {
    logic [BITMAP_W-1:0] bitmap;
    state_t              base;
    state_t              fail;
    logic                match;
    logic [15:0]         mptr;
  } state_rec_t;

endpackage
