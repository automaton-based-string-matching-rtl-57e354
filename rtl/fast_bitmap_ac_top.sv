// fast_bitmap_ac_top: fast bitmap Aho-Corasick string matching engine.
//
// Multi-pattern matcher over an Aho-Corasick automaton stored as per-state
// 256-bit bitmaps. Two shortcuts avoid the slow bitmap step, which takes 8
// cycles to count ones. At the root, a root-indexing unit consumes two bytes
// per lookup. At any other state, a per-state pre-hash bit vector tells in
// one cycle whether the next byte can stay off the root. If it cannot, the
// root-index result is used directly. The blocks are wired as in the engine's
// block diagram: the SM controller (bus, buffers, automaton tables, current
// state), the FSM, the root-indexing unit, the pre-hashing unit and the
// bitmap AC unit.
//
// Interface: a word-addressed bus (see sm_pkg for the map), with registered
// reads one cycle after bus_re and an irq that is high while a scanned
// buffer is marked done. `fsm_state` is brought out for observation.
//
// Following the original thesis design: the partition into these five blocks and the signals
// between them. This design's own choices: the bus protocol and the table
// sizes (NUM_STATES, ACNEXT_DEPTH, TEXT_BYTES, RES_DEPTH).
module fast_bitmap_ac_top
  import sm_pkg::*;
#(
  parameter int unsigned NUM_STATES   = 4096,
  parameter int unsigned ACNEXT_DEPTH = 4096,
  parameter int unsigned TEXT_BYTES   = 2048,
  parameter int unsigned RES_DEPTH    = 256,
  parameter int unsigned BV_W         = 32,
  parameter int unsigned IDX_W        = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BUS_AW-1:0] bus_addr,
  input  logic              bus_we,
  input  logic              bus_re,
  input  logic [BUS_DW-1:0] bus_wdata,
  output logic [BUS_DW-1:0] bus_rdata,
  output logic              irq,
  output fsm_state_e        fsm_state
);

  localparam int unsigned SA = $clog2(NUM_STATES);

  logic control, no_text, root_state, single_byte, fail_is_root, set_over;
  logic fetch, commit;
  upd_e upd;
  logic root_index_en, pre_hash_en, ac_match_en;
  logic root_index_over, prehash_over, hit, no_hit, ac_match_over, failure;
  logic [7:0] c0, c1;
  state_t cur_state, ri_next;
  logic [BITMAP_W-1:0] bitmap;
  logic direct_mode;
  logic [8:0] ac_offset;
  logic ri_we;
  logic [1:0] ri_sel;
  logic [15:0] ri_addr;
  logic [31:0] ri_wdata;
  logic bv_we;
  logic [SA-1:0] bv_addr;
  logic [BV_W-1:0] bv_wdata;

  sm_controller #(
    .NUM_STATES  (NUM_STATES),
    .ACNEXT_DEPTH(ACNEXT_DEPTH),
    .TEXT_BYTES  (TEXT_BYTES),
    .RES_DEPTH   (RES_DEPTH),
    .BV_W        (BV_W)
  ) u_ctrl (
    .clk, .rst_n,
    .bus_addr, .bus_we, .bus_re, .bus_wdata, .bus_rdata, .irq,
    .control, .no_text, .root_state, .single_byte, .fail_is_root, .set_over,
    .fetch, .commit, .upd,
    .c0, .c1, .cur_state, .bitmap, .direct_mode,
    .ri_next, .ac_offset,
    .ri_we, .ri_sel, .ri_addr, .ri_wdata,
    .bv_we, .bv_addr, .bv_wdata
  );

  sm_fsm u_fsm (
    .clk, .rst_n,
    .control, .no_text, .root_state, .single_byte,
    .root_index_over, .prehash_over, .hit, .no_hit,
    .ac_match_over, .failure, .fail_is_root, .set_over,
    .root_index_en, .pre_hash_en, .ac_match_en,
    .fetch, .commit, .upd,
    .state(fsm_state)
  );

  root_indexing_unit #(.IDX_W(IDX_W)) u_ri (
    .clk, .rst_n,
    .en(root_index_en), .c0, .c1, .direct_mode,
    .over(root_index_over), .next_state(ri_next),
    .tbl_we(ri_we), .tbl_sel(ri_sel), .tbl_addr(ri_addr), .tbl_wdata(ri_wdata)
  );

  pre_hashing_unit #(.NUM_STATES(NUM_STATES), .BV_W(BV_W)) u_ph (
    .clk, .rst_n,
    .en(pre_hash_en), .cur_state, .c0,
    .over(prehash_over), .hit, .no_hit,
    .bv_we, .bv_addr, .bv_wdata
  );

  bitmap_ac_unit u_ac (
    .clk, .rst_n,
    .en(ac_match_en), .c(c0), .bitmap,
    .over(ac_match_over), .failure, .offset(ac_offset)
  );

endmodule
