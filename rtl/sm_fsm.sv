// sm_fsm: control FSM of the string matching engine.
//
// Each matching iteration starts in MATCH. If the current state is the root,
// only the root-indexing unit is launched and the FSM waits in ROOT_MATCH.
// Otherwise the root-indexing, pre-hashing and bitmap AC units are launched
// together. A pre-hash "no hit" sends the FSM to ROOT_MATCH. The root-index
// lookup is already running and supplies the state two bytes ahead. A "hit"
// sends it to AC_MATCH, where it waits for the bitmap AC unit. On success the
// state becomes the child (SET_AC). On failure to a non-root state the state
// becomes the failure state and matching restarts from MATCH on the same byte.
// On failure to the root the root-index result is taken (SET_ROOT_IDX).
// SET_ROOT_IDX and SET_AC issue one `commit` pulse with the update kind `upd`.
// They then wait for the controller's `set_over` and go back to MATCH, or to
// IDLE once the buffer is exhausted (no_text). FETCH waits for a text buffer.
//
// Tail handling is this design's own: when a single byte is left (single_byte),
// no two-byte root lookup is possible. At the root that byte goes through the
// bitmap AC unit on the root's own bitmap (UPD_ROOT_1 if the root has no edge
// on it). Elsewhere a "no hit" or a failure to the root just moves the state
// to the root (UPD_ROOT / UPD_FAIL) without consuming the byte.
//
// Interface: launch pulses root_index_en, pre_hash_en, ac_match_en. The unit
// "over" inputs are levels that stay high until the next launch. fetch is high
// in FETCH.
//
// Following the original thesis design: the state names, the transition conditions of the FSM
// diagram and the parallel launch. This design's own choices: the single-byte
// tail, the one-cycle commit pulse, and dropping the diagram's text_rdy=0 term
// (see the notes).
module sm_fsm
  import sm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       control,
  input  logic       no_text,
  input  logic       root_state,
  input  logic       single_byte,
  input  logic       root_index_over,
  input  logic       prehash_over,
  input  logic       hit,
  input  logic       no_hit,
  input  logic       ac_match_over,
  input  logic       failure,
  input  logic       fail_is_root,
  input  logic       set_over,
  output logic       root_index_en,
  output logic       pre_hash_en,
  output logic       ac_match_en,
  output logic       fetch,
  output logic       commit,
  output upd_e       upd,
  output fsm_state_e state
);

  fsm_state_e state_q, state_d;
  logic       sub_q, sub_d;     // MATCH: units launched; SET_*: commit issued
  upd_e       upd_q, upd_d;

  assign state = state_q;

  always_comb begin
    state_d       = state_q;
    sub_d         = sub_q;
    upd_d         = upd_q;
    root_index_en = 1'b0;
    pre_hash_en   = 1'b0;
    ac_match_en   = 1'b0;
    fetch         = 1'b0;
    commit        = 1'b0;
    upd           = UPD_NONE;

    unique case (state_q)
      S_IDLE: begin
        if (control) state_d = S_FETCH;
      end

      S_FETCH: begin
        fetch = 1'b1;
        if (!control) begin
          state_d = S_IDLE;
        end else if (!no_text) begin
          state_d = S_MATCH;
          sub_d   = 1'b0;
        end
      end

      S_MATCH: begin
        if (!sub_q) begin
          sub_d = 1'b1;
          if (root_state && single_byte) begin
            ac_match_en = 1'b1;
            state_d     = S_AC_MATCH;
          end else if (root_state) begin
            root_index_en = 1'b1;
            state_d       = S_ROOT_MATCH;
          end else begin
            root_index_en = ~single_byte;
            pre_hash_en   = 1'b1;
            ac_match_en   = 1'b1;
          end
        end else if (prehash_over) begin
          if (hit) begin
            state_d = S_AC_MATCH;
          end else if (no_hit && single_byte) begin
            state_d = S_SET_AC;
            sub_d   = 1'b0;
            upd_d   = UPD_ROOT;
          end else if (no_hit) begin
            state_d = S_ROOT_MATCH;
          end
        end
      end

      S_ROOT_MATCH: begin
        if (root_index_over) begin
          state_d = S_SET_ROOT_IDX;
          sub_d   = 1'b0;
          upd_d   = UPD_RI;
        end
      end

      S_AC_MATCH: begin
        if (ac_match_over) begin
          if (!failure) begin
            state_d = S_SET_AC;
            sub_d   = 1'b0;
            upd_d   = UPD_AC_NEXT;
          end else if (root_state) begin
            state_d = S_SET_AC;
            sub_d   = 1'b0;
            upd_d   = UPD_ROOT_1;
          end else if (!fail_is_root || single_byte) begin
            state_d = S_SET_AC;
            sub_d   = 1'b0;
            upd_d   = UPD_FAIL;
          end else if (root_index_over) begin
            state_d = S_SET_ROOT_IDX;
            sub_d   = 1'b0;
            upd_d   = UPD_RI;
          end
        end
      end

      S_SET_ROOT_IDX, S_SET_AC: begin
        if (!sub_q) begin
          commit = 1'b1;
          upd    = upd_q;
          sub_d  = 1'b1;
        end else if (set_over) begin
          sub_d   = 1'b0;
          state_d = no_text ? S_IDLE : S_MATCH;
        end
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      sub_q   <= 1'b0;
      upd_q   <= UPD_NONE;
    end else begin
      state_q <= state_d;
      sub_q   <= sub_d;
      upd_q   <= upd_d;
    end
  end

  // A state update is only committed from one of the two SET states.
  a_commit_in_set: assert property (@(posedge clk) disable iff (!rst_n)
    commit |-> (state_q inside {S_SET_ROOT_IDX, S_SET_AC}));
  // Units are only launched from MATCH.
  a_launch_in_match: assert property (@(posedge clk) disable iff (!rst_n)
    (root_index_en || pre_hash_en || ac_match_en) |-> state_q == S_MATCH);

endmodule
