// tb_sm_fsm: self-checking test of the control FSM, driven by scripted
// unit responses.
//
// Walks every arc: IDLE->FETCH->MATCH, the root path (MATCH->ROOT_MATCH->
// SET_ROOT_IDX), pre-hash no-hit, pre-hash hit with AC success, AC failure to a
// non-root state, AC failure to the root with a late root-index result, the
// single-byte tail cases, and the return to IDLE when the text runs out. It
// checks the launch pulses, the commit pulse and the update kind along the way.
module tb_sm_fsm;
  import sm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic control = 0, no_text = 1, root_state = 1, single_byte = 0;
  logic root_index_over = 0, prehash_over = 0, hit = 0, no_hit = 0;
  logic ac_match_over = 0, failure = 0, fail_is_root = 0, set_over = 0;
  logic root_index_en, pre_hash_en, ac_match_en, fetch, commit;
  upd_e upd;
  fsm_state_e state;

  sm_fsm dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (state %s)", what, state.name());
    end
  endtask

  task automatic tick;
    @(negedge clk);
  endtask

  // Commit phase: expect one commit of kind k, then set_over moves on.
  task automatic do_set(input upd_e k, input logic out_of_text);
    check(commit && upd == k, $sformatf("commit of %s", k.name()));
    tick;
    check(!commit, "single commit pulse");
    set_over = 1; no_text = out_of_text;
    tick;
    set_over = 0;
    check(state == (out_of_text ? S_IDLE : S_MATCH), "leave SET state");
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) tick;
    rst_n = 1;
    tick;
    check(state == S_IDLE, "reset to IDLE");
    control = 1;
    tick;
    check(state == S_FETCH && fetch, "IDLE -> FETCH");
    tick;
    check(state == S_FETCH, "FETCH waits for text");
    no_text = 0;
    tick;
    check(state == S_MATCH, "FETCH -> MATCH");

    // root path
    root_state = 1;
    #1;
    check(root_index_en && !pre_hash_en && !ac_match_en, "root launches root index only");
    tick;
    check(state == S_ROOT_MATCH, "MATCH -> ROOT_MATCH at root");
    tick;
    check(state == S_ROOT_MATCH, "ROOT_MATCH waits");
    root_index_over = 1;
    tick;
    root_index_over = 0;
    check(state == S_SET_ROOT_IDX, "ROOT_MATCH -> SET_ROOT_IDX");
    do_set(UPD_RI, 0);

    // non-root, pre-hash no-hit
    root_state = 0;
    #1;
    check(root_index_en && pre_hash_en && ac_match_en, "parallel launch");
    tick;
    check(state == S_MATCH && !root_index_en, "MATCH waits for pre-hash");
    prehash_over = 1; no_hit = 1;
    tick;
    prehash_over = 0; no_hit = 0;
    check(state == S_ROOT_MATCH, "no-hit -> ROOT_MATCH");
    root_index_over = 1;
    tick;
    root_index_over = 0;
    do_set(UPD_RI, 0);

    // pre-hash hit, AC success
    tick;
    prehash_over = 1; hit = 1;
    tick;
    prehash_over = 0; hit = 0;
    check(state == S_AC_MATCH, "hit -> AC_MATCH");
    repeat (3) tick;
    check(state == S_AC_MATCH, "AC_MATCH waits");
    ac_match_over = 1;
    tick;
    ac_match_over = 0;
    check(state == S_SET_AC, "AC_MATCH -> SET_AC");
    do_set(UPD_AC_NEXT, 0);

    // AC failure to a non-root state
    tick;
    prehash_over = 1; hit = 1;
    tick;
    prehash_over = 0; hit = 0;
    ac_match_over = 1; failure = 1; fail_is_root = 0;
    tick;
    ac_match_over = 0; failure = 0;
    check(state == S_SET_AC, "failure to non-root -> SET_AC");
    do_set(UPD_FAIL, 0);

    // AC failure to the root: waits for the root index
    tick;
    prehash_over = 1; hit = 1;
    tick;
    prehash_over = 0; hit = 0;
    ac_match_over = 1; failure = 1; fail_is_root = 1;
    tick;
    check(state == S_AC_MATCH, "failure to root waits for root index");
    root_index_over = 1;
    tick;
    ac_match_over = 0; failure = 0; fail_is_root = 0; root_index_over = 0;
    check(state == S_SET_ROOT_IDX, "failure to root -> SET_ROOT_IDX");
    do_set(UPD_RI, 0);

    // single byte, non-root, no-hit: state to root without consuming
    single_byte = 1;
    #1;
    check(!root_index_en && pre_hash_en, "no root index launch on one byte");
    tick;
    prehash_over = 1; no_hit = 1;
    tick;
    prehash_over = 0; no_hit = 0;
    check(state == S_SET_AC, "single-byte no-hit -> SET_AC");
    do_set(UPD_ROOT, 0);

    // single byte at root: bitmap step on the root, no edge
    root_state = 1;
    #1;
    check(ac_match_en && !root_index_en, "root tail uses bitmap unit");
    tick;
    check(state == S_AC_MATCH, "root tail -> AC_MATCH");
    ac_match_over = 1; failure = 1; fail_is_root = 1;
    tick;
    ac_match_over = 0; failure = 0; fail_is_root = 0;
    check(state == S_SET_AC, "root tail failure -> SET_AC");
    do_set(UPD_ROOT_1, 1);
    single_byte = 0;

    // back in IDLE, disable while fetching
    tick;
    check(state == S_FETCH, "IDLE -> FETCH again");
    control = 0;
    tick;
    check(state == S_IDLE, "FETCH -> IDLE when disabled");
    tick;
    check(state == S_IDLE, "IDLE holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
