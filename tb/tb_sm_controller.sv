// tb_sm_controller: self-checking test of the controller, with the FSM and
// the matching units replaced by scripted stimulus.
//
// Builds a tiny automaton by hand: root 0 has child 1 on 'A'; state 1 has
// children 2 ('B') and 3 ('C'), both match states. It then checks the
// following:
//  * register write/read-back and forwarding of root-index and bit-vector
//    table writes,
//  * FETCH picking a ready buffer, the bytes offered at c0/c1, the bitmap and
//    flags of the current state,
//  * each commit kind (root index, bitmap goto through base + offset,
//    failure, to root, root tail) and the resulting state and position,
//  * result recording {pointer, position}, match count, done, irq and clear,
//  * ping-pong to the second buffer, a zero-length buffer, result overflow.
module tb_sm_controller;
  import sm_pkg::*;

  localparam int NS = 16;
  localparam int RD = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [BUS_AW-1:0] bus_addr = 0;
  logic bus_we = 0, bus_re = 0;
  logic [BUS_DW-1:0] bus_wdata = 0, bus_rdata;
  logic irq, control, no_text, root_state, single_byte, fail_is_root, set_over;
  logic fetch = 0, commit = 0;
  upd_e upd = UPD_NONE;
  logic [7:0] c0, c1;
  state_t cur_state, ri_next = 0;
  logic [BITMAP_W-1:0] bitmap;
  logic direct_mode;
  logic [8:0] ac_offset = 0;
  logic ri_we;
  logic [1:0] ri_sel;
  logic [15:0] ri_addr;
  logic [31:0] ri_wdata;
  logic bv_we;
  logic [3:0] bv_addr;
  logic [31:0] bv_wdata;

  sm_controller #(.NUM_STATES(NS), .ACNEXT_DEPTH(NS), .TEXT_BYTES(64), .RES_DEPTH(RD)) dut (.*);

  int checks = 0, failures = 0;
  int n_ri_fwd = 0, n_bv_fwd = 0;
  always @(posedge clk) begin
    if (ri_we && ri_sel == 2'd2 && ri_addr == 16'h0102 && ri_wdata == 32'd7) n_ri_fwd++;
    if (bv_we && bv_addr == 4'd1 && bv_wdata == 32'h0000_000c) n_bv_fwd++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic bwr(input region_e rg, input int off, input logic [31:0] d);
    @(negedge clk);
    bus_addr = {rg, 20'(off)}; bus_wdata = d; bus_we = 1;
    @(negedge clk);
    bus_we = 0;
  endtask

  task automatic brd(input region_e rg, input int off, output logic [31:0] d);
    @(negedge clk);
    bus_addr = {rg, 20'(off)}; bus_re = 1;
    @(negedge clk);
    bus_re = 0;
    d = bus_rdata;
  endtask

  task automatic do_commit(input upd_e k);
    @(negedge clk);
    upd = k; commit = 1;
    @(negedge clk);
    commit = 0; upd = UPD_NONE;
    check(set_over, "set_over the cycle after commit");
  endtask

  task automatic do_fetch;
    @(negedge clk);
    fetch = 1;
    @(negedge clk);
    fetch = 0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [255:0] bm;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // automaton
    bm = '0; bm["A"] = 1;
    for (int w = 0; w < 8; w++) bwr(RG_STATE, 0 * 16 + w, bm[32*w +: 32]);
    bwr(RG_STATE, 0 * 16 + SW_BASE, 0);
    bwr(RG_STATE, 0 * 16 + SW_FAIL, 0);
    bwr(RG_STATE, 0 * 16 + SW_INFO, 0);
    bm = '0; bm["B"] = 1; bm["C"] = 1;
    for (int w = 0; w < 8; w++) bwr(RG_STATE, 1 * 16 + w, bm[32*w +: 32]);
    bwr(RG_STATE, 1 * 16 + SW_BASE, 1);
    bwr(RG_STATE, 1 * 16 + SW_FAIL, 0);
    bwr(RG_STATE, 1 * 16 + SW_INFO, 0);
    for (int s = 2; s < 4; s++) begin
      for (int w = 0; w < 8; w++) bwr(RG_STATE, s * 16 + w, 0);
      bwr(RG_STATE, s * 16 + SW_BASE, 0);
      bwr(RG_STATE, s * 16 + SW_FAIL, s == 2 ? 1 : 0);   // state 2 fails to 1 (for the test)
      bwr(RG_STATE, s * 16 + SW_INFO, {1'b1, 15'd0, 16'(100 + s)});
    end
    bwr(RG_ACNEXT, 0, 1);
    bwr(RG_ACNEXT, 1, 2);
    bwr(RG_ACNEXT, 2, 3);
    // forwarding
    bwr(RG_RINEXT, 16'h0102, 7);
    bwr(RG_BITVEC, 1, 32'h0000_000c);
    check(n_ri_fwd == 1, "root-index table write forwarded");
    check(n_bv_fwd == 1, "bit-vector write forwarded");
    // registers
    bwr(RG_REGS, int'(REG_CTRL), 3);
    brd(RG_REGS, int'(REG_CTRL), d);
    check(d == 3 && control && direct_mode, "CTRL read-back");
    // text 0: "ABACxyz" (7 bytes), text 1: "AC"
    bwr(RG_TEXT0, 0, {"C", "A", "B", "A"});
    bwr(RG_TEXT0, 1, {8'h00, "z", "y", "x"});
    bwr(RG_REGS, int'(REG_LEN0), 7);
    bwr(RG_TEXT1, 0, {16'h0, "C", "A"});
    bwr(RG_REGS, int'(REG_LEN1), 2);
    check(no_text, "no text before fetch");
    bwr(RG_REGS, int'(REG_TEXT_RDY), 1);
    brd(RG_REGS, int'(REG_TEXT_RDY), d);
    check(d == 1, "TEXT_RDY read-back");
    do_fetch;
    check(!no_text && c0 == "A" && c1 == "B", "fetch offers first two bytes");
    check(root_state && bitmap["A"] && !bitmap["B"], "root state and its bitmap");
    // root index "AB" -> state 2 (match 102 at position 1)
    ri_next = 2;
    do_commit(UPD_RI);
    check(cur_state == 2 && c0 == "A" && c1 == "C", "root index commit: state 2, two bytes consumed");
    check(!fail_is_root, "state 2 fails to non-root");
    // failure -> state 1, no byte consumed
    do_commit(UPD_FAIL);
    check(cur_state == 1 && c0 == "A", "failure commit: state 1, nothing consumed");
    // go to root without consuming
    do_commit(UPD_ROOT);
    check(cur_state == 0 && c0 == "A", "to-root commit");
    // bitmap goto at root: 'A' offset 0 -> acnext[0] = 1
    ac_offset = 0;
    do_commit(UPD_AC_NEXT);
    check(cur_state == 1 && c0 == "C", "goto commit: state 1");
    // bitmap goto at state 1 on 'C': offset 1 -> acnext[1 + 1] = 3 (match 103 at position 3)
    ac_offset = 1;
    do_commit(UPD_AC_NEXT);
    check(cur_state == 3 && c0 == "x", "goto commit through base + offset");
    check(fail_is_root, "state 3 fails to root");
    ri_next = 0;
    do_commit(UPD_RI);
    check(single_byte && c0 == "z", "one byte left");
    do_commit(UPD_ROOT_1);
    check(no_text && irq, "buffer 0 done, irq raised");
    brd(RG_REGS, int'(REG_STATUS), d);
    check(d[1:0] == 2'b01 && d[3:2] == 0, "status: buffer 0 done, no overflow");
    brd(RG_REGS, int'(REG_MCOUNT0), d);
    check(d == 2, "two matches recorded");
    brd(RG_RES0, 0, d);
    check(d == {16'd102, 16'd1}, "result 0 = {102, 1}");
    brd(RG_RES0, 1, d);
    check(d == {16'd103, 16'd3}, "result 1 = {103, 3}");
    bwr(RG_REGS, int'(REG_STATUS), 1);
    check(!irq, "irq cleared");
    // zero-length buffer 1 is completed by fetch; then buffer 0 is refilled
    bwr(RG_REGS, int'(REG_LEN1), 0);
    bwr(RG_REGS, int'(REG_TEXT_RDY), 2);
    do_fetch;
    check(irq && no_text, "empty buffer completes at fetch");
    bwr(RG_REGS, int'(REG_STATUS), 2);
    // overflow: buffer 1 "ACACACACAC" with 5 matches into a 4-entry buffer
    for (int w = 0; w < 3; w++) bwr(RG_TEXT1, w, {"C", "A", "C", "A"});
    bwr(RG_REGS, int'(REG_LEN1), 10);
    bwr(RG_REGS, int'(REG_TEXT_RDY), 2);
    do_fetch;
    for (int k = 0; k < 5; k++) begin
      ri_next = 3;
      do_commit(UPD_RI);
    end
    brd(RG_REGS, int'(REG_STATUS), d);
    check(d[1] && d[3], "buffer 1 done with overflow");
    brd(RG_REGS, int'(REG_MCOUNT1), d);
    check(d == RD, "match count stops at result depth");
    brd(RG_RES1, 3, d);
    check(d == {16'd103, 16'd7}, "last stored result");
    brd(RG_REGS, int'(REG_STATE), d);
    check(d == 3, "state register read-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
