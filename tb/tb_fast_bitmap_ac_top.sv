// tb_fast_bitmap_ac_top: end-to-end test of the matching engine at its
// default sizes.
//
// A reference Aho-Corasick model (ac_ref_pkg) builds the tables, which are
// written over the bus the way a host driver would. Text is written into the
// text buffers and the engine is started. After each interrupt the match
// count, the result buffer and the final automaton state are compared with
// the byte-at-a-time reference automaton. The phases are:
//  1. the worked example: patterns TEST, THE, HE and text TESTTHEUSHER. The
//     states after each consuming step must be 2,3,4,5,6,0,8,0,
//  2. a random pattern set with two buffers queued back to back (ping-pong,
//     automaton state carried across buffers) and odd lengths (one-byte tail),
//  3. a buffer with more matches than the result buffer holds (overflow),
//  4. pattern-free text, whose cycle count must be 5 cycles per 2 bytes in
//     index mode and 4 in direct mode,
//  5. direct root-index mode with the NEXT table reloaded, and random text
//     again.
// Every mechanism is counted, and one that never happens is a failure.
module tb_fast_bitmap_ac_top;
  import sm_pkg::*;
  import ac_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [BUS_AW-1:0] bus_addr = 0;
  logic bus_we = 0, bus_re = 0;
  logic [BUS_DW-1:0] bus_wdata = 0, bus_rdata;
  logic irq;
  fsm_state_e fsm_state;

  fast_bitmap_ac_top dut (.*);

  localparam int TEXT_BYTES = 2048;
  localparam int RES_DEPTH = 256;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ bus access
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

  // ------------------------------------------------------- mechanism counts
  int ev_root_ri, ev_nohit, ev_hit, ev_ac_next, ev_fail_nonroot, ev_fail_root_ri;
  int ev_false_pos, ev_tail, ev_direct, ev_pingpong, ev_overflow, ev_irq;
  fsm_state_e prev_st = S_IDLE;
  logic prev_root = 1;
  logic hit_pending = 0;
  int commit_states [$];
  always @(posedge clk) begin
    if (prev_st == S_MATCH && fsm_state == S_ROOT_MATCH &&  prev_root) ev_root_ri++;
    if (prev_st == S_MATCH && fsm_state == S_ROOT_MATCH && !prev_root) ev_nohit++;
    if (prev_st == S_MATCH && fsm_state == S_AC_MATCH   && !prev_root) begin
      ev_hit++;
      hit_pending = 1;
    end
    if (prev_st == S_AC_MATCH && fsm_state == S_SET_ROOT_IDX) ev_fail_root_ri++;
    if (dut.commit) begin
      if (dut.upd == UPD_AC_NEXT) ev_ac_next++;
      if (dut.upd == UPD_FAIL) ev_fail_nonroot++;
      if (dut.upd == UPD_ROOT || dut.upd == UPD_ROOT_1) ev_tail++;
      if (dut.upd == UPD_RI && dut.direct_mode) ev_direct++;
      // a pre-hash hit that ends at the root without a goto was a false positive
      if (hit_pending && dut.upd != UPD_AC_NEXT && dut.upd != UPD_FAIL) ev_false_pos++;
      if (dut.upd != UPD_FAIL) hit_pending = 0;
    end
    prev_st = fsm_state;
    prev_root = dut.root_state;
  end
  // states reached by commits that consumed bytes
  always @(posedge clk)
    if (dut.commit && dut.upd inside {UPD_RI, UPD_AC_NEXT, UPD_ROOT_1})
      commit_states.push_back(int'(dut.u_ctrl.new_state));

  // ------------------------------------------------------------ table load
  task automatic load_next(ac_model m, bit direct);
    for (int a = 0; a < 65536; a++) bwr(RG_RINEXT, a, 32'(m.next_entry(a, direct)));
  endtask

  task automatic load(ac_model m, bit direct);
    for (int s = 0; s < m.nstates; s++) begin
      for (int w = 0; w < 8; w++) bwr(RG_STATE, s * 16 + w, m.bitmap[s][32*w +: 32]);
      bwr(RG_STATE, s * 16 + SW_BASE, 32'(m.base[s]));
      bwr(RG_STATE, s * 16 + SW_FAIL, 32'(m.fail[s]));
      bwr(RG_STATE, s * 16 + SW_INFO,
          m.out_id[s] >= 0 ? {1'b1, 15'd0, 16'(m.out_id[s])} : 32'd0);
      bwr(RG_BITVEC, s, m.bv[s]);
    end
    foreach (m.acnext[i]) bwr(RG_ACNEXT, i, 32'(m.acnext[i]));
    for (int c = 0; c < 256; c++) begin
      bwr(RG_IDX1, c, 32'(m.code1[c]));
      bwr(RG_IDX2, c, 32'(m.code2[c]));
    end
    load_next(m, direct);
  endtask

  // ------------------------------------------------------- text and results
  task automatic put_text(input int b, input byte unsigned t [$]);
    for (int w = 0; w < (t.size() + 3) / 4; w++) begin
      logic [31:0] d = '0;
      for (int i = 0; i < 4; i++) if (4 * w + i < t.size()) d[8*i +: 8] = t[4*w+i];
      bwr(b ? RG_TEXT1 : RG_TEXT0, w, d);
    end
    bwr(RG_REGS, b ? int'(REG_LEN1) : int'(REG_LEN0), 32'(t.size()));
  endtask

  // Golden scan: returns (id << 16 | pos) list and advances the state.
  function automatic void golden(ac_model m, byte unsigned t [$], ref int st, ref int exp [$]);
    exp.delete();
    foreach (t[i]) begin
      st = m.step(st, int'(t[i]));
      if (m.out_id[st] >= 0) exp.push_back((m.out_id[st] << 16) | i);
    end
  endfunction

  task automatic wait_done(input int b, output longint cycles);
    logic [31:0] d;
    longint t0 = cyc;
    d = 0;
    while (!d[b]) begin
      wait (irq);
      brd(RG_REGS, int'(REG_STATUS), d);
    end
    cycles = cyc - t0;
    ev_irq++;
  endtask

  task automatic check_results(input int b, input int exp [$], input int st, input string tag);
    logic [31:0] d;
    int n = exp.size() > RES_DEPTH ? RES_DEPTH : exp.size();
    brd(RG_REGS, b ? int'(REG_MCOUNT1) : int'(REG_MCOUNT0), d);
    check(d == 32'(n), $sformatf("%s: match count %0d, expected %0d", tag, d, n));
    for (int i = 0; i < n; i++) begin
      brd(b ? RG_RES1 : RG_RES0, i, d);
      check(d == 32'(exp[i]), $sformatf("%s: result %0d = %08x, expected %08x", tag, i, d, exp[i]));
    end
    brd(RG_REGS, int'(REG_STATUS), d);
    check(d[2+b] == (exp.size() > RES_DEPTH), $sformatf("%s: overflow flag", tag));
    if (d[2+b]) ev_overflow++;
    bwr(RG_REGS, int'(REG_STATUS), 32'(1 << b));
  endtask

  // The engine scans the buffer after the one it scanned last first.
  int nb = 0;

  // Runs one buffer alone and checks it.
  task automatic run_one(ac_model m, input int b, input byte unsigned t [$], ref int st,
                         input string tag, output longint cycles);
    int exp [$];
    logic [31:0] d;
    put_text(b, t);
    golden(m, t, st, exp);
    bwr(RG_REGS, int'(REG_TEXT_RDY), 32'(1 << b));
    wait_done(b, cycles);
    check_results(b, exp, st, tag);
    brd(RG_REGS, int'(REG_STATE), d);
    check(d == 32'(st), $sformatf("%s: final state %0d, expected %0d", tag, d, st));
    nb = 1 - b;
  endtask

  function automatic void rand_text(ac_model m, string pats [$], int len, ref byte unsigned t [$]);
    string alpha = "ABCDEFGHTES";
    t.delete();
    while (t.size() < len) begin
      int r = $urandom_range(0, 99);
      if (r < 12) begin
        string p = pats[$urandom_range(0, pats.size() - 1)];
        for (int i = 0; i < p.len() && t.size() < len; i++) t.push_back(p[i]);
      end else if (r < 70) t.push_back(alpha[$urandom_range(0, alpha.len() - 1)]);
      else if (r < 85) t.push_back(8'(alpha[$urandom_range(0, alpha.len() - 1)]) + 8'h20);
      else t.push_back(8'($urandom));
    end
  endfunction

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ac_model ex, m;
    string pats [$];
    byte unsigned t0 [$], t1 [$];
    int st, exp0 [$], exp1 [$];
    longint cycles;
    logic [31:0] d;
    string ex_text;
    int exp_states [$] = '{2, 3, 4, 5, 6, 0, 8, 0};

    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1. worked example
    ex = new();
    ex.add("TEST", 0); ex.add("THE", 1); ex.add("HE", 2);
    ex.build();
    load(ex, 0);
    bwr(RG_REGS, int'(REG_CTRL), 32'd1);
    t0.delete();
    ex_text = "TESTTHEUSHER";
    for (int i = 0; i < ex_text.len(); i++) t0.push_back(ex_text[i]);
    st = 0;
    commit_states.delete();
    run_one(ex, 0, t0, st, "example", cycles);
    check(commit_states == exp_states, "example: state sequence 2,3,4,5,6,0,8,0");
    if (commit_states != exp_states) foreach (commit_states[i]) $display("  step %0d -> %0d", i, commit_states[i]);

    // ---- 2. random pattern set, ping-pong buffers
    pats = '{"TEST", "THE", "HE"};
    for (int i = 0; i < 40; i++) begin
      string p, alpha;
      int L;
      p = "";
      alpha = "ABCDEFGHTES";
      L = $urandom_range(3, 8);
      for (int k = 0; k < L; k++) p = {p, string'(alpha[$urandom_range(0, alpha.len() - 1)])};
      pats.push_back(p);
    end
    m = new();
    foreach (pats[i]) m.add(pats[i], i);
    m.build();
    $display("random set: %0d patterns, %0d states, %0d next-table entries",
             pats.size(), m.nstates, m.acnext.size());
    load(m, 0);
    bwr(RG_REGS, int'(REG_STATE), 0);  // read-only; ignored
    st = 0;
    // bring the engine to the root with a pattern-free buffer first
    t0.delete();
    repeat (2) t0.push_back(8'h01);
    run_one(m, 0, t0, st, "flush", cycles);
    for (int round = 0; round < 3; round++) begin
      rand_text(m, pats, TEXT_BYTES - 1 - 2 * round, t0);
      rand_text(m, pats, 1001 + 2 * round, t1);
      put_text(nb, t0);
      put_text(1 - nb, t1);
      golden(m, t0, st, exp0);
      golden(m, t1, st, exp1);
      bwr(RG_REGS, int'(REG_TEXT_RDY), 32'd3);
      wait_done(nb, cycles);
      check_results(nb, exp0, st, $sformatf("round %0d first", round));
      wait_done(1 - nb, cycles);
      check_results(1 - nb, exp1, st, $sformatf("round %0d second", round));
      brd(RG_REGS, int'(REG_STATE), d);
      check(d == 32'(st), $sformatf("round %0d: final state %0d, expected %0d", round, d, st));
      ev_pingpong++;
    end

    // ---- 3. result overflow
    t0.delete();
    for (int i = 0; i < 1200; i++) t0.push_back((i % 2) ? 8'h45 : 8'h48);  // "HE"
    run_one(m, 0, t0, st, "overflow", cycles);

    // ---- 4. pattern-free text: cycle count in index mode
    t0.delete();
    repeat (400) t0.push_back(8'h01);
    run_one(m, 1, t0, st, "rate index", cycles);
    $display("index mode: %0d bytes in %0d cycles", t0.size(), cycles);
    check(cycles >= 5 * 200 && cycles <= 5 * 200 + 12, "index mode takes 5 cycles per 2 bytes");

    // ---- 5. direct mode
    load_next(m, 1);
    bwr(RG_REGS, int'(REG_CTRL), 32'd3);
    run_one(m, 0, t0, st, "rate direct", cycles);
    $display("direct mode: %0d bytes in %0d cycles", t0.size(), cycles);
    check(cycles >= 4 * 200 && cycles <= 4 * 200 + 12, "direct mode takes 4 cycles per 2 bytes");
    for (int round = 0; round < 2; round++) begin
      rand_text(m, pats, TEXT_BYTES - round, t1);
      run_one(m, 1, t1, st, $sformatf("direct round %0d", round), cycles);
    end

    $display("mechanisms: root_ri=%0d nohit=%0d hit=%0d ac_next=%0d fail_nonroot=%0d fail_root_ri=%0d",
             ev_root_ri, ev_nohit, ev_hit, ev_ac_next, ev_fail_nonroot, ev_fail_root_ri);
    $display("            false_pos=%0d tail=%0d direct=%0d pingpong=%0d overflow=%0d irq=%0d",
             ev_false_pos, ev_tail, ev_direct, ev_pingpong, ev_overflow, ev_irq);
    check(ev_root_ri > 0, "root indexing at the root happened");
    check(ev_nohit > 0, "pre-hash no-hit happened");
    check(ev_hit > 0, "pre-hash hit happened");
    check(ev_ac_next > 0, "bitmap AC goto happened");
    check(ev_fail_nonroot > 0, "failure to a non-root state happened");
    check(ev_fail_root_ri > 0, "failure to the root with root-index result happened");
    check(ev_false_pos > 0, "pre-hash false positive happened");
    check(ev_tail > 0, "one-byte tail happened");
    check(ev_direct > 0, "direct root indexing happened");
    check(ev_pingpong > 0, "ping-pong buffers happened");
    check(ev_overflow > 0, "result overflow happened");
    check(ev_irq > 0, "interrupt happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
