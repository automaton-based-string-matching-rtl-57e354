// tb_sm_dual_engine: end-to-end test of the two-engine configuration at its
// default sizes.
//
// Tables built by the reference Aho-Corasick model (ac_ref_pkg) are written
// once, and the write reaches both engines. Then:
//  1. the worked example (patterns TEST, THE, HE; text TESTTHEUSHER) runs on
//     both engines at the same time; each engine's consuming steps must land
//     on states 2,3,4,5,6,0,8,0,
//  2. with a random pattern set, the engines scan different random streams
//     concurrently, each through both of its ping-pong buffers, with odd
//     lengths. Results, match counts and final states are checked per
//     engine against the byte-at-a-time reference automaton, and the two
//     scans must overlap in time,
//  3. a result overflow on engine 1,
//  4. pattern-free text: 5 cycles per 2 bytes in index mode, 4 in direct mode,
//  5. direct root-index mode with the NEXT table reloaded, random text on both.
// Each mechanism (root step, pre-hash no-hit, hit, goto, failure to a non-root
// state, failure to the root, false positive, one-byte tail, direct mode,
// ping-pong, overflow, interrupt, concurrent scanning) is counted on both
// engines, and one that never happens is a failure.
module tb_sm_dual_engine;
  import sm_pkg::*;
  import ac_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [BUS_AW-1:0] bus_addr = 0;
  logic bus_we = 0, bus_re = 0;
  logic [BUS_DW-1:0] bus_wdata = 0, bus_rdata;
  logic [1:0] irq;
  fsm_state_e fsm_state [2];

  sm_dual_engine dut (.*);

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
  task automatic bwr(input int e, input region_e rg, input int off, input logic [31:0] d);
    @(negedge clk);
    bus_addr = {rg, 1'(e), 19'(off)}; bus_wdata = d; bus_we = 1;
    @(negedge clk);
    bus_we = 0;
  endtask

  task automatic brd(input int e, input region_e rg, input int off, output logic [31:0] d);
    @(negedge clk);
    bus_addr = {rg, 1'(e), 19'(off)}; bus_re = 1;
    @(negedge clk);
    bus_re = 0;
    d = bus_rdata;
  endtask

  // ------------------------------------------------------- mechanism counts
  int ev_root_ri [2], ev_nohit [2], ev_hit [2], ev_ac_next [2], ev_fail_nonroot [2];
  int ev_fail_root_ri [2], ev_false_pos [2], ev_tail [2], ev_direct [2];
  int ev_pingpong [2], ev_overflow [2], ev_irq [2];
  int ev_concurrent = 0;
  int commit_states [2][$];

  for (genvar e = 0; e < 2; e++) begin : g_mon
    fsm_state_e prev_st = S_IDLE;
    logic prev_root = 1;
    logic hit_pending = 0;
    always @(posedge clk) begin
      if (prev_st == S_MATCH && fsm_state[e] == S_ROOT_MATCH &&  prev_root) ev_root_ri[e]++;
      if (prev_st == S_MATCH && fsm_state[e] == S_ROOT_MATCH && !prev_root) ev_nohit[e]++;
      if (prev_st == S_MATCH && fsm_state[e] == S_AC_MATCH && !prev_root) begin
        ev_hit[e]++;
        hit_pending = 1;
      end
      if (prev_st == S_AC_MATCH && fsm_state[e] == S_SET_ROOT_IDX) ev_fail_root_ri[e]++;
      if (dut.g_eng[e].u_eng.commit) begin
        if (dut.g_eng[e].u_eng.upd == UPD_AC_NEXT) ev_ac_next[e]++;
        if (dut.g_eng[e].u_eng.upd == UPD_FAIL) ev_fail_nonroot[e]++;
        if (dut.g_eng[e].u_eng.upd inside {UPD_ROOT, UPD_ROOT_1}) ev_tail[e]++;
        if (dut.g_eng[e].u_eng.upd == UPD_RI && dut.g_eng[e].u_eng.direct_mode) ev_direct[e]++;
        if (hit_pending && !(dut.g_eng[e].u_eng.upd inside {UPD_AC_NEXT, UPD_FAIL})) ev_false_pos[e]++;
        if (dut.g_eng[e].u_eng.upd != UPD_FAIL) hit_pending = 0;
        if (dut.g_eng[e].u_eng.upd inside {UPD_RI, UPD_AC_NEXT, UPD_ROOT_1})
          commit_states[e].push_back(int'(dut.g_eng[e].u_eng.u_ctrl.new_state));
      end
      prev_st = fsm_state[e];
      prev_root = dut.g_eng[e].u_eng.root_state;
    end
  end

  // both engines inside a matching step in the same cycle
  always @(posedge clk)
    if (!(fsm_state[0] inside {S_IDLE, S_FETCH}) && !(fsm_state[1] inside {S_IDLE, S_FETCH}))
      ev_concurrent++;

  // ------------------------------------------------------------ table load
  task automatic load_next(ac_model m, bit direct);
    for (int a = 0; a < 65536; a++) bwr(0, RG_RINEXT, a, 32'(m.next_entry(a, direct)));
  endtask

  task automatic load(ac_model m, bit direct);
    for (int s = 0; s < m.nstates; s++) begin
      for (int w = 0; w < 8; w++) bwr(0, RG_STATE, s * 16 + w, m.bitmap[s][32*w +: 32]);
      bwr(0, RG_STATE, s * 16 + SW_BASE, 32'(m.base[s]));
      bwr(0, RG_STATE, s * 16 + SW_FAIL, 32'(m.fail[s]));
      bwr(0, RG_STATE, s * 16 + SW_INFO,
          m.out_id[s] >= 0 ? {1'b1, 15'd0, 16'(m.out_id[s])} : 32'd0);
      bwr(0, RG_BITVEC, s, m.bv[s]);
    end
    foreach (m.acnext[i]) bwr(0, RG_ACNEXT, i, 32'(m.acnext[i]));
    for (int c = 0; c < 256; c++) begin
      bwr(0, RG_IDX1, c, 32'(m.code1[c]));
      bwr(0, RG_IDX2, c, 32'(m.code2[c]));
    end
    load_next(m, direct);
  endtask

  // ------------------------------------------------------- text and results
  task automatic put_text(input int e, input int b, input byte unsigned t [$]);
    for (int w = 0; w < (t.size() + 3) / 4; w++) begin
      logic [31:0] d = '0;
      for (int i = 0; i < 4; i++) if (4 * w + i < t.size()) d[8*i +: 8] = t[4*w+i];
      bwr(e, b ? RG_TEXT1 : RG_TEXT0, w, d);
    end
    bwr(e, RG_REGS, b ? int'(REG_LEN1) : int'(REG_LEN0), 32'(t.size()));
  endtask

  function automatic void golden(ac_model m, byte unsigned t [$], ref int st, ref int exp [$]);
    exp.delete();
    foreach (t[i]) begin
      st = m.step(st, int'(t[i]));
      if (m.out_id[st] >= 0) exp.push_back((m.out_id[st] << 16) | i);
    end
  endfunction

  task automatic wait_done(input int e, input int b, output longint cycles);
    logic [31:0] d;
    longint t0 = cyc;
    d = 0;
    while (!d[b]) begin
      wait (irq[e]);
      brd(e, RG_REGS, int'(REG_STATUS), d);
    end
    cycles = cyc - t0;
    ev_irq[e]++;
  endtask

  task automatic check_results(input int e, input int b, input int exp [$], input string tag);
    logic [31:0] d;
    int n = exp.size() > RES_DEPTH ? RES_DEPTH : exp.size();
    brd(e, RG_REGS, b ? int'(REG_MCOUNT1) : int'(REG_MCOUNT0), d);
    check(d == 32'(n), $sformatf("%s: match count %0d, expected %0d", tag, d, n));
    for (int i = 0; i < n; i++) begin
      brd(e, b ? RG_RES1 : RG_RES0, i, d);
      check(d == 32'(exp[i]), $sformatf("%s: result %0d = %08x, expected %08x", tag, i, d, exp[i]));
    end
    brd(e, RG_REGS, int'(REG_STATUS), d);
    check(d[2+b] == (exp.size() > RES_DEPTH), $sformatf("%s: overflow flag", tag));
    if (d[2+b]) ev_overflow[e]++;
    bwr(e, RG_REGS, int'(REG_STATUS), 32'(1 << b));
  endtask

  task automatic check_state(input int e, input int st, input string tag);
    logic [31:0] d;
    brd(e, RG_REGS, int'(REG_STATE), d);
    check(d == 32'(st), $sformatf("%s: final state %0d, expected %0d", tag, d, st));
  endtask

  // buffer each engine will scan first (the one after its last scanned)
  int nb [2] = '{0, 0};

  // Runs one buffer on each engine at once and checks both.
  task automatic run_both(ac_model m, input byte unsigned t [2][$], ref int st [2],
                          input string tag, output longint cycles);
    int exp [2][$];
    longint c0, c1;
    for (int e = 0; e < 2; e++) begin
      int s1 = st[e];
      int x [$];
      put_text(e, nb[e], t[e]);
      golden(m, t[e], s1, x);
      st[e] = s1;
      exp[e] = x;
    end
    bwr(0, RG_REGS, int'(REG_TEXT_RDY), 32'(1 << nb[0]));
    bwr(1, RG_REGS, int'(REG_TEXT_RDY), 32'(1 << nb[1]));
    wait_done(0, nb[0], c0);
    wait_done(1, nb[1], c1);
    cycles = c0 > c1 ? c0 : c1;
    for (int e = 0; e < 2; e++) begin
      check_results(e, nb[e], exp[e], $sformatf("%s engine %0d", tag, e));
      check_state(e, st[e], $sformatf("%s engine %0d", tag, e));
      nb[e] = 1 - nb[e];
    end
  endtask

  function automatic void rand_text(string pats [$], int len, ref byte unsigned t [$]);
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
    #15000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ac_model ex, m;
    string pats [$];
    byte unsigned t [2][$], ta [2][$], tb2 [2][$];
    int st [2], exp_a [2][$], exp_b [2][$];
    longint cycles, ca [2], cb [2];
    string ex_text;
    int exp_states [$] = '{2, 3, 4, 5, 6, 0, 8, 0};

    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1. worked example on both engines
    ex = new();
    ex.add("TEST", 0); ex.add("THE", 1); ex.add("HE", 2);
    ex.build();
    load(ex, 0);
    bwr(0, RG_REGS, int'(REG_CTRL), 32'd1);
    bwr(1, RG_REGS, int'(REG_CTRL), 32'd1);
    ex_text = "TESTTHEUSHER";
    for (int e = 0; e < 2; e++) begin
      t[e].delete();
      for (int i = 0; i < ex_text.len(); i++) t[e].push_back(ex_text[i]);
      st[e] = 0;
      commit_states[e].delete();
    end
    run_both(ex, t, st, "example", cycles);
    for (int e = 0; e < 2; e++)
      check(commit_states[e] == exp_states, $sformatf("example: engine %0d state sequence", e));

    // ---- 2. random set, concurrent ping-pong scanning
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
    load(m, 0);
    for (int e = 0; e < 2; e++) begin
      t[e].delete();
      repeat (2) t[e].push_back(8'h01);
      st[e] = 0;
    end
    run_both(m, t, st, "flush", cycles);
    for (int round = 0; round < 2; round++) begin
      for (int e = 0; e < 2; e++) begin
        rand_text(pats, TEXT_BYTES - 1 - 2 * round - e, ta[e]);
        rand_text(pats, 777 + 2 * round + e, tb2[e]);
        put_text(e, nb[e], ta[e]);
        put_text(e, 1 - nb[e], tb2[e]);
        begin
          int s1 = st[e];
          int xa [$], xb [$];
          golden(m, ta[e], s1, xa);
          golden(m, tb2[e], s1, xb);
          st[e] = s1;
          exp_a[e] = xa;
          exp_b[e] = xb;
        end
      end
      bwr(0, RG_REGS, int'(REG_TEXT_RDY), 32'd3);
      bwr(1, RG_REGS, int'(REG_TEXT_RDY), 32'd3);
      for (int e = 0; e < 2; e++) begin
        wait_done(e, nb[e], ca[e]);
        check_results(e, nb[e], exp_a[e], $sformatf("round %0d engine %0d first", round, e));
      end
      for (int e = 0; e < 2; e++) begin
        wait_done(e, 1 - nb[e], cb[e]);
        check_results(e, 1 - nb[e], exp_b[e], $sformatf("round %0d engine %0d second", round, e));
        check_state(e, st[e], $sformatf("round %0d engine %0d", round, e));
        ev_pingpong[e]++;
      end
    end

    // ---- 3. overflow on engine 1 (engine 0 gets a short clean buffer)
    t[0].delete();
    repeat (6) t[0].push_back(8'h01);
    t[1].delete();
    for (int i = 0; i < 1200; i++) t[1].push_back((i % 2) ? 8'h45 : 8'h48);  // "HE"
    run_both(m, t, st, "overflow", cycles);
    t[1].delete();
    for (int i = 0; i < 1000; i++) t[1].push_back((i % 2) ? 8'h45 : 8'h48);
    t[0] = t[1];
    run_both(m, t, st, "overflow both", cycles);

    // ---- 4. pattern-free text: cycle count in index mode
    for (int e = 0; e < 2; e++) begin
      t[e].delete();
      repeat (400) t[e].push_back(8'h01);
    end
    run_both(m, t, st, "rate index", cycles);
    $display("index mode: 400 bytes per engine in %0d cycles", cycles);
    check(cycles >= 5 * 200 && cycles <= 5 * 200 + 40, "index mode: 5 cycles per 2 bytes, engines in parallel");

    // ---- 5. direct mode
    load_next(m, 1);
    bwr(0, RG_REGS, int'(REG_CTRL), 32'd3);
    bwr(1, RG_REGS, int'(REG_CTRL), 32'd3);
    run_both(m, t, st, "rate direct", cycles);
    $display("direct mode: 400 bytes per engine in %0d cycles", cycles);
    check(cycles >= 4 * 200 && cycles <= 4 * 200 + 40, "direct mode: 4 cycles per 2 bytes, engines in parallel");
    for (int e = 0; e < 2; e++) rand_text(pats, TEXT_BYTES - e, t[e]);
    run_both(m, t, st, "direct random", cycles);

    for (int e = 0; e < 2; e++) begin
      $display("engine %0d: root_ri=%0d nohit=%0d hit=%0d ac_next=%0d fail_nonroot=%0d fail_root_ri=%0d",
               e, ev_root_ri[e], ev_nohit[e], ev_hit[e], ev_ac_next[e], ev_fail_nonroot[e], ev_fail_root_ri[e]);
      $display("          false_pos=%0d tail=%0d direct=%0d pingpong=%0d overflow=%0d irq=%0d",
               ev_false_pos[e], ev_tail[e], ev_direct[e], ev_pingpong[e], ev_overflow[e], ev_irq[e]);
      check(ev_root_ri[e] > 0, "root indexing at the root happened");
      check(ev_nohit[e] > 0, "pre-hash no-hit happened");
      check(ev_hit[e] > 0, "pre-hash hit happened");
      check(ev_ac_next[e] > 0, "bitmap AC goto happened");
      check(ev_fail_nonroot[e] > 0, "failure to a non-root state happened");
      check(ev_fail_root_ri[e] > 0, "failure to the root with root-index result happened");
      check(ev_false_pos[e] > 0, "pre-hash false positive happened");
      check(ev_tail[e] > 0, "one-byte tail happened");
      check(ev_direct[e] > 0, "direct root indexing happened");
      check(ev_pingpong[e] > 0, "ping-pong buffers happened");
      check(ev_overflow[e] > 0, "result overflow happened");
      check(ev_irq[e] > 0, "interrupt happened");
    end
    $display("cycles with both engines matching: %0d", ev_concurrent);
    check(ev_concurrent > 1000, "engines scanned concurrently");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
