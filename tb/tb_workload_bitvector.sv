// tb_workload_bitvector: a larger pattern set scanned by three engines whose
// pre-hash bit vectors are 8, 16 and 32 bits wide.
//
// 250 random patterns of 4 to 14 bytes (the pattern count is one of the
// evaluated set sizes; the lengths are this test's own choice) are turned
// into tables by the reference model, once per vector width. All three
// engines scan the same text: two full 2048-byte ping-pong buffers of random
// bytes with patterns and pattern prefixes mixed in. Each engine's results
// and final state must match the byte-at-a-time reference automaton.
//
// The hash keeps the low log2(width) bits of a byte, so a byte that hits in a
// 32-bit vector also hits in the 16-bit and 8-bit ones. A narrower vector can
// therefore only add hits (and bitmap steps), never remove them: the test
// checks hits(8) >= hits(16) >= hits(32) and the same order for the scan time,
// and prints the hit share of each width.
module tb_workload_bitvector;
  import sm_pkg::*;
  import ac_ref_pkg::*;

  localparam int NW = 3;
  localparam int BVW [NW] = '{8, 16, 32};
  localparam int TEXT_BYTES = 2048;
  localparam int RES_DEPTH = 256;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [BUS_AW-1:0] bus_addr = 0;
  logic bus_re = 0;
  logic [NW-1:0] bus_we = 0;
  logic [BUS_DW-1:0] bus_wdata = 0;
  logic [BUS_DW-1:0] rdata [NW];
  logic [NW-1:0] irq;
  fsm_state_e fsm_state [NW];

  for (genvar i = 0; i < NW; i++) begin : g_dut
    fast_bitmap_ac_top #(.BV_W(BVW[i])) u_dut (
      .clk, .rst_n, .bus_addr, .bus_we(bus_we[i]), .bus_re, .bus_wdata,
      .bus_rdata(rdata[i]), .irq(irq[i]), .fsm_state(fsm_state[i])
    );
  end

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

  task automatic bwr(input logic [NW-1:0] sel, input region_e rg, input int off, input logic [31:0] d);
    @(negedge clk);
    bus_addr = {rg, 20'(off)}; bus_wdata = d; bus_we = sel;
    @(negedge clk);
    bus_we = '0;
  endtask

  task automatic brd(input int i, input region_e rg, input int off, output logic [31:0] d);
    @(negedge clk);
    bus_addr = {rg, 20'(off)}; bus_re = 1;
    @(negedge clk);
    bus_re = 0;
    d = rdata[i];
  endtask

  // hits (MATCH -> AC_MATCH) and no-hits (MATCH -> ROOT_MATCH off the root)
  int hits [NW], nohits [NW];
  logic [NW-1:0] all_done;
  for (genvar i = 0; i < NW; i++) begin : g_mon
    fsm_state_e prev = S_IDLE;
    logic prev_root = 1;
    always @(posedge clk) begin
      if (prev == S_MATCH && fsm_state[i] == S_AC_MATCH && !prev_root) hits[i]++;
      if (prev == S_MATCH && fsm_state[i] == S_ROOT_MATCH && !prev_root) nohits[i]++;
      all_done[i] = g_dut[i].u_dut.u_ctrl.done_q == 2'b11;
      prev = fsm_state[i];
      prev_root = g_dut[i].u_dut.root_state;
    end
  end

  initial begin
    #60000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ac_model m [NW];
    string pats [$];
    byte unsigned txt [2][$];
    int exp [2][$];
    int st;
    longint t0, scan [NW];
    logic [31:0] d;

    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int p = 0; p < 250; p++) begin
      string s;
      int L;
      s = "";
      L = $urandom_range(4, 14);
      for (int k = 0; k < L; k++) s = {s, string'(8'($urandom_range(32, 126)))};
      pats.push_back(s);
    end
    for (int i = 0; i < NW; i++) begin
      m[i] = new(BVW[i]);
      foreach (pats[p]) m[i].add(pats[p], p);
      m[i].build();
    end
    $display("250 patterns: %0d states, %0d next-state entries", m[0].nstates, m[0].acnext.size());
    check(m[0].nstates <= 4096 && m[0].acnext.size() <= 4096, "pattern set fits the default tables");

    // common tables go to all engines; bit vectors per width
    for (int s = 0; s < m[0].nstates; s++) begin
      for (int w = 0; w < 8; w++) bwr('1, RG_STATE, s * 16 + w, m[0].bitmap[s][32*w +: 32]);
      bwr('1, RG_STATE, s * 16 + SW_BASE, 32'(m[0].base[s]));
      bwr('1, RG_STATE, s * 16 + SW_FAIL, 32'(m[0].fail[s]));
      bwr('1, RG_STATE, s * 16 + SW_INFO,
          m[0].out_id[s] >= 0 ? {1'b1, 15'd0, 16'(m[0].out_id[s])} : 32'd0);
      for (int i = 0; i < NW; i++) bwr(NW'(1 << i), RG_BITVEC, s, m[i].bv[s]);
    end
    foreach (m[0].acnext[k]) bwr('1, RG_ACNEXT, k, 32'(m[0].acnext[k]));
    for (int c = 0; c < 256; c++) begin
      bwr('1, RG_IDX1, c, 32'(m[0].code1[c]));
      bwr('1, RG_IDX2, c, 32'(m[0].code2[c]));
    end
    for (int a = 0; a < 65536; a++) bwr('1, RG_RINEXT, a, 32'(m[0].next_entry(a, 0)));

    // text: random printable bytes, whole patterns and pattern prefixes
    for (int b = 0; b < 2; b++) begin
      while (txt[b].size() < TEXT_BYTES) begin
        int r, n;
        string p;
        byte unsigned ch;
        r = $urandom_range(0, 99);
        p = pats[$urandom_range(0, pats.size() - 1)];
        n = r < 3 ? p.len() : r < 30 ? $urandom_range(1, p.len() - 1) : 0;
        ch = 8'($urandom_range(32, 126));
        if (n == 0) txt[b].push_back(ch);
        for (int k = 0; k < n && txt[b].size() < TEXT_BYTES; k++) txt[b].push_back(p[k]);
      end
      for (int w = 0; w < TEXT_BYTES / 4; w++)
        bwr('1, b ? RG_TEXT1 : RG_TEXT0, w,
            {txt[b][4*w+3], txt[b][4*w+2], txt[b][4*w+1], txt[b][4*w]});
      bwr('1, RG_REGS, b ? int'(REG_LEN1) : int'(REG_LEN0), 32'(TEXT_BYTES));
    end
    st = 0;
    for (int b = 0; b < 2; b++)
      foreach (txt[b][k]) begin
        st = m[0].step(st, int'(txt[b][k]));
        if (m[0].out_id[st] >= 0) exp[b].push_back((m[0].out_id[st] << 16) | k);
      end

    bwr('1, RG_REGS, int'(REG_CTRL), 32'd1);
    t0 = cyc;
    bwr('1, RG_REGS, int'(REG_TEXT_RDY), 32'd3);
    for (int i = 0; i < NW; i++) scan[i] = 0;
    while (scan[0] == 0 || scan[1] == 0 || scan[2] == 0) begin
      @(posedge clk);
      for (int i = 0; i < NW; i++)
        if (scan[i] == 0 && all_done[i]) scan[i] = cyc - t0;
    end

    for (int i = 0; i < NW; i++) begin
      for (int b = 0; b < 2; b++) begin
        int n;
        n = exp[b].size() > RES_DEPTH ? RES_DEPTH : exp[b].size();
        brd(i, RG_REGS, b ? int'(REG_MCOUNT1) : int'(REG_MCOUNT0), d);
        check(d == 32'(n), $sformatf("BV%0d buffer %0d: match count %0d, expected %0d", BVW[i], b, d, n));
        for (int k = 0; k < n; k++) begin
          brd(i, b ? RG_RES1 : RG_RES0, k, d);
          check(d == 32'(exp[b][k]), $sformatf("BV%0d buffer %0d result %0d", BVW[i], b, k));
        end
      end
      brd(i, RG_REGS, int'(REG_STATE), d);
      check(d == 32'(st), $sformatf("BV%0d: final state %0d, expected %0d", BVW[i], d, st));
      $display("BV %2d bits: %0d hits, %0d no-hits off the root (hit share %0d%%), 4096 bytes in %0d cycles",
               BVW[i], hits[i], nohits[i], 100 * hits[i] / (hits[i] + nohits[i]), scan[i]);
    end
    $display("matches: %0d + %0d", exp[0].size(), exp[1].size());
    check(exp[0].size() + exp[1].size() > 0, "text contains matches");
    check(hits[0] >= hits[1] && hits[1] >= hits[2], "narrower vectors never hit less");
    check(hits[0] > hits[2], "8-bit vectors hit more often than 32-bit ones");
    check(scan[0] >= scan[1] && scan[1] >= scan[2], "narrower vectors never scan faster");
    check(nohits[2] > 0, "32-bit vectors send some steps back to the root");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
