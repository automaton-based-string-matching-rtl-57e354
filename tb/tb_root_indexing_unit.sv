// tb_root_indexing_unit: self-checking test of the two-byte root lookup.
//
// Loads IDX1/IDX2 and the whole NEXT table with pseudo-random contents kept in
// a reference copy, plus the worked example of patterns TEST, THE and HE
// (codes H=1, T=2 for the first byte; E=1, H=2, T=3 for the second). It then
// checks the state returned for random and example byte pairs in both modes,
// and that `over` rises exactly 2 cycles after en in index mode and 1 cycle
// after en in direct mode.
module tb_root_indexing_unit;
  import sm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0, direct_mode = 0;
  logic [7:0] c0 = 0, c1 = 0;
  logic over;
  state_t next_state;
  logic tbl_we = 0;
  logic [1:0] tbl_sel = 0;
  logic [15:0] tbl_addr = 0;
  logic [31:0] tbl_wdata = 0;

  root_indexing_unit dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] idx1_ref [256];
  logic [7:0] idx2_ref [256];
  state_t next_ref [65536];

  task automatic wr(input logic [1:0] sel, input int addr, input int data);
    @(negedge clk);
    tbl_we = 1; tbl_sel = sel; tbl_addr = 16'(addr); tbl_wdata = 32'(data);
    @(negedge clk);
    tbl_we = 0;
  endtask

  task automatic lookup(input logic [7:0] a, input logic [7:0] b, input logic dm);
    int lat;
    state_t exp;
    @(negedge clk);
    c0 = a; c1 = b; direct_mode = dm; en = 1;
    @(negedge clk);
    en = 0;
    lat = 1;
    while (!over && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    exp = dm ? next_ref[{a, b}] : next_ref[{idx1_ref[a], idx2_ref[b]}];
    checks++;
    if (next_state !== exp) begin
      failures++;
      $display("FAIL pair %02x %02x dm=%0d: got %0d exp %0d", a, b, dm, next_state, exp);
    end
    checks++;
    if (lat != (dm ? 1 : 2)) begin
      failures++;
      $display("FAIL latency %0d in mode %0d", lat, dm);
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      idx1_ref[i] = 8'($urandom_range(0, 15));
      idx2_ref[i] = 8'($urandom_range(0, 15));
    end
    // Worked example: first byte H=1, T=2; second byte E=1, H=2, T=3.
    idx1_ref["H"] = 1; idx1_ref["T"] = 2;
    idx2_ref["E"] = 1; idx2_ref["H"] = 2; idx2_ref["T"] = 3;
    for (int i = 0; i < 256; i++) begin
      wr(2'd0, i, idx1_ref[i]);
      wr(2'd1, i, idx2_ref[i]);
    end
    for (int i = 0; i < 65536; i++) next_ref[i] = state_t'($urandom);
    next_ref[{8'd2, 8'd1}] = 2;  // TE
    next_ref[{8'd2, 8'd2}] = 5;  // TH
    next_ref[{8'd2, 8'd3}] = 1;  // TT
    next_ref[{8'd1, 8'd1}] = 8;  // HE
    for (int i = 0; i < 65536; i++) wr(2'd2, i, next_ref[i]);

    lookup("T", "E", 0);
    checks++; if (next_state !== 2) failures++;
    lookup("T", "H", 0);
    checks++; if (next_state !== 5) failures++;
    lookup("T", "T", 0);
    checks++; if (next_state !== 1) failures++;
    lookup("H", "E", 0);
    checks++; if (next_state !== 8) failures++;
    for (int k = 0; k < 400; k++) lookup(8'($urandom), 8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
