// tb_pre_hashing_unit: self-checking test of the per-state hash test.
//
// Runs the worked example first. State 1 has goto edges on E and H, so with a
// 16-bit vector bits 5 and 8 are set. G (low nibble 7) is then a no-hit, and E
// and H are hits. It then loads random 32-bit vectors for many states and
// compares hit/no_hit for random bytes with the reference bit
// vector[byte mod 32]. Every result must appear exactly one cycle after en.
module tb_pre_hashing_unit;
  import sm_pkg::*;

  localparam int unsigned NS = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0;
  state_t cur_state = 0;
  logic [7:0] c0 = 0;
  logic over, hit, no_hit;
  logic bv_we = 0;
  logic [5:0] bv_addr = 0;
  logic [31:0] bv_wdata = 0;
  logic over16, hit16, no_hit16;
  logic bv16_we = 0;
  logic [15:0] bv16_wdata = 0;

  pre_hashing_unit #(.NUM_STATES(NS)) dut (.*);
  pre_hashing_unit #(.NUM_STATES(NS), .BV_W(16)) dut16 (
    .clk, .rst_n, .en, .cur_state, .c0,
    .over(over16), .hit(hit16), .no_hit(no_hit16),
    .bv_we(bv16_we), .bv_addr, .bv_wdata(bv16_wdata));

  int checks = 0, failures = 0;
  logic [31:0] ref_bv [NS];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic probe(input int s, input logic [7:0] c);
    @(negedge clk);
    cur_state = state_t'(s); c0 = c; en = 1;
    @(negedge clk);
    en = 0;
    check(over == 1'b1, "over one cycle after en");
    check(hit == ref_bv[s][c[4:0]], $sformatf("hit state %0d byte %02x", s, c));
    check(no_hit == !ref_bv[s][c[4:0]], "no_hit is the complement");
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Worked example on the 16-bit variant: state 1 -> {E, H}.
    @(negedge clk);
    bv16_we = 1; bv_addr = 1; bv16_wdata = 16'b0000_0001_0010_0000;
    @(negedge clk);
    bv16_we = 0;
    foreach (ref_bv[i]) begin
      ref_bv[i] = $urandom;
      @(negedge clk);
      bv_we = 1; bv_addr = 6'(i); bv_wdata = ref_bv[i];
    end
    @(negedge clk);
    bv_we = 0;
    // 16-bit example checks
    @(negedge clk); cur_state = 1; c0 = "G"; en = 1;
    @(negedge clk); en = 0;
    check(over16 && no_hit16 && !hit16, "G is a no-hit at state 1");
    @(negedge clk); c0 = "E"; en = 1;
    @(negedge clk); en = 0;
    check(hit16 && !no_hit16, "E is a hit at state 1");
    @(negedge clk); c0 = "H"; en = 1;
    @(negedge clk); en = 0;
    check(hit16, "H is a hit at state 1");
    for (int k = 0; k < 500; k++) probe($urandom_range(0, NS - 1), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
