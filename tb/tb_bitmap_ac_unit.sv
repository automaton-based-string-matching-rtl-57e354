// tb_bitmap_ac_unit: self-checking test of the bitmap goto step.
//
// Drives random bitmaps of varying density and random bytes. When the
// bitmap's bit for the byte is clear, expects `failure` one cycle after en.
// Otherwise, expects the count of ones below the byte as `offset` exactly 8
// cycles after en. Also checks that a new en restarts a busy unit.
module tb_bitmap_ac_unit;
  import sm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0;
  logic [7:0] c = 0;
  logic [255:0] bitmap = '0;
  logic over, failure;
  logic [8:0] offset;

  bitmap_ac_unit dut (.*);

  int checks = 0, failures = 0;
  int n_fail = 0, n_hit = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic step(input logic [255:0] bm, input logic [7:0] ch);
    int lat, expo;
    @(negedge clk);
    bitmap = bm; c = ch; en = 1;
    @(negedge clk);
    en = 0;
    bitmap = ~bm;  // the unit must have latched its operand
    lat = 1;
    while (!over && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    expo = 0;
    for (int i = 0; i < int'(ch); i++) expo += int'(bm[i]);
    if (!bm[ch]) begin
      n_fail++;
      check(failure && lat == 1, $sformatf("failure for %02x (lat %0d)", ch, lat));
    end else begin
      n_hit++;
      check(!failure, "no failure when bit set");
      check(lat == 8, $sformatf("8-cycle latency, got %0d", lat));
      check(offset == 9'(expo), $sformatf("offset %0d exp %0d for %02x", offset, expo, ch));
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] bm;
    repeat (3) @(negedge clk);
    rst_n = 1;
    bm = '1;
    step(bm, 8'd255);
    step(bm, 8'd0);
    for (int k = 0; k < 600; k++) begin
      for (int w = 0; w < 8; w++) bm[32*w +: 32] = $urandom;
      if (k % 3 == 1) for (int w = 0; w < 8; w++) bm[32*w +: 32] &= $urandom;
      if (k % 3 == 2) for (int w = 0; w < 8; w++) bm[32*w +: 32] |= $urandom;
      step(bm, 8'($urandom));
    end
    // restart while busy: start a hit, then restart with a different byte
    bm = '1;
    @(negedge clk); bitmap = bm; c = 8'd200; en = 1;
    @(negedge clk); en = 0;
    @(negedge clk);
    step(bm, 8'd17);
    check(n_fail > 10 && n_hit > 10, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
