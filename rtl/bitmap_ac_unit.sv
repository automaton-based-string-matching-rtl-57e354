// bitmap_ac_unit: one goto step of bitmap Aho-Corasick.
//
// A state stores a 256-bit bitmap with bit c set when the state has a goto edge
// on character c. Its children are stored contiguously, in character order, in
// a next-state table. The child for character c therefore sits at
// base + (number of ones in bitmap[c-1:0]). This unit checks bitmap[c]. If the
// bit is clear, it raises `failure`, and the controller follows the state's
// failure link. Otherwise it masks off bit c and everything above it, and
// counts the remaining ones 32 bits per cycle, which yields `offset`.
//
// Timing: en is a one-cycle start pulse that samples c and bitmap and clears
// `over`. A clear bit is reported on the start edge, so failure and over are
// valid one cycle after en. A set bit is counted over 8 edges (segment 0 on
// the start edge, segments 1..7 on the next seven edges), so `over` and
// `offset` are valid 8 cycles after en. Outputs hold until the next en.
//
// Following the original thesis design: the check-then-count behaviour and the 8-cycle operation.
// This design's own choices: the 32-bit-per-cycle split that produces those 8
// cycles, and reporting a failure after one cycle.
module bitmap_ac_unit
  import sm_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [7:0]          c,
  input  logic [BITMAP_W-1:0] bitmap,
  output logic                over,
  output logic                failure,
  output logic [8:0]          offset
);

  localparam int unsigned SEGS = 8;
  localparam int unsigned SEG_W = BITMAP_W / SEGS;

  logic [BITMAP_W-1:0] masked_q;
  logic [2:0]          seg_q;
  logic                busy_q;

  // Bits strictly below position c.
  function automatic logic [BITMAP_W-1:0] below_mask(input logic [7:0] ch);
    logic [BITMAP_W-1:0] m;
    m = '0;
    for (int i = 0; i < BITMAP_W; i++) m[i] = (i < int'(ch));
    return m;
  endfunction

  function automatic logic [5:0] popcnt(input logic [SEG_W-1:0] v);
    logic [5:0] n;
    n = '0;
    for (int i = 0; i < SEG_W; i++) n = n + 6'(v[i]);
    return n;
  endfunction

  logic [BITMAP_W-1:0] masked_in;
  assign masked_in = bitmap & below_mask(c);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      over     <= 1'b0;
      failure  <= 1'b0;
      offset   <= '0;
      masked_q <= '0;
      seg_q    <= '0;
      busy_q   <= 1'b0;
    end else if (en) begin
      masked_q <= masked_in;
      seg_q    <= 3'd1;
      failure  <= ~bitmap[c];
      over     <= ~bitmap[c];
      busy_q   <= bitmap[c];
      offset   <= 9'(popcnt(masked_in[SEG_W-1:0]));
    end else if (busy_q) begin
      offset <= offset + 9'(popcnt(masked_q[seg_q*SEG_W +: SEG_W]));
      seg_q  <= seg_q + 3'd1;
      if (seg_q == 3'(SEGS - 1)) begin
        busy_q <= 1'b0;
        over   <= 1'b1;
      end
    end
  end

endmodule
