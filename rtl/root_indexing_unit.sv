// root_indexing_unit: resolves two input bytes at the root state in one lookup.
//
// The root state has most failure links pointing at it, so the engine steps two
// bytes at a time from the root. Two index tables (IDX1 for the first byte,
// IDX2 for the second) turn each byte into a short code, a sequential number
// given to the characters that occur at that position of some pattern (code 0
// means "occurs nowhere"). The two codes, concatenated, address the root NEXT
// table, which holds the automaton state reached after both bytes. In direct
// mode, meant for roots with many children, the two bytes themselves address
// NEXT and the IDX step is skipped.
//
// Timing: en is a one-cycle start pulse. It samples c0/c1 and clears `over`.
// Index mode: both IDX tables are read on the start edge and NEXT on the next
// edge, so `over` and `next_state` are valid two cycles after en. Direct mode:
// NEXT is read on the start edge and the result is valid one cycle after en.
// `over` then stays high until the next en.
// Table writes (tbl_we) may happen at any time: 0 = IDX1, 1 = IDX2, 2 = NEXT.
//
// Following the original thesis design: the two-table index scheme, the two-byte step, 8-bit IDX
// entries, the one-cycle direct and two-cycle indexed latencies. This design's
// own choices: the code-0 convention, synchronous table reads and the write
// port.
module root_indexing_unit
  import sm_pkg::*;
#(
  parameter int unsigned IDX_W = 8  // width of an IDX entry; NEXT has 2^(2*IDX_W) entries
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [7:0]  c0,
  input  logic [7:0]  c1,
  input  logic        direct_mode,
  output logic        over,
  output state_t      next_state,
  input  logic        tbl_we,
  input  logic [1:0]  tbl_sel,
  input  logic [15:0] tbl_addr,
  input  logic [31:0] tbl_wdata
);

  localparam int unsigned NEXT_AW = 16;  // max(2*IDX_W, 16) for IDX_W <= 8
  localparam int unsigned NEXT_DEPTH = 1 << NEXT_AW;

  logic [IDX_W-1:0] idx1_mem [256];
  logic [IDX_W-1:0] idx2_mem [256];
  state_t           next_mem [NEXT_DEPTH];

  logic [IDX_W-1:0] code1_q, code2_q;
  logic             stage2_q;

  logic [NEXT_AW-1:0] idx_addr;
  assign idx_addr = NEXT_AW'({code1_q, code2_q});

  always_ff @(posedge clk) begin
    if (tbl_we) begin
      unique case (tbl_sel)
        2'd0:    idx1_mem[tbl_addr[7:0]] <= tbl_wdata[IDX_W-1:0];
        2'd1:    idx2_mem[tbl_addr[7:0]] <= tbl_wdata[IDX_W-1:0];
        default: next_mem[tbl_addr[NEXT_AW-1:0]] <= tbl_wdata[STATE_W-1:0];
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      over       <= 1'b0;
      stage2_q   <= 1'b0;
      code1_q    <= '0;
      code2_q    <= '0;
      next_state <= ROOT;
    end else if (en) begin
      stage2_q <= ~direct_mode;
      over     <= direct_mode;
      code1_q  <= idx1_mem[c0];
      code2_q  <= idx2_mem[c1];
      if (direct_mode) next_state <= next_mem[{c0, c1}];
    end else if (stage2_q) begin
      stage2_q   <= 1'b0;
      over       <= 1'b1;
      next_state <= next_mem[idx_addr];
    end
  end

endmodule
