// sm_controller: bus slave and data owner of the string matching engine.
//
// The controller sits between the system bus and the matching datapath. It
// holds the following:
//  * the control registers (enable, root-index mode, text lengths, text-ready,
//    done/overflow status, match counts) and the irq output,
//  * two text buffers, so that software can fill one while the other is
//    scanned, and two match-result buffers, one per text buffer,
//  * the automaton: per-state bitmap, next-state base pointer, failure state
//    and match info (flag and matched-pattern pointer), plus the bitmap AC
//    next-state table,
//  * the current state register.
// It presents the two next text bytes (c0, c1), the current state and its
// bitmap to the units. When the FSM pulses `commit` it applies the requested
// update (upd_e). It then advances the text position and, if the new state is
// a match state, appends {pointer, byte position} to the active result buffer.
// When the position reaches the buffer length, the buffer is marked done,
// which raises `irq`, and the other buffer is fetched next. The
// automaton state carries over from one buffer to the next.
//
// Bus: single-cycle writes (bus_we), registered reads (bus_rdata is valid the
// cycle after bus_re). Word address = {region, offset}; see sm_pkg for the map.
// Text words are little-endian: byte 0 of a word is bits [7:0]. Root-index and
// bit-vector table writes are forwarded to their units. Tables may be written
// while the engine runs.
//
// Timing: set_over rises the cycle after commit. no_text, single_byte,
// root_state, fail_is_root and the bytes are combinational from registers.
// Memories are read asynchronously here, as distributed RAM would be.
//
// Following the original thesis design: the role of the block, the two text and two result
// buffers, the length and enable registers, the text-ready register, the
// irq after a buffer is scanned, and the state layout (bitmap, next-state
// pointer, failure state, match pointer). This design's own choices: the
// register map, result format, table sizes and asynchronous reads.
module sm_controller
  import sm_pkg::*;
#(
  parameter int unsigned NUM_STATES   = 4096,
  parameter int unsigned ACNEXT_DEPTH = 4096,
  parameter int unsigned TEXT_BYTES   = 2048,
  parameter int unsigned RES_DEPTH    = 256,
  parameter int unsigned BV_W         = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // system bus
  input  logic [BUS_AW-1:0]             bus_addr,
  input  logic                          bus_we,
  input  logic                          bus_re,
  input  logic [BUS_DW-1:0]             bus_wdata,
  output logic [BUS_DW-1:0]             bus_rdata,
  output logic                          irq,
  // FSM
  output logic                          control,
  output logic                          no_text,
  output logic                          root_state,
  output logic                          single_byte,
  output logic                          fail_is_root,
  output logic                          set_over,
  input  logic                          fetch,
  input  logic                          commit,
  input  upd_e                          upd,
  // datapath
  output logic [7:0]                    c0,
  output logic [7:0]                    c1,
  output state_t                        cur_state,
  output logic [BITMAP_W-1:0]           bitmap,
  output logic                          direct_mode,
  input  state_t                        ri_next,
  input  logic [8:0]                    ac_offset,
  // table writes forwarded to the units
  output logic                          ri_we,
  output logic [1:0]                    ri_sel,
  output logic [15:0]                   ri_addr,
  output logic [31:0]                   ri_wdata,
  output logic                          bv_we,
  output logic [$clog2(NUM_STATES)-1:0] bv_addr,
  output logic [BV_W-1:0]               bv_wdata
);

  localparam int unsigned SA = $clog2(NUM_STATES);
  localparam int unsigned NA = $clog2(ACNEXT_DEPTH);
  localparam int unsigned TA = $clog2(TEXT_BYTES);
  localparam int unsigned PW = $clog2(TEXT_BYTES + 1);
  localparam int unsigned RA = $clog2(RES_DEPTH);
  localparam int unsigned CW = $clog2(RES_DEPTH + 1);

  // ---------------------------------------------------------------- storage
  logic [BITMAP_W-1:0] bitmap_mem [NUM_STATES];
  state_t              base_mem   [NUM_STATES];
  state_t              fail_mem   [NUM_STATES];
  logic [16:0]         info_mem   [NUM_STATES];   // {match, mptr}
  state_t              acnext_mem [ACNEXT_DEPTH];
  logic [7:0]          text_mem   [2][TEXT_BYTES];
  logic [31:0]         res_mem    [2][RES_DEPTH];

  // -------------------------------------------------------------- registers
  logic          en_q, direct_q;
  logic [PW-1:0] len_q [2];
  logic [1:0]    rdy_q, done_q, ovf_q;
  logic [CW-1:0] mcount_q [2];
  state_t        cur_q;
  logic          act_q, act_valid_q, pref_q;
  logic [PW-1:0] pos_q, alen_q;
  logic          set_over_q;

  // --------------------------------------------------------- bus decode
  region_e     rg;
  logic [19:0] off;
  assign rg  = region_e'(bus_addr[23:20]);
  assign off = bus_addr[19:0];

  assign ri_we    = bus_we && (rg == RG_IDX1 || rg == RG_IDX2 || rg == RG_RINEXT);
  assign ri_sel   = (rg == RG_IDX1) ? 2'd0 : (rg == RG_IDX2) ? 2'd1 : 2'd2;
  assign ri_addr  = off[15:0];
  assign ri_wdata = bus_wdata;
  assign bv_we    = bus_we && rg == RG_BITVEC;
  assign bv_addr  = off[SA-1:0];
  assign bv_wdata = bus_wdata[BV_W-1:0];

  // --------------------------------------------------------- datapath view
  logic [SA-1:0] cur_idx;
  assign cur_idx      = cur_q[SA-1:0];
  assign cur_state    = cur_q;
  assign bitmap       = bitmap_mem[cur_idx];
  assign root_state   = (cur_q == ROOT);
  assign fail_is_root = (fail_mem[cur_idx] == ROOT);
  assign control      = en_q;
  assign direct_mode  = direct_q;
  assign set_over     = set_over_q;
  assign irq    = |done_q;

  logic [TA-1:0] p0, p1;
  assign p0 = pos_q[TA-1:0];
  assign p1 = p0 + TA'(1);
  assign c0 = text_mem[act_q][p0];
  assign c1 = text_mem[act_q][p1];

  assign no_text     = !act_valid_q || (pos_q >= alen_q);
  assign single_byte = act_valid_q && (alen_q - pos_q == PW'(1));

  // ----------------------------------------------------- commit computation
  state_t        new_state;
  logic [1:0]    consumed;
  logic [PW-1:0] new_pos;
  state_t        ac_addr;
  always_comb begin
    ac_addr   = base_mem[cur_idx] + state_t'(ac_offset);
    new_state = cur_q;
    consumed  = 2'd0;
    unique case (upd)
      UPD_RI:      begin new_state = ri_next;                      consumed = 2'd2; end
      UPD_AC_NEXT: begin new_state = acnext_mem[ac_addr[NA-1:0]];  consumed = 2'd1; end
      UPD_FAIL:    begin new_state = fail_mem[cur_idx];            consumed = 2'd0; end
      UPD_ROOT:    begin new_state = ROOT;                         consumed = 2'd0; end
      UPD_ROOT_1:  begin new_state = ROOT;                         consumed = 2'd1; end
      default:     begin new_state = cur_q;                        consumed = 2'd0; end
    endcase
    new_pos = pos_q + PW'(consumed);
  end

  logic [16:0] new_info;
  assign new_info = info_mem[new_state[SA-1:0]];

  // Buffer chosen by FETCH.
  logic fetch_ok, fetch_buf;
  always_comb begin
    fetch_ok  = 1'b0;
    fetch_buf = pref_q;
    if (rdy_q[pref_q]) begin
      fetch_ok  = 1'b1;
      fetch_buf = pref_q;
    end else if (rdy_q[~pref_q]) begin
      fetch_ok  = 1'b1;
      fetch_buf = ~pref_q;
    end
  end

  // ---------------------------------------------------------- memory writes
  always_ff @(posedge clk) begin
    if (bus_we) begin
      unique case (rg)
        RG_TEXT0, RG_TEXT1: begin
          for (int i = 0; i < 4; i++)
            text_mem[rg == RG_TEXT1][TA'({off[TA-3:0], 2'b00}) + TA'(i)] <= bus_wdata[8*i +: 8];
        end
        RG_STATE: begin
          if (off[3] == 1'b0)
            bitmap_mem[off[4 +: SA]][32*off[2:0] +: 32] <= bus_wdata;
          else if (off[3:0] == 4'(SW_BASE))
            base_mem[off[4 +: SA]] <= bus_wdata[STATE_W-1:0];
          else if (off[3:0] == 4'(SW_FAIL))
            fail_mem[off[4 +: SA]] <= bus_wdata[STATE_W-1:0];
          else if (off[3:0] == 4'(SW_INFO))
            info_mem[off[4 +: SA]] <= {bus_wdata[31], bus_wdata[15:0]};
        end
        RG_ACNEXT: acnext_mem[off[NA-1:0]] <= bus_wdata[STATE_W-1:0];
        default: ;
      endcase
    end
    if (commit && consumed != 2'd0 && new_info[16] && mcount_q[act_q] < CW'(RES_DEPTH))
      res_mem[act_q][mcount_q[act_q][RA-1:0]] <= {new_info[15:0], 16'(new_pos - PW'(1))};
  end

  // -------------------------------------------------------- control registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q        <= 1'b0;
      direct_q    <= 1'b0;
      len_q[0]    <= '0;
      len_q[1]    <= '0;
      rdy_q       <= '0;
      done_q      <= '0;
      ovf_q       <= '0;
      mcount_q[0] <= '0;
      mcount_q[1] <= '0;
      cur_q       <= ROOT;
      act_q       <= 1'b0;
      act_valid_q <= 1'b0;
      pref_q      <= 1'b0;
      pos_q       <= '0;
      alen_q      <= '0;
      set_over_q  <= 1'b0;
    end else begin
      set_over_q <= commit;

      if (fetch && !act_valid_q && fetch_ok) begin
        mcount_q[fetch_buf] <= '0;
        ovf_q[fetch_buf]    <= 1'b0;
        if (len_q[fetch_buf] == '0) begin
          done_q[fetch_buf] <= 1'b1;
          rdy_q[fetch_buf]  <= 1'b0;
          pref_q            <= ~fetch_buf;
        end else begin
          act_q       <= fetch_buf;
          act_valid_q <= 1'b1;
          pos_q       <= '0;
          alen_q      <= len_q[fetch_buf];
        end
      end

      if (commit) begin
        cur_q <= new_state;
        pos_q <= new_pos;
        if (consumed != 2'd0 && new_info[16]) begin
          if (mcount_q[act_q] < CW'(RES_DEPTH)) mcount_q[act_q] <= mcount_q[act_q] + CW'(1);
          else                                  ovf_q[act_q]    <= 1'b1;
        end
        if (new_pos >= alen_q) begin
          done_q[act_q] <= 1'b1;
          rdy_q[act_q]  <= 1'b0;
          act_valid_q   <= 1'b0;
          pref_q        <= ~act_q;
        end
      end

      if (bus_we && rg == RG_REGS) begin
        unique case (off)
          REG_CTRL:     begin en_q <= bus_wdata[0]; direct_q <= bus_wdata[1]; end
          REG_LEN0:     len_q[0] <= bus_wdata[PW-1:0];
          REG_LEN1:     len_q[1] <= bus_wdata[PW-1:0];
          REG_TEXT_RDY: begin
            rdy_q  <= rdy_q | bus_wdata[1:0];
            done_q <= done_q & ~bus_wdata[1:0];
          end
          REG_STATUS:   done_q <= done_q & ~bus_wdata[1:0];
          default: ;
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- bus read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rdata <= '0;
    end else if (bus_re) begin
      bus_rdata <= '0;
      unique case (rg)
        RG_REGS: begin
          unique case (off)
            REG_CTRL:     bus_rdata <= {30'd0, direct_q, en_q};
            REG_LEN0:     bus_rdata <= 32'(len_q[0]);
            REG_LEN1:     bus_rdata <= 32'(len_q[1]);
            REG_TEXT_RDY: bus_rdata <= {30'd0, rdy_q};
            REG_STATUS:   bus_rdata <= {28'd0, ovf_q, done_q};
            REG_MCOUNT0:  bus_rdata <= 32'(mcount_q[0]);
            REG_MCOUNT1:  bus_rdata <= 32'(mcount_q[1]);
            REG_STATE:    bus_rdata <= 32'(cur_q);
            default:      bus_rdata <= '0;
          endcase
        end
        RG_RES0: bus_rdata <= res_mem[0][off[RA-1:0]];
        RG_RES1: bus_rdata <= res_mem[1][off[RA-1:0]];
        default: bus_rdata <= '0;
      endcase
    end
  end

  // A commit never runs the text position past the buffer end.
  a_pos_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    commit |-> new_pos <= alen_q);

endmodule
