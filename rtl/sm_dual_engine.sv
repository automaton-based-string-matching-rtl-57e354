// sm_dual_engine: two string matching engines behind one bus.
//
// Two engines run side by side, each on its own pair of text buffers, so the
// scan rate for two independent streams (two packets or two files) doubles.
// The automaton tables are common. A bus write to any table region
// (state records, next-state table, root-index tables, bit vectors) goes to
// both engines at once, so the engines always hold identical tables. The
// registers, text buffers and result buffers are per engine. In those
// regions, word-offset bit 19 selects the engine.
//
// Interface: as fast_bitmap_ac_top, with one interrupt and one FSM state per
// engine. Reads return the selected engine's data one cycle after bus_re
// (table regions are write-only; reading them returns no defined value).
//
// The original design runs two engines working together on dual-port memory to
// double throughput. This design's own choices: each engine keeps a
// private copy of the tables instead of sharing one copy through the second
// RAM port, and the address split. The result behaves as if the tables were
// shared, but uses twice the memory.
module sm_dual_engine
  import sm_pkg::*;
#(
  parameter int unsigned NUM_STATES   = 4096,
  parameter int unsigned ACNEXT_DEPTH = 4096,
  parameter int unsigned TEXT_BYTES   = 2048,
  parameter int unsigned RES_DEPTH    = 256,
  parameter int unsigned BV_W         = 32,
  parameter int unsigned IDX_W        = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BUS_AW-1:0] bus_addr,
  input  logic              bus_we,
  input  logic              bus_re,
  input  logic [BUS_DW-1:0] bus_wdata,
  output logic [BUS_DW-1:0] bus_rdata,
  output logic [1:0]        irq,
  output fsm_state_e        fsm_state [2]
);

  region_e rg;
  logic    shared_rg, sel, sel_q;
  assign rg        = region_e'(bus_addr[23:20]);
  assign shared_rg = rg inside {RG_STATE, RG_ACNEXT, RG_IDX1, RG_IDX2, RG_RINEXT, RG_BITVEC};
  assign sel       = bus_addr[19];

  logic [BUS_DW-1:0] rdata [2];

  for (genvar e = 0; e < 2; e++) begin : g_eng
    logic we_e, re_e;
    logic [BUS_AW-1:0] addr_e;
    assign we_e   = bus_we && (shared_rg || sel == 1'(e));
    assign re_e   = bus_re && !shared_rg && sel == 1'(e);
    assign addr_e = shared_rg ? bus_addr : {bus_addr[23:20], 1'b0, bus_addr[18:0]};

    fast_bitmap_ac_top #(
      .NUM_STATES  (NUM_STATES),
      .ACNEXT_DEPTH(ACNEXT_DEPTH),
      .TEXT_BYTES  (TEXT_BYTES),
      .RES_DEPTH   (RES_DEPTH),
      .BV_W        (BV_W),
      .IDX_W       (IDX_W)
    ) u_eng (
      .clk, .rst_n,
      .bus_addr(addr_e), .bus_we(we_e), .bus_re(re_e), .bus_wdata,
      .bus_rdata(rdata[e]), .irq(irq[e]), .fsm_state(fsm_state[e])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sel_q <= 1'b0;
    else if (bus_re) sel_q <= sel;
  end

  assign bus_rdata = rdata[sel_q];

endmodule
