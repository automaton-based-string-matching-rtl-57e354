// pre_hashing_unit: quick test of whether the current state can advance on
// the next input byte without falling back to the root.
//
// Each state owns a BV_W-bit vector. Offline, every character that has a goto
// edge from the state, or from any state on its failure chain other than the
// root, is hashed into it. The hash is the low log2(BV_W) bits of the character,
// one-hot encoded. A clear bit ("no hit") proves that the automaton falls back
// to the root on this byte, so the engine may use the root-indexing result
// directly. A set bit ("hit") may be a true or false positive, and the slow
// bitmap AC step must run.
//
// Timing: en is a one-cycle start pulse. The vector of cur_state is read and
// tested on that edge, so `over`, `hit` and `no_hit` are valid one cycle after
// en. `over` stays high until the next en. bv_we writes the vector of state
// bv_addr.
//
// Following the original thesis design: the per-state vector, the mask-low-bits/one-hot hash, the
// 32-bit vector size and the single-byte suffix. This design's own choices: the
// synchronous read, the vector memory being inside this unit and addressed by
// the current state number, and the write port.
module pre_hashing_unit
  import sm_pkg::*;
#(
  parameter int unsigned NUM_STATES = 4096,
  parameter int unsigned BV_W       = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  state_t                        cur_state,
  input  logic [7:0]                    c0,
  output logic                          over,
  output logic                          hit,
  output logic                          no_hit,
  input  logic                          bv_we,
  input  logic [$clog2(NUM_STATES)-1:0] bv_addr,
  input  logic [BV_W-1:0]               bv_wdata
);

  localparam int unsigned HB = $clog2(BV_W);
  localparam int unsigned SA = $clog2(NUM_STATES);

  logic [BV_W-1:0] bv_mem [NUM_STATES];

  always_ff @(posedge clk) begin
    if (bv_we) bv_mem[bv_addr] <= bv_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      over <= 1'b0;
      hit  <= 1'b0;
    end else if (en) begin
      over <= 1'b1;
      hit  <= bv_mem[cur_state[SA-1:0]][c0[HB-1:0]];
    end
  end

  assign no_hit = over & ~hit;

endmodule
