// cyclist_debug: one tile's node on the debug scanchain (host interface).
//
// The host reaches every tile through a chain of these nodes, one register stage per tile.
// A packet names a command, a tile (or TILE_BCAST for all tiles), an address space (register
// file, data memory, code memory, control registers), an address and a data word.
//   peek  addressed to this tile: the node reads the state in the same cycle and sends the
//         packet on as a response (CMD_RESP) carrying the value.
//   poke  writes the state. A broadcast poke is passed on so every tile takes it; an
//         addressed one is consumed.
//   step  loads the number of target cycles to run; broadcast or addressed as for poke.
// Any other packet is forwarded unchanged. When the node has no packet to send, it sends the
// waiting trace word, if any: the result of an instruction with its trace bit set, tagged with
// the tile and the instruction's address. The trace slot holds one word; trace_ready is low
// while it is taken. The commands and the chain follow the published design. The packet
// layout, the response-in-place peek and the trace slot are this design's choices.
//
// Timing: a packet on chain_in appears on chain_out one cycle later. acc_* is a
// single-cycle access whose read data must be valid in the same cycle.
module cyclist_debug
  import cyclist_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [TILE_ID_W-1:0] tile_id,
  input  dbg_pkt_t             chain_in,
  output dbg_pkt_t             chain_out,
  // access to the tile's state
  output logic                 acc_valid,
  output logic                 acc_write,
  output dbg_space_e           acc_space,
  output logic [MEM_AW-1:0]    acc_addr,
  output logic [XLEN-1:0]      acc_wdata,
  input  logic [XLEN-1:0]      acc_rdata,
  // step command
  output logic                 step_valid,
  output logic [XLEN-1:0]      step_count,
  // trace words from write-back
  input  logic                 trace_valid,
  output logic                 trace_ready,
  input  logic [MEM_AW-1:0]    trace_addr,
  input  logic [XLEN-1:0]      trace_data
);

  logic     mine, bcast, is_peek, is_poke, is_step, consume;
  logic     slot_full;
  dbg_pkt_t slot;
  dbg_pkt_t next_out;

  always_comb begin
    bcast   = chain_in.tile == TILE_BCAST;
    mine    = chain_in.valid && (chain_in.tile == tile_id || bcast);
    is_peek = mine && !bcast && chain_in.cmd == CMD_PEEK;
    is_poke = mine && chain_in.cmd == CMD_POKE;
    is_step = mine && chain_in.cmd == CMD_STEP;
    consume = !bcast && (is_poke || is_step);

    acc_valid  = is_peek || is_poke;
    acc_write  = is_poke;
    acc_space  = chain_in.space;
    acc_addr   = chain_in.addr;
    acc_wdata  = chain_in.data;
    step_valid = is_step;
    step_count = chain_in.data;

    next_out = chain_in;
    if (is_peek) begin
      next_out.cmd  = CMD_RESP;
      next_out.data = acc_rdata;
    end else if (consume || !chain_in.valid) begin
      next_out = '0;
      if (slot_full) next_out = slot;
    end
  end

  // the trace slot can take a word when empty or when it is being sent this cycle
  assign trace_ready = !slot_full || !(chain_in.valid && !consume);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain_out <= '0;
      slot_full <= 1'b0;
      slot      <= '0;
    end else begin
      chain_out <= next_out;
      if (trace_valid && trace_ready) begin
        slot_full  <= 1'b1;
        slot.valid <= 1'b1;
        slot.cmd   <= CMD_TRACE;
        slot.tile  <= tile_id;
        slot.space <= SP_IMEM;
        slot.addr  <= trace_addr;
        slot.data  <= trace_data;
      end else if (slot_full && (consume || !chain_in.valid)) begin
        slot_full <= 1'b0;
      end
    end
  end

endmodule
