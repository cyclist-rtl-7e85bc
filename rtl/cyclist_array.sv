// cyclist_array: the Cyclist emulation fabric, a ROWS x COLS mesh of tiles.
//
// Each tile's east output queue feeds the west input queue of its east neighbour, and so on for
// all four directions. The compiler routes every word statically: a tile moves a word from one
// of its input ports to any set of its output ports. Links at the edge of the mesh are ports of
// this module, for off-array IO or for joining several arrays. The debug scanchain runs through
// every tile in a snake: along row 0 from west to east, back along row 1 from east to west, and
// so on. A tile's id is its position on the chain; the host enters at dbg_in and leaves at
// dbg_out.
//
// Edge ports are indexed by row (west_*, east_*) or by column (north_*, south_*). *_in_* words
// enter the array; *_out_* words leave it. Each link is a valid/ready pair with a 32-bit word.
//
// The mesh, the queue pairs and the snake chain follow the published design. The default shape
// 14 x 20 (280 tiles) is this design's choice for the published 280-tile example die.
module cyclist_array
  import cyclist_pkg::*;
#(
  parameter int unsigned ROWS = 14,
  parameter int unsigned COLS = 20
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // west edge
  input  logic [ROWS-1:0]            west_in_valid,
  output logic [ROWS-1:0]            west_in_ready,
  input  logic [ROWS-1:0][XLEN-1:0]  west_in_data,
  output logic [ROWS-1:0]            west_out_valid,
  input  logic [ROWS-1:0]            west_out_ready,
  output logic [ROWS-1:0][XLEN-1:0]  west_out_data,
  // east edge
  input  logic [ROWS-1:0]            east_in_valid,
  output logic [ROWS-1:0]            east_in_ready,
  input  logic [ROWS-1:0][XLEN-1:0]  east_in_data,
  output logic [ROWS-1:0]            east_out_valid,
  input  logic [ROWS-1:0]            east_out_ready,
  output logic [ROWS-1:0][XLEN-1:0]  east_out_data,
  // north edge
  input  logic [COLS-1:0]            north_in_valid,
  output logic [COLS-1:0]            north_in_ready,
  input  logic [COLS-1:0][XLEN-1:0]  north_in_data,
  output logic [COLS-1:0]            north_out_valid,
  input  logic [COLS-1:0]            north_out_ready,
  output logic [COLS-1:0][XLEN-1:0]  north_out_data,
  // south edge
  input  logic [COLS-1:0]            south_in_valid,
  output logic [COLS-1:0]            south_in_ready,
  input  logic [COLS-1:0][XLEN-1:0]  south_in_data,
  output logic [COLS-1:0]            south_out_valid,
  input  logic [COLS-1:0]            south_out_ready,
  output logic [COLS-1:0][XLEN-1:0]  south_out_data,
  // debug scanchain
  input  dbg_pkt_t                   dbg_in,
  output dbg_pkt_t                   dbg_out
);

  localparam int unsigned NTILES = ROWS * COLS;

  // per-tile port bundles, indexed [row][col][dir]
  logic     [ROWS-1:0][COLS-1:0][NDIRS-1:0]           t_in_valid, t_in_ready, t_out_valid, t_out_ready;
  logic     [ROWS-1:0][COLS-1:0][NDIRS-1:0][XLEN-1:0] t_in_data, t_out_data;
  dbg_pkt_t [NTILES:0]                                chain;

  assign chain[0] = dbg_in;
  assign dbg_out  = chain[NTILES];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned POS = (r % 2 == 0) ? r * COLS + c : r * COLS + (COLS - 1 - c);

      cyclist_tile u_tile (
        .clk, .rst_n,
        .tile_id   (TILE_ID_W'(POS)),
        .in_valid  (t_in_valid[r][c]),
        .in_ready  (t_in_ready[r][c]),
        .in_data   (t_in_data[r][c]),
        .out_valid (t_out_valid[r][c]),
        .out_ready (t_out_ready[r][c]),
        .out_data  (t_out_data[r][c]),
        .dbg_in    (chain[POS]),
        .dbg_out   (chain[POS+1])
      );

      // north side
      if (r == 0) begin : g_n_edge
        assign t_in_valid[r][c][DIR_N]  = north_in_valid[c];
        assign t_in_data[r][c][DIR_N]   = north_in_data[c];
        assign north_in_ready[c]        = t_in_ready[r][c][DIR_N];
        assign north_out_valid[c]       = t_out_valid[r][c][DIR_N];
        assign north_out_data[c]        = t_out_data[r][c][DIR_N];
        assign t_out_ready[r][c][DIR_N] = north_out_ready[c];
      end else begin : g_n_link
        assign t_in_valid[r][c][DIR_N]  = t_out_valid[r-1][c][DIR_S];
        assign t_in_data[r][c][DIR_N]   = t_out_data[r-1][c][DIR_S];
        assign t_out_ready[r][c][DIR_N] = t_in_ready[r-1][c][DIR_S];
      end
      // south side
      if (r == ROWS - 1) begin : g_s_edge
        assign t_in_valid[r][c][DIR_S]  = south_in_valid[c];
        assign t_in_data[r][c][DIR_S]   = south_in_data[c];
        assign south_in_ready[c]        = t_in_ready[r][c][DIR_S];
        assign south_out_valid[c]       = t_out_valid[r][c][DIR_S];
        assign south_out_data[c]        = t_out_data[r][c][DIR_S];
        assign t_out_ready[r][c][DIR_S] = south_out_ready[c];
      end else begin : g_s_link
        assign t_in_valid[r][c][DIR_S]  = t_out_valid[r+1][c][DIR_N];
        assign t_in_data[r][c][DIR_S]   = t_out_data[r+1][c][DIR_N];
        assign t_out_ready[r][c][DIR_S] = t_in_ready[r+1][c][DIR_N];
      end
      // west side
      if (c == 0) begin : g_w_edge
        assign t_in_valid[r][c][DIR_W]  = west_in_valid[r];
        assign t_in_data[r][c][DIR_W]   = west_in_data[r];
        assign west_in_ready[r]         = t_in_ready[r][c][DIR_W];
        assign west_out_valid[r]        = t_out_valid[r][c][DIR_W];
        assign west_out_data[r]         = t_out_data[r][c][DIR_W];
        assign t_out_ready[r][c][DIR_W] = west_out_ready[r];
      end else begin : g_w_link
        assign t_in_valid[r][c][DIR_W]  = t_out_valid[r][c-1][DIR_E];
        assign t_in_data[r][c][DIR_W]   = t_out_data[r][c-1][DIR_E];
        assign t_out_ready[r][c][DIR_W] = t_in_ready[r][c-1][DIR_E];
      end
      // east side
      if (c == COLS - 1) begin : g_e_edge
        assign t_in_valid[r][c][DIR_E]  = east_in_valid[r];
        assign t_in_data[r][c][DIR_E]   = east_in_data[r];
        assign east_in_ready[r]         = t_in_ready[r][c][DIR_E];
        assign east_out_valid[r]        = t_out_valid[r][c][DIR_E];
        assign east_out_data[r]         = t_out_data[r][c][DIR_E];
        assign t_out_ready[r][c][DIR_E] = east_out_ready[r];
      end else begin : g_e_link
        assign t_in_valid[r][c][DIR_E]  = t_out_valid[r][c+1][DIR_W];
        assign t_in_data[r][c][DIR_E]   = t_out_data[r][c+1][DIR_W];
        assign t_out_ready[r][c][DIR_E] = t_in_ready[r][c+1][DIR_W];
      end
    end
  end

endmodule
