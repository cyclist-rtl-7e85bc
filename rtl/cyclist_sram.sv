// cyclist_sram: code or data memory of a Cyclist tile, 1024 words of 32 bits by default.
//
// The code memory holds the tile's instruction loop; the data memory holds target registers,
// target memories and spilled host registers. The pipeline reads through a synchronous port:
// the word at raddr appears on rdata after the clock edge at which re is high, and rdata holds
// while re is low, so a stalled pipeline keeps its word. One write port serves stores and host
// pokes. A combinational port serves host peeks. The 1024-word depth follows the published
// design; the port arrangement is this design's choice. The array is not reset.
module cyclist_sram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] dbg_raddr,
  output logic [WIDTH-1:0]         dbg_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

  assign dbg_rdata = mem[dbg_raddr];

endmodule
