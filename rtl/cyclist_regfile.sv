// cyclist_regfile: the 32 x 32-bit architectural register file of a Cyclist tile.
//
// Three combinational read ports serve the x, y and z operands of an instruction (mux and st
// read three registers), and a fourth serves host peeks. One write port takes the result of the
// write-back stage, or a host poke. A read of the register being written in the same cycle
// returns the new value (write-through), which together with the pipeline's forwarding removes
// every register-dependence stall. The register count follows the published design; the port
// count, the write-through and the reset to zero are this design's choices.
//
// Timing: reads are combinational; a write takes effect at the clock edge.
module cyclist_regfile
  import cyclist_pkg::*;
#(
  parameter int unsigned NREG = 32,
  parameter int unsigned W    = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [2:0][$clog2(NREG)-1:0] ra,
  output logic [2:0][W-1:0]        rd,
  input  logic                     we,
  input  logic [$clog2(NREG)-1:0]  wa,
  input  logic [W-1:0]             wd,
  input  logic [$clog2(NREG)-1:0]  dbg_ra,
  output logic [W-1:0]             dbg_rd
);

  logic [NREG-1:0][W-1:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) regs <= '0;
    else if (we) regs[wa] <= wd;
  end

  always_comb begin
    for (int p = 0; p < 3; p++)
      rd[p] = (we && wa == ra[p]) ? wd : regs[ra[p]];
    dbg_rd = regs[dbg_ra];
  end

endmodule
