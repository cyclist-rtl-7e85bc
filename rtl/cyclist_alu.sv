// cyclist_alu: execute-stage datapath of a Cyclist tile.
//
// Computes the result of one of the 24 tile operations in a single combinational step. Most
// operations take a bit width w (the z field used as an immediate) and mask their result to w
// bits, so that target signals of any width up to 32 bits are emulated exactly; w = 0 means
// the full 32 bits. Operations with no width (and, or, xor, lsh, mux) pass the full word.
// Compare operations return 0 or 1. The set of operations and which ones take a width follow
// the published instruction table; the opcode numbers, the meaning of w = 0 and the exact
// semantics of the shifts, cat and log2 are this design's reading of it.
//
// Interface: op, operands x, y (register or 5-bit immediate), z (register value), w (mask
// width), imm (10-bit literal), target_reset (read by rst). For ld and ldi the result is the
// word address; for st and sti the result is the data to store.
module cyclist_alu
  import cyclist_pkg::*;
(
  input  opcode_e         op,
  input  logic [XLEN-1:0] x,
  input  logic [XLEN-1:0] y,
  input  logic [XLEN-1:0] z,
  input  logic [4:0]      w,
  input  logic [9:0]      imm,
  input  logic            target_reset,
  output logic [XLEN-1:0] result
);

  logic [XLEN-1:0] m;
  logic [XLEN-1:0] xm, ym;
  logic [XLEN-1:0] xsext;
  logic [5:0]      shamt;
  logic [5:0]      catw;
  logic [4:0]      msb;
  logic signed [XLEN-1:0] xsra;

  always_comb begin
    m     = width_mask(w);
    xm    = x & m;
    ym    = y & m;
    shamt = {1'b0, y[4:0]};
    catw  = (w == 5'd0) ? 6'd32 : {1'b0, w};
    // sign-extend x from bit w-1
    xsext = xm;
    if (w != 5'd0 && x[w - 5'd1]) xsext = xm | ~m;
    xsra  = $signed(xsext) >>> shamt;
    // index of the highest set bit of the masked operand
    msb = '0;
    for (int i = 0; i < XLEN; i++) if (xm[i]) msb = 5'(i);

    unique case (op)
      OP_NOP:  result = '0;
      OP_RST:  result = {{(XLEN-1){1'b0}}, target_reset};
      OP_LIT:  result = {{(XLEN-10){1'b0}}, imm};
      OP_NOT:  result = ~x & m;
      OP_AND:  result = x & y;
      OP_OR:   result = x | y;
      OP_XOR:  result = x ^ y;
      OP_EQ:   result = {{(XLEN-1){1'b0}}, x == y};
      OP_NEQ:  result = {{(XLEN-1){1'b0}}, x != y};
      OP_MUX:  result = x[0] ? y : z;
      OP_LOG2: result = {{(XLEN-5){1'b0}}, msb};
      OP_LSH:  result = x << shamt;
      OP_RSH:  result = xm >> shamt;
      OP_RSHA: result = xsra & m;
      OP_CAT:  result = (catw == 6'd32) ? y : ((x << catw) | (y & width_mask(w)));
      OP_ADD:  result = (x + y) & m;
      OP_SUB:  result = (x - y) & m;
      OP_LT:   result = {{(XLEN-1){1'b0}}, xm <  ym};
      OP_GTE:  result = {{(XLEN-1){1'b0}}, xm >= ym};
      OP_MUL:  result = (x * y) & m;
      OP_LD:   result = x;
      OP_ST:   result = x;
      OP_LDI:  result = {{(XLEN-10){1'b0}}, imm};
      OP_STI:  result = x;
      default: result = '0;
    endcase
  end

endmodule
