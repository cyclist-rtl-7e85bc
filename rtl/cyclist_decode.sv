// cyclist_decode: instruction decoder of a Cyclist tile (decode stage).
//
// Splits a 32-bit word into a control bundle. It works out which operand fields name registers,
// which name the network input register (specifier 31) and whether y is an immediate (iy set).
// It also decides whether the result is written to a register (dst 0-14) or sent to the
// network (dst 15), whether the instruction dequeues its network input port, and what goes to
// the output ports named by the `out` mask. That is the result when the destination is the
// network register; otherwise the word from the network input, forwarded in parallel with the
// compute. Field widths follow the published instruction format. The specifier values,
// the trace-bit position and the operand roles of ld/st/ldi/sti are this design's reading.
//
// Purely combinational.
module cyclist_decode
  import cyclist_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);

  instr_t i;
  logic   use_x, use_y, use_z;  // which fields are register operands
  logic   no_result;

  always_comb begin
    i = instr_t'(instr);
    use_x = 1'b0;
    use_y = 1'b0;
    use_z = 1'b0;
    unique case (i.op)
      OP_NOP, OP_RST, OP_LIT, OP_LDI:               ;
      OP_NOT, OP_LOG2, OP_LD:                       use_x = 1'b1;
      OP_MUX, OP_ST:                                begin use_x = 1'b1; use_y = 1'b1; use_z = 1'b1; end
      OP_STI:                                       use_x = 1'b1;
      default:                                      begin use_x = 1'b1; use_y = 1'b1; end
    endcase
    // the y field of mux and st is always a register
    if (i.op != OP_MUX && i.op != OP_ST && i.iy) use_y = 1'b0;

    no_result = (i.op == OP_NOP) || (i.op == OP_ST) || (i.op == OP_STI);

    ctrl.op         = i.op;
    ctrl.trace      = i.trace;
    ctrl.x          = i.x;
    ctrl.y          = i.y;
    ctrl.z          = i.z;
    ctrl.x_net      = use_x && (i.x == SRC_NET);
    ctrl.y_net      = use_y && (i.y == SRC_NET);
    ctrl.z_net      = use_z && (i.z == SRC_NET);
    ctrl.y_imm      = (i.op != OP_MUX) && (i.op != OP_ST) && i.iy;
    ctrl.imm10      = {i.y, i.z};
    ctrl.reg_we     = !no_result && (i.dst != DST_NET);
    ctrl.rd         = {1'b0, i.dst};
    ctrl.out_mask   = i.out;
    ctrl.out_result = !no_result && (i.dst == DST_NET);
    ctrl.in_dir     = i.in;
    ctrl.need_in    = ctrl.x_net || ctrl.y_net || ctrl.z_net ||
                      ((i.out != 4'd0) && !ctrl.out_result);
    ctrl.mem_rd     = (i.op == OP_LD) || (i.op == OP_LDI);
    ctrl.mem_wr     = (i.op == OP_ST) || (i.op == OP_STI);
    ctrl.mem_direct = (i.op == OP_LDI) || (i.op == OP_STI);
  end

endmodule
