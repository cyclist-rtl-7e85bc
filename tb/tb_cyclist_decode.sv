// Testbench for cyclist_decode: directed instruction words with hand-worked control values,
// then random words checked against the field-level rules (network specifiers, register
// writes, routing, memory access).
module tb_cyclist_decode;
  import cyclist_pkg::*;
  logic [31:0] instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  cyclist_decode dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0b exp %0b (instr %h)", what, got, exp, instr); end
  endtask

  initial begin
    // add r3 = r1 + r2, w=8, no network
    instr = 32'b0_01111_0011_00001_0_00010_01000_00_0000; #1;
    expect_bit(ctrl.op == OP_ADD, 1, "add op");
    expect_bit(ctrl.reg_we, 1, "add writes");
    expect_bit(ctrl.rd == 5'd3, 1, "add rd");
    expect_bit(ctrl.need_in, 0, "add no input");
    expect_bit(ctrl.out_mask == 0, 1, "add no output");
    expect_bit(ctrl.trace, 0, "add trace");
    // add to network: dst=15, x = net (31) from W, y immediate 1, out = E|S
    instr = 32'b1_01111_1111_11111_1_00001_00000_11_0110; #1;
    expect_bit(ctrl.reg_we, 0, "net add no reg write");
    expect_bit(ctrl.out_result, 1, "net add sends result");
    expect_bit(ctrl.x_net, 1, "x from net");
    expect_bit(ctrl.y_imm, 1, "y immediate");
    expect_bit(ctrl.y_net, 0, "imm y not net");
    expect_bit(ctrl.need_in, 1, "needs input");
    expect_bit(ctrl.in_dir == DIR_W, 1, "in west");
    expect_bit(ctrl.out_mask == 4'b0110, 1, "out mask");
    expect_bit(ctrl.trace, 1, "trace bit");
    // nop that routes N -> E|W
    instr = 32'b0_00000_0000_00000_0_00000_00000_00_1010; #1;
    expect_bit(ctrl.need_in, 1, "route needs input");
    expect_bit(ctrl.out_result, 0, "route forwards input");
    expect_bit(ctrl.reg_we, 0, "nop no write");
    // mux with z from network
    instr = 32'b0_01001_0100_00001_1_00010_11111_10_0000; #1;
    expect_bit(ctrl.z_net, 1, "mux z net");
    expect_bit(ctrl.y_imm, 0, "mux y never immediate");
    expect_bit(ctrl.need_in, 1, "mux needs in");
    // st: memory write, no register write
    instr = 32'b0_10101_0000_00001_0_00010_00011_00_0000; #1;
    expect_bit(ctrl.mem_wr, 1, "st mem write");
    expect_bit(ctrl.reg_we, 0, "st no reg write");
    expect_bit(ctrl.mem_direct, 0, "st register address");
    // ldi r5 <- mem[{y,z}] = 0x3FF
    instr = 32'b0_10110_0101_00000_0_11111_11111_00_0000; #1;
    expect_bit(ctrl.mem_rd, 1, "ldi read");
    expect_bit(ctrl.mem_direct, 1, "ldi direct");
    expect_bit(ctrl.imm10 == 10'h3FF, 1, "ldi address");
    expect_bit(ctrl.need_in, 0, "ldi ignores x=0");
    // random words against the rules
    for (int k = 0; k < 5000; k++) begin
      instr_t i;
      logic noresult, usex;
      instr = $urandom;
      i = instr_t'(instr);
      if (i.op > OP_STI) continue;
      #1;
      noresult = (i.op == OP_NOP || i.op == OP_ST || i.op == OP_STI);
      usex = !(i.op inside {OP_NOP, OP_RST, OP_LIT, OP_LDI});
      expect_bit(ctrl.reg_we, !noresult && i.dst != 4'd15, "rand reg_we");
      expect_bit(ctrl.out_result, !noresult && i.dst == 4'd15, "rand out_result");
      expect_bit(ctrl.x_net, usex && i.x == 5'd31, "rand x_net");
      expect_bit(ctrl.out_mask == i.out, 1, "rand out");
      expect_bit(ctrl.need_in, ctrl.x_net || ctrl.y_net || ctrl.z_net ||
                 (i.out != 0 && !(i.dst == 4'd15 && !noresult)), "rand need_in");
      expect_bit(ctrl.mem_rd, i.op == OP_LD || i.op == OP_LDI, "rand mem_rd");
      expect_bit(ctrl.mem_wr, i.op == OP_ST || i.op == OP_STI, "rand mem_wr");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
