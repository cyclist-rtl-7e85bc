// Testbench for cyclist_tile: loads a nine-instruction program over the debug chain, steps the
// tile for several target cycles with random gaps on the network inputs and random
// back-pressure on the outputs, and checks every output word, trace word and final state
// against a model of the program computed here. The program covers: masked add, a network
// operand, back-to-back dependences (forwarding), a result multicast to two ports, a load
// feeding the next instruction, a store, a word routed from N to W while a nop computes, rst, mux
// and a trace bit. A final phase with no gaps or back-pressure checks that one target cycle
// takes one clock per instruction.
module tb_cyclist_tile;
  import cyclist_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [TILE_ID_W-1:0] tile_id = 11'd3;
  logic [3:0] in_valid, in_ready, out_valid, out_ready;
  logic [3:0][31:0] in_data, out_data;
  dbg_pkt_t dbg_in, dbg_out;
  int checks = 0, failures = 0;
  int n_in_stall = 0, n_out_stall = 0;

  cyclist_tile dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // ---------------- host side ----------------
  logic [31:0] resp_q [$];
  logic [31:0] trace_q [$];
  logic [9:0]  trace_pc_q [$];
  always @(posedge clk) if (dbg_out.valid) begin
    if (dbg_out.cmd == CMD_RESP) resp_q.push_back(dbg_out.data);
    if (dbg_out.cmd == CMD_TRACE) begin trace_q.push_back(dbg_out.data); trace_pc_q.push_back(dbg_out.addr); end
  end

  task automatic host(input dbg_cmd_e c, input dbg_space_e s, input logic [9:0] a, input logic [31:0] d);
    @(negedge clk);
    dbg_in.valid = 1; dbg_in.cmd = c; dbg_in.tile = tile_id; dbg_in.space = s; dbg_in.addr = a; dbg_in.data = d;
    @(negedge clk);
    dbg_in = '0;
  endtask

  task automatic peek(input dbg_space_e s, input logic [9:0] a, output logic [31:0] v);
    host(CMD_PEEK, s, a, 0);
    repeat (3) @(negedge clk);
    if (resp_q.size() == 0) begin failures++; v = 'x; $display("no peek response"); end
    else v = resp_q.pop_front();
  endtask

  // ---------------- network side ----------------
  logic [31:0] send_q [4][$];
  logic [31:0] recv_q [4][$];
  int gap_pct = 0, bp_pct = 0;
  always @(negedge clk) begin
    for (int d = 0; d < 4; d++) begin
      in_valid[d] = (send_q[d].size() != 0) && ($urandom_range(99) >= gap_pct);
      in_data[d]  = (send_q[d].size() != 0) ? send_q[d][0] : 32'h0;
      out_ready[d] = $urandom_range(99) >= bp_pct;
    end
  end
  always @(posedge clk) begin
    for (int d = 0; d < 4; d++) begin
      if (in_valid[d] && in_ready[d]) void'(send_q[d].pop_front());
      if (out_valid[d] && out_ready[d]) recv_q[d].push_back(out_data[d]);
    end
    if (dut.rf_stall && !dut.freeze) n_in_stall++;
    if (dut.wb_stall) n_out_stall++;
  end

  // ---------------- program ----------------
  localparam logic [3:0] NONE = 4'b0000;
  function automatic logic [31:0] I(input opcode_e op, input int dst, input int x, input int iy,
                                    input int y, input int z, input dir_e in, input logic [3:0] out,
                                    input logic tr = 1'b0);
    return mk_instr(op, 4'(dst), 5'(x), 1'(iy), 5'(y), 5'(z), in, out, tr);
  endfunction

  logic [31:0] prog [9];
  initial begin
    prog[0] = I(OP_ADD, 1, 1, 0, 31, 16, DIR_W, NONE);            // r1 = (r1 + W) & 0xffff
    prog[1] = I(OP_ADD, 2, 1, 1, 3, 0, DIR_N, NONE);              // r2 = r1 + 3
    prog[2] = I(OP_XOR, 15, 2, 0, 1, 0, DIR_N, 4'b0110, 1'b1);    // E,S <= r2 ^ r1, traced
    prog[3] = I(OP_LDI, 3, 0, 0, 0, 5, DIR_N, NONE);              // r3 = dmem[5]
    prog[4] = I(OP_ADD, 3, 3, 1, 1, 0, DIR_N, NONE);              // r3 = r3 + 1
    prog[5] = I(OP_STI, 0, 3, 0, 0, 5, DIR_N, NONE);              // dmem[5] = r3
    prog[6] = I(OP_NOP, 0, 0, 0, 0, 0, DIR_N, 4'b1000);           // W <= N (routed)
    prog[7] = I(OP_RST, 4, 0, 0, 0, 0, DIR_N, NONE);              // r4 = target reset
    prog[8] = I(OP_MUX, 15, 4, 0, 2, 3, DIR_N, 4'b0001);          // N <= r4 ? r2 : r3
  end

  // model state
  logic [31:0] m_r1 = 0, m_cnt = 100;
  logic [31:0] exp_q [4][$];
  logic [31:0] exp_trace [$];

  task automatic run_phase(input int cycles, input logic treset, input int gap, input int bp,
                           output int took);
    int t0;
    logic [31:0] v;
    for (int k = 0; k < cycles; k++) begin
      logic [31:0] w, n, r2;
      w = $urandom; n = $urandom;
      send_q[DIR_W].push_back(w);
      send_q[DIR_N].push_back(n);
      m_r1 = (m_r1 + w) & 32'hFFFF;
      r2 = m_r1 + 3;
      m_cnt = m_cnt + 1;
      exp_q[DIR_E].push_back(r2 ^ m_r1);
      exp_q[DIR_S].push_back(r2 ^ m_r1);
      exp_trace.push_back(r2 ^ m_r1);
      exp_q[DIR_W].push_back(n);
      exp_q[DIR_N].push_back(treset ? r2 : m_cnt);
    end
    gap_pct = gap; bp_pct = bp;
    host(CMD_STEP, SP_CTRL, 0, 32'(cycles));
    t0 = $time / 10;
    do begin
      @(negedge clk);
    end while (dut.busy);
    took = $time / 10 - t0;
    repeat (4) @(negedge clk);
  endtask

  task automatic compare_outputs();
    for (int d = 0; d < 4; d++) begin
      checks++;
      if (recv_q[d].size() != exp_q[d].size()) begin
        failures++; $display("dir %0d: %0d words, expected %0d", d, recv_q[d].size(), exp_q[d].size());
      end
      while (recv_q[d].size() && exp_q[d].size()) begin
        logic [31:0] g, e;
        g = recv_q[d].pop_front(); e = exp_q[d].pop_front();
        checks++;
        if (g != e) begin failures++; $display("dir %0d got %h exp %h", d, g, e); end
      end
      recv_q[d].delete(); exp_q[d].delete();
    end
    checks++;
    if (trace_q.size() != exp_trace.size()) begin failures++; $display("trace count %0d exp %0d", trace_q.size(), exp_trace.size()); end
    while (trace_q.size() && exp_trace.size()) begin
      logic [31:0] g, e;
      logic [9:0] pc;
      g = trace_q.pop_front(); e = exp_trace.pop_front(); pc = trace_pc_q.pop_front();
      checks++;
      if (g != e || pc != 10'd2) begin failures++; $display("trace got %h@%0d exp %h@2", g, pc, e); end
    end
    trace_q.delete(); exp_trace.delete();
  endtask

  initial begin
    int took;
    logic [31:0] v;
    dbg_in = '0; in_valid = 0; in_data = '0; out_ready = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load the program and initial state
    for (int i = 0; i < 9; i++) host(CMD_POKE, SP_IMEM, 10'(i), prog[i]);
    host(CMD_POKE, SP_DMEM, 10'd5, 32'd100);
    host(CMD_POKE, SP_CTRL, CR_CODE_LEN, 32'd9);
    peek(SP_IMEM, 10'd4, v); checks++; if (v != prog[4]) failures++;
    peek(SP_CTRL, CR_TILE_ID, v); checks++; if (v != 32'd3) failures++;

    // phase 1: random input gaps and output back-pressure, target reset low
    run_phase(12, 1'b0, 90, 95, took);
    compare_outputs();
    // phase 2: target reset high
    host(CMD_POKE, SP_CTRL, CR_TGT_RESET, 32'd1);
    run_phase(12, 1'b1, 30, 50, took);
    compare_outputs();
    // phase 3: no gaps, no back-pressure: one clock per instruction
    run_phase(20, 1'b1, 0, 0, took);
    compare_outputs();
    checks++;
    if (took > 20 * 9 + 12) begin failures++; $display("20 target cycles took %0d clocks", took); end
    $display("free-running: 20 target cycles of 9 instructions in %0d clocks", took);

    // final state over the chain
    peek(SP_REG, 10'd1, v); checks++; if (v != m_r1) begin failures++; $display("r1 %h exp %h", v, m_r1); end
    peek(SP_DMEM, 10'd5, v); checks++; if (v != m_cnt) begin failures++; $display("cnt %0d exp %0d", v, m_cnt); end
    peek(SP_CTRL, CR_PASSES, v); checks++; if (v != 32'd44) begin failures++; $display("passes %0d", v); end
    peek(SP_CTRL, CR_STATUS, v); checks++; if (v != 32'd0) failures++;
    $display("input stalls %0d, output stalls %0d", n_in_stall, n_out_stall);
    checks++; if (n_in_stall == 0) failures++;
    checks++; if (n_out_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
