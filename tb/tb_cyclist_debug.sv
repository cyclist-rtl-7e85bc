// Testbench for cyclist_debug: a small behavioural state array stands in for the tile. Checks
// peek responses, addressed and broadcast pokes and steps, forwarding of foreign packets, the
// one-cycle chain latency, and trace injection into empty chain slots.
module tb_cyclist_debug;
  import cyclist_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [TILE_ID_W-1:0] tile_id = 11'd7;
  dbg_pkt_t chain_in, chain_out;
  logic acc_valid, acc_write, step_valid, trace_valid, trace_ready;
  dbg_space_e acc_space;
  logic [MEM_AW-1:0] acc_addr, trace_addr;
  logic [XLEN-1:0] acc_wdata, acc_rdata, step_count, trace_data;
  logic [31:0] state [4][16];
  logic [31:0] last_step;
  int checks = 0, failures = 0;

  cyclist_debug dut (.*);
  always #5 clk = ~clk;

  assign acc_rdata = state[acc_space][acc_addr[3:0]];
  always_ff @(posedge clk) begin
    if (acc_valid && acc_write) state[acc_space][acc_addr[3:0]] <= acc_wdata;
    if (step_valid) last_step <= step_count;
  end

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dbg_pkt_t pkt(input dbg_cmd_e c, input logic [10:0] t, input dbg_space_e s,
                                   input logic [9:0] a, input logic [31:0] d);
    dbg_pkt_t p;
    p.valid = 1; p.cmd = c; p.tile = t; p.space = s; p.addr = a; p.data = d;
    return p;
  endfunction

  task automatic send(input dbg_pkt_t p);
    @(negedge clk); chain_in = p;
    @(negedge clk); chain_in = '0;
  endtask

  task automatic expect_out(input dbg_pkt_t p, input string what);
    checks++;
    if (chain_out !== p) begin failures++; $display("FAIL %s: got %h exp %h", what, chain_out, p); end
  endtask

  initial begin
    chain_in = '0; trace_valid = 0; trace_addr = 0; trace_data = 0; last_step = 0;
    for (int s = 0; s < 4; s++) for (int a = 0; a < 16; a++) state[s][a] = 32'(s * 100 + a);
    repeat (2) @(posedge clk); rst_n = 1;
    // addressed poke is consumed
    send(pkt(CMD_POKE, 11'd7, SP_DMEM, 10'd3, 32'hCAFE_0003));
    expect_out('0, "addressed poke consumed");
    checks++; if (state[SP_DMEM][3] != 32'hCAFE_0003) failures++;
    // peek returns the value as a response
    send(pkt(CMD_PEEK, 11'd7, SP_DMEM, 10'd3, 32'd0));
    expect_out(pkt(CMD_RESP, 11'd7, SP_DMEM, 10'd3, 32'hCAFE_0003), "peek response");
    // foreign packet forwarded untouched, poke not applied
    send(pkt(CMD_POKE, 11'd9, SP_REG, 10'd1, 32'h1111));
    expect_out(pkt(CMD_POKE, 11'd9, SP_REG, 10'd1, 32'h1111), "foreign forwarded");
    checks++; if (state[SP_REG][1] != 32'd1) failures++;
    // broadcast poke applied and forwarded
    send(pkt(CMD_POKE, TILE_BCAST, SP_CTRL, 10'd2, 32'h5));
    expect_out(pkt(CMD_POKE, TILE_BCAST, SP_CTRL, 10'd2, 32'h5), "broadcast forwarded");
    checks++; if (state[SP_CTRL][2] != 32'h5) failures++;
    // broadcast step
    send(pkt(CMD_STEP, TILE_BCAST, SP_CTRL, 10'd0, 32'd42));
    checks++; if (last_step != 32'd42) failures++;
    // trace injection into an empty chain
    @(negedge clk); trace_valid = 1; trace_addr = 10'd17; trace_data = 32'hBEEF;
    #1; checks++; if (!trace_ready) failures++;
    @(negedge clk); trace_valid = 0;
    @(negedge clk);
    expect_out(pkt(CMD_TRACE, 11'd7, SP_IMEM, 10'd17, 32'hBEEF), "trace packet");
    // trace waits while the chain carries foreign traffic
    @(negedge clk); chain_in = pkt(CMD_RESP, 11'd2, SP_REG, 10'd0, 32'h22);
    trace_valid = 1; trace_data = 32'h77; trace_addr = 10'd1;
    @(negedge clk); trace_valid = 0; chain_in = pkt(CMD_RESP, 11'd3, SP_REG, 10'd0, 32'h33);
    expect_out(pkt(CMD_RESP, 11'd2, SP_REG, 10'd0, 32'h22), "foreign first");
    #1; checks++; if (trace_ready) begin failures++; $display("slot should be busy"); end
    @(negedge clk); chain_in = '0;
    expect_out(pkt(CMD_RESP, 11'd3, SP_REG, 10'd0, 32'h33), "foreign second");
    @(negedge clk);
    expect_out(pkt(CMD_TRACE, 11'd7, SP_IMEM, 10'd1, 32'h77), "delayed trace");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
