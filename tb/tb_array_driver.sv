// tb_array_driver: host and edge-link model for end-to-end tests of cyclist_array.
//
// Acts as the host on the debug chain and as the outside world on the array's edge links.
// It broadcasts one six-instruction program to every tile, marks one tile's instruction for
// tracing with an addressed poke, and steps the array K target cycles. Meanwhile it feeds
// random words into the west, north and east edges, with random gaps and back-pressure.
// It then checks every word leaving the east, south and west edges and the trace stream, and
// reads back each tile's state with a pipelined burst of peeks (a snapshot save). Every tile
// runs the same program:
//   0  add  NET = W + 1        -> E and S (multicast): the west word gains 1 per column
//   1  add  r3  = r3 + N       accumulates the words arriving from the north
//   2  nop  route E -> W       east-edge words travel to the west edge unchanged
//   3  ldi  r1 = dmem[0]
//   4  add  r1 = r1 + 1        (traced in one tile)
//   5  sti  dmem[0] = r1       per-tile target-cycle counter kept in data memory
// The event vectors (one bit per tile) come from the enclosing testbench and are counted so
// the test can show that each mechanism happened.
module tb_array_driver
  import cyclist_pkg::*;
#(
  parameter int R   = 14,
  parameter int C   = 20,
  parameter int K   = 6,     // target cycles to run
  parameter int GAP = 30,    // percent of cycles an edge input is withheld
  parameter int BP  = 30     // percent of cycles an edge output is not accepted
) (
  input  logic               clk,
  output logic               rst_n,
  output logic [R-1:0]       west_in_valid,
  input  logic [R-1:0]       west_in_ready,
  output logic [R-1:0][31:0] west_in_data,
  input  logic [R-1:0]       west_out_valid,
  output logic [R-1:0]       west_out_ready,
  input  logic [R-1:0][31:0] west_out_data,
  output logic [R-1:0]       east_in_valid,
  input  logic [R-1:0]       east_in_ready,
  output logic [R-1:0][31:0] east_in_data,
  input  logic [R-1:0]       east_out_valid,
  output logic [R-1:0]       east_out_ready,
  input  logic [R-1:0][31:0] east_out_data,
  output logic [C-1:0]       north_in_valid,
  input  logic [C-1:0]       north_in_ready,
  output logic [C-1:0][31:0] north_in_data,
  input  logic [C-1:0]       north_out_valid,
  output logic [C-1:0]       north_out_ready,
  output logic [C-1:0]       south_in_valid,
  output logic [C-1:0][31:0] south_in_data,
  input  logic [C-1:0]       south_out_valid,
  output logic [C-1:0]       south_out_ready,
  input  logic [C-1:0][31:0] south_out_data,
  output dbg_pkt_t           dbg_in,
  input  dbg_pkt_t           dbg_out,
  input  logic [R*C-1:0]     ev_in_stall,
  input  logic [R*C-1:0]     ev_out_stall,
  input  logic [R*C-1:0]     ev_multicast,
  input  logic [R*C-1:0]     ev_route,
  input  logic [R*C-1:0]     ev_load,
  input  logic [R*C-1:0]     ev_store,
  input  logic [R*C-1:0]     ev_busy
);

  int checks = 0, failures = 0;
  longint n_in_stall = 0, n_out_stall = 0, n_multicast = 0, n_route = 0, n_load = 0, n_store = 0;
  int n_peek = 0, n_poke = 0, n_bcast = 0, n_step = 0, n_trace = 0;
  localparam int TRACE_TILE = (R * C) / 2;

  // ---------------- chain ----------------
  logic [31:0] resp_q [$];
  logic [31:0] trace_q [$];
  always @(posedge clk) if (rst_n && dbg_out.valid) begin
    if (dbg_out.cmd == CMD_RESP) resp_q.push_back(dbg_out.data);
    if (dbg_out.cmd == CMD_TRACE && dbg_out.tile == TILE_ID_W'(TRACE_TILE)) trace_q.push_back(dbg_out.data);
  end

  task automatic host(input dbg_cmd_e c, input int tile, input dbg_space_e s, input logic [9:0] a,
                      input logic [31:0] d);
    @(negedge clk);
    dbg_in.valid = 1; dbg_in.cmd = c; dbg_in.tile = TILE_ID_W'(tile); dbg_in.space = s;
    dbg_in.addr = a; dbg_in.data = d;
    if (c == CMD_PEEK) n_peek++;
    if (c == CMD_POKE) n_poke++;
    if (c == CMD_STEP) n_step++;
    if (TILE_ID_W'(tile) == TILE_BCAST) n_bcast++;
  endtask
  task automatic host_idle();
    @(negedge clk); dbg_in = '0;
  endtask

  function automatic int pos(input int r, input int c);
    return (r % 2 == 0) ? r * C + c : r * C + (C - 1 - c);
  endfunction

  // ---------------- edges ----------------
  logic [31:0] wq [R][$], eq_ [R][$], nq [C][$];
  logic [31:0] got_e [R][$], got_w [R][$], got_s [C][$];
  logic [31:0] exp_e [R][$], exp_w [R][$], exp_s [C][$];
  int gap = 0, bp = 0;
  logic hold = 1'b0;   // refuse every edge output word, to back the mesh up

  always @(negedge clk) begin
    for (int r = 0; r < R; r++) begin
      west_in_valid[r]  = wq[r].size() != 0 && $urandom_range(99) >= gap;
      west_in_data[r]   = wq[r].size() != 0 ? wq[r][0] : 32'd0;
      east_in_valid[r]  = eq_[r].size() != 0 && $urandom_range(99) >= gap;
      east_in_data[r]   = eq_[r].size() != 0 ? eq_[r][0] : 32'd0;
      west_out_ready[r] = !hold && $urandom_range(99) >= bp;
      east_out_ready[r] = !hold && $urandom_range(99) >= bp;
    end
    for (int c = 0; c < C; c++) begin
      north_in_valid[c]  = nq[c].size() != 0 && $urandom_range(99) >= gap;
      north_in_data[c]   = nq[c].size() != 0 ? nq[c][0] : 32'd0;
      north_out_ready[c] = 1'b1;
      south_out_ready[c] = !hold && $urandom_range(99) >= bp;
      south_in_valid[c]  = 1'b0;
      south_in_data[c]   = '0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < R; r++) begin
      if (west_in_valid[r] && west_in_ready[r]) void'(wq[r].pop_front());
      if (east_in_valid[r] && east_in_ready[r]) void'(eq_[r].pop_front());
      if (west_out_valid[r] && west_out_ready[r]) got_w[r].push_back(west_out_data[r]);
      if (east_out_valid[r] && east_out_ready[r]) got_e[r].push_back(east_out_data[r]);
    end
    for (int c = 0; c < C; c++) begin
      if (north_in_valid[c] && north_in_ready[c]) void'(nq[c].pop_front());
      if (south_out_valid[c] && south_out_ready[c]) got_s[c].push_back(south_out_data[c]);
      if (north_out_valid[c]) begin failures++; $display("unexpected word on north edge %0d at %0t", c, $time); end
    end
    n_in_stall  += $countones(ev_in_stall);
    n_out_stall += $countones(ev_out_stall);
    n_multicast += $countones(ev_multicast);
    n_route     += $countones(ev_route);
    n_load      += $countones(ev_load);
    n_store     += $countones(ev_store);
  end

  task automatic cmp(input logic [31:0] g, input logic [31:0] e, input string what);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h", what, g, e);
    end
  endtask

  // ---------------- program ----------------
  function automatic logic [31:0] I(input opcode_e op, input int dst, input int x, input int iy,
                                    input int y, input int z, input dir_e in, input logic [3:0] out,
                                    input logic tr = 1'b0);
    return mk_instr(op, 4'(dst), 5'(x), 1'(iy), 5'(y), 5'(z), in, out, tr);
  endfunction

  logic [31:0] acc [R][C];
  int watchdog_cycles;

  initial begin
    logic [31:0] prog [6];
    int t0, busy_gone;
    rst_n = 0; dbg_in = '0;
    prog[0] = I(OP_ADD, 15, 31, 1, 1, 0, DIR_W, 4'b0110);
    prog[1] = I(OP_ADD, 3, 3, 0, 31, 0, DIR_N, 4'b0000);
    prog[2] = I(OP_NOP, 0, 0, 0, 0, 0, DIR_E, 4'b1000);
    prog[3] = I(OP_LDI, 1, 0, 0, 0, 0, DIR_N, 4'b0000);
    prog[4] = I(OP_ADD, 1, 1, 1, 1, 0, DIR_N, 4'b0000);
    prog[5] = I(OP_STI, 0, 1, 0, 0, 0, DIR_N, 4'b0000);
    foreach (acc[r, c]) acc[r][c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // load: broadcast program, code length and counter, then one addressed poke for tracing
    for (int i = 0; i < 6; i++) host(CMD_POKE, TILE_BCAST, SP_IMEM, 10'(i), prog[i]);
    host(CMD_POKE, TILE_BCAST, SP_DMEM, 10'd0, 32'd0);
    host(CMD_POKE, TILE_BCAST, SP_CTRL, CR_CODE_LEN, 32'd6);
    host(CMD_POKE, TRACE_TILE, SP_IMEM, 10'd4, I(OP_ADD, 1, 1, 1, 1, 0, DIR_N, 4'b0000, 1'b1));
    host_idle();
    repeat (R * C + 4) @(negedge clk);

    // stimulus and expected edge words
    for (int k = 0; k < K; k++) begin
      logic [31:0] wv [R];
      for (int r = 0; r < R; r++) begin
        logic [31:0] ev;
        wv[r] = $urandom; ev = $urandom;
        wq[r].push_back(wv[r]); eq_[r].push_back(ev);
        exp_e[r].push_back(wv[r] + 32'(C));
        exp_w[r].push_back(ev);
      end
      for (int c = 0; c < C; c++) begin
        logic [31:0] nv;
        nv = $urandom;
        nq[c].push_back(nv);
        acc[0][c] += nv;
        for (int r = 1; r < R; r++) acc[r][c] += wv[r-1] + 32'(c) + 1;
        exp_s[c].push_back(wv[R-1] + 32'(c) + 1);
      end
    end
    gap = GAP; bp = BP;
    host(CMD_STEP, TILE_BCAST, SP_CTRL, 10'd0, 32'(K));
    host_idle();
    t0 = $time;
    // hold the edge outputs for a while so that output queues fill and tiles stall on them
    hold = 1'b1;
    repeat (40 * C) @(negedge clk);
    hold = 1'b0;
    busy_gone = 0;
    while (busy_gone < 8) begin
      @(negedge clk);
      busy_gone = (ev_busy == '0) ? busy_gone + 1 : 0;
    end
    $display("%0d x %0d array: %0d target cycles in %0d clocks", R, C, K, ($time - t0) / 10);
    repeat (R * C + 4) @(negedge clk);  // last trace words still travelling down the chain

    // edge words
    for (int r = 0; r < R; r++) begin
      checks++; if (got_e[r].size() != K || got_w[r].size() != K) begin failures++; $display("row %0d: %0d east, %0d west words", r, got_e[r].size(), got_w[r].size()); end
      for (int k = 0; k < K && k < got_e[r].size(); k++) cmp(got_e[r][k], exp_e[r][k], "east edge");
      for (int k = 0; k < K && k < got_w[r].size(); k++) cmp(got_w[r][k], exp_w[r][k], "west edge");
    end
    for (int c = 0; c < C; c++) begin
      checks++; if (got_s[c].size() != K) begin failures++; $display("col %0d: %0d south words", c, got_s[c].size()); end
      for (int k = 0; k < K && k < got_s[c].size(); k++) cmp(got_s[c][k], exp_s[c][k], "south edge");
    end
    // trace stream of the traced tile: r1 after each increment
    checks++; if (trace_q.size() != K) begin failures++; $display("%0d trace words", trace_q.size()); end
    n_trace = trace_q.size();
    for (int k = 0; k < trace_q.size(); k++) cmp(trace_q[k], 32'(k + 1), "trace");

    // snapshot save: back-to-back peeks of every tile's r3, dmem[0] and pass count
    gap = 0; bp = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        host(CMD_PEEK, pos(r, c), SP_REG, 10'd3, 0);
        host(CMD_PEEK, pos(r, c), SP_DMEM, 10'd0, 0);
        host(CMD_PEEK, pos(r, c), SP_CTRL, CR_PASSES, 0);
      end
    host_idle();
    repeat (R * C + 8) @(negedge clk);
    checks++;
    if (resp_q.size() != 3 * R * C) begin failures++; $display("%0d peek responses", resp_q.size()); end
    else
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          cmp(resp_q.pop_front(), acc[r][c], "r3 accumulator");
          cmp(resp_q.pop_front(), 32'(K), "dmem counter");
          cmp(resp_q.pop_front(), 32'(K), "pass count");
        end

    $display("events: input stalls %0d, output stalls %0d, multicasts %0d, routes %0d, loads %0d, stores %0d",
             n_in_stall, n_out_stall, n_multicast, n_route, n_load, n_store);
    $display("host: peeks %0d, pokes %0d, broadcasts %0d, steps %0d, trace words %0d",
             n_peek, n_poke, n_bcast, n_step, n_trace);
    checks++; if (n_in_stall == 0)  begin failures++; $display("no input stall"); end
    checks++; if (n_out_stall == 0) begin failures++; $display("no output stall"); end
    checks++; if (n_multicast == 0) begin failures++; $display("no multicast"); end
    checks++; if (n_route == 0)     begin failures++; $display("no route"); end
    checks++; if (n_load == 0)      begin failures++; $display("no load"); end
    checks++; if (n_store == 0)     begin failures++; $display("no store"); end
    checks++; if (n_trace == 0)     begin failures++; $display("no trace"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
