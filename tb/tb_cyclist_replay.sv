// Replay testbench for cyclist_array (3 x 4 mesh): the snapshot-and-rerun mechanism behind
// interactive visibility. The array runs a few target cycles, the host saves a snapshot of
// every tile's target state with a back-to-back burst of peeks, and the array runs a window
// of further cycles while one tile's result is traced. The host then restores the snapshot
// with a burst of pokes and replays the same edge inputs over the same window. The replayed
// edge outputs and trace words must equal the first run's, and both must match a model.
// Last, the "find" search: the snapshot is restored once more, and a traced trigger
// instruction (r1 == 8) is appended to one tile's code while the array is loaded. The window
// is replayed, and the host scans the trigger's trace words for the first target cycle on
// which it is 1.
// The program is the one of tb_array_driver: a word travels east gaining 1 per column and is
// also sent south, r3 accumulates north inputs, east-edge words are routed to the west edge,
// and dmem[0] counts target cycles.
module tb_cyclist_replay;
  import cyclist_pkg::*;
  localparam int R = 3, C = 4, K1 = 5, K2 = 8;
  localparam int TRACE_TILE = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [R-1:0] west_in_valid, west_in_ready, west_out_valid, west_out_ready;
  logic [R-1:0] east_in_valid, east_in_ready, east_out_valid, east_out_ready;
  logic [R-1:0][31:0] west_in_data, west_out_data, east_in_data, east_out_data;
  logic [C-1:0] north_in_valid, north_in_ready, north_out_valid, north_out_ready;
  logic [C-1:0] south_in_valid, south_in_ready, south_out_valid, south_out_ready;
  logic [C-1:0][31:0] north_in_data, north_out_data, south_in_data, south_out_data;
  dbg_pkt_t dbg_in, dbg_out;

  cyclist_array #(.ROWS(R), .COLS(C)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1);
    $finish;
  end

  // ---------------- host chain ----------------
  logic [31:0] resp_q [$], trace_q [$], trig_q [$];
  always @(posedge clk) if (rst_n && dbg_out.valid) begin
    if (dbg_out.cmd == CMD_RESP) resp_q.push_back(dbg_out.data);
    if (dbg_out.cmd == CMD_TRACE && dbg_out.tile == TILE_ID_W'(TRACE_TILE)) begin
      if (dbg_out.addr == 10'd6) trig_q.push_back(dbg_out.data);
      else trace_q.push_back(dbg_out.data);
    end
  end
  task automatic host(input dbg_cmd_e c, input int tile, input dbg_space_e s, input logic [9:0] a,
                      input logic [31:0] d);
    @(negedge clk);
    dbg_in.valid = 1; dbg_in.cmd = c; dbg_in.tile = TILE_ID_W'(tile); dbg_in.space = s;
    dbg_in.addr = a; dbg_in.data = d;
  endtask
  task automatic host_idle();
    @(negedge clk); dbg_in = '0;
  endtask

  // ---------------- edges ----------------
  logic [31:0] wq [R][$], eq_ [R][$], nq [C][$];
  logic [31:0] got_e [R][$], got_w [R][$], got_s [C][$];
  always @(negedge clk) begin
    for (int r = 0; r < R; r++) begin
      west_in_valid[r]  = wq[r].size() != 0 && $urandom_range(99) >= 30;
      west_in_data[r]   = wq[r].size() != 0 ? wq[r][0] : 32'd0;
      east_in_valid[r]  = eq_[r].size() != 0 && $urandom_range(99) >= 30;
      east_in_data[r]   = eq_[r].size() != 0 ? eq_[r][0] : 32'd0;
      west_out_ready[r] = $urandom_range(99) >= 30;
      east_out_ready[r] = $urandom_range(99) >= 30;
    end
    for (int c = 0; c < C; c++) begin
      north_in_valid[c]  = nq[c].size() != 0 && $urandom_range(99) >= 30;
      north_in_data[c]   = nq[c].size() != 0 ? nq[c][0] : 32'd0;
      north_out_ready[c] = 1'b1;
      south_out_ready[c] = $urandom_range(99) >= 30;
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
    end
  end

  function automatic logic [31:0] I(input opcode_e op, input int dst, input int x, input int iy,
                                    input int y, input int z, input dir_e in, input logic [3:0] out,
                                    input logic tr = 1'b0);
    return mk_instr(op, 4'(dst), 5'(x), 1'(iy), 5'(y), 5'(z), in, out, tr);
  endfunction

  task automatic cmp(input logic [31:0] g, input logic [31:0] e, input string what);
    checks++;
    if (g != e) begin failures++; if (failures < 20) $display("FAIL %s: got %h exp %h", what, g, e); end
  endtask

  // stimulus of one window, kept for replay
  logic [31:0] win_w [R][K2], win_e [R][K2], win_n [C][K2];

  task automatic push_inputs(input int k, input logic use_window);
    for (int r = 0; r < R; r++) begin
      logic [31:0] a, b;
      a = use_window ? win_w[r][k] : $urandom;
      b = use_window ? win_e[r][k] : $urandom;
      wq[r].push_back(a); eq_[r].push_back(b);
    end
    for (int c = 0; c < C; c++) nq[c].push_back(use_window ? win_n[c][k] : $urandom);
  endtask

  task automatic run(input int n);
    int quiet;
    host(CMD_STEP, 32'(TILE_BCAST), SP_CTRL, 10'd0, 32'(n));
    host_idle();
    quiet = 0;
    while (quiet < 8) begin
      @(negedge clk);
      quiet = (dut.g_row[0].g_col[0].u_tile.busy || dut.g_row[R-1].g_col[C-1].u_tile.busy ||
               dut.g_row[1].g_col[1].u_tile.busy) ? 0 : quiet + 1;
    end
    repeat (R * C + 8) @(negedge clk);
  endtask

  function automatic int pos(input int r, input int c);
    return (r % 2 == 0) ? r * C + c : r * C + (C - 1 - c);
  endfunction

  logic [31:0] snap_r3 [R*C], snap_cnt [R*C];
  logic [31:0] run1_e [R][$], run1_w [R][$], run1_s [C][$], run1_t [$];

  initial begin
    logic [31:0] prog [6];
    dbg_in = '0;
    prog[0] = I(OP_ADD, 15, 31, 1, 1, 0, DIR_W, 4'b0110);
    prog[1] = I(OP_ADD, 3, 3, 0, 31, 0, DIR_N, 4'b0000);
    prog[2] = I(OP_NOP, 0, 0, 0, 0, 0, DIR_E, 4'b1000);
    prog[3] = I(OP_LDI, 1, 0, 0, 0, 0, DIR_N, 4'b0000);
    prog[4] = I(OP_ADD, 1, 1, 1, 1, 0, DIR_N, 4'b0000);
    prog[5] = I(OP_STI, 0, 1, 0, 0, 0, DIR_N, 4'b0000);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) host(CMD_POKE, 32'(TILE_BCAST), SP_IMEM, 10'(i), prog[i]);
    host(CMD_POKE, 32'(TILE_BCAST), SP_DMEM, 10'd0, 32'd0);
    host(CMD_POKE, 32'(TILE_BCAST), SP_CTRL, CR_CODE_LEN, 32'd6);
    host(CMD_POKE, TRACE_TILE, SP_IMEM, 10'd4, I(OP_ADD, 1, 1, 1, 1, 0, DIR_N, 4'b0000, 1'b1));
    host_idle();

    // lead-in
    for (int k = 0; k < K1; k++) push_inputs(k, 1'b0);
    run(K1);

    // snapshot save: one peek per cycle
    resp_q.delete();
    for (int p = 0; p < R * C; p++) begin
      host(CMD_PEEK, p, SP_REG, 10'd3, 0);
      host(CMD_PEEK, p, SP_DMEM, 10'd0, 0);
    end
    host_idle();
    repeat (R * C + 4) @(negedge clk);
    checks++;
    if (resp_q.size() != 2 * R * C) begin failures++; $display("%0d snapshot words", resp_q.size()); end
    for (int p = 0; p < R * C; p++) begin snap_r3[p] = resp_q.pop_front(); snap_cnt[p] = resp_q.pop_front(); end
    for (int p = 0; p < R * C; p++) cmp(snap_cnt[p], 32'(K1), "snapshot counter");

    // window, first run
    for (int k = 0; k < K2; k++) begin
      for (int r = 0; r < R; r++) begin win_w[r][k] = $urandom; win_e[r][k] = $urandom; end
      for (int c = 0; c < C; c++) win_n[c][k] = $urandom;
    end
    foreach (got_e[r]) begin got_e[r].delete(); got_w[r].delete(); end
    foreach (got_s[c]) got_s[c].delete();
    trace_q.delete();
    for (int k = 0; k < K2; k++) push_inputs(k, 1'b1);
    run(K2);
    run1_e = got_e; run1_w = got_w; run1_s = got_s; run1_t = trace_q;

    // disturb the state, then restore the snapshot: one poke per cycle
    host(CMD_POKE, 32'(TILE_BCAST), SP_REG, 10'd3, 32'hDEAD_BEEF);
    host(CMD_POKE, 32'(TILE_BCAST), SP_DMEM, 10'd0, 32'd999);
    for (int p = 0; p < R * C; p++) begin
      host(CMD_POKE, p, SP_REG, 10'd3, snap_r3[p]);
      host(CMD_POKE, p, SP_DMEM, 10'd0, snap_cnt[p]);
    end
    host_idle();
    repeat (R * C + 4) @(negedge clk);

    // window, replay
    foreach (got_e[r]) begin got_e[r].delete(); got_w[r].delete(); end
    foreach (got_s[c]) got_s[c].delete();
    trace_q.delete();
    for (int k = 0; k < K2; k++) push_inputs(k, 1'b1);
    run(K2);

    // compare replay with the first run, and both with the model
    for (int r = 0; r < R; r++) begin
      checks++; if (got_e[r].size() != K2 || run1_e[r].size() != K2 || got_w[r].size() != K2) failures++;
      for (int k = 0; k < K2 && k < got_e[r].size() && k < run1_e[r].size(); k++) begin
        cmp(got_e[r][k], run1_e[r][k], "replayed east word");
        cmp(got_e[r][k], win_w[r][k] + 32'(C), "east word model");
      end
      for (int k = 0; k < K2 && k < got_w[r].size() && k < run1_w[r].size(); k++)
        cmp(got_w[r][k], run1_w[r][k], "replayed west word");
    end
    for (int c = 0; c < C; c++) begin
      checks++; if (got_s[c].size() != K2) failures++;
      for (int k = 0; k < K2 && k < got_s[c].size() && k < run1_s[c].size(); k++)
        cmp(got_s[c][k], run1_s[c][k], "replayed south word");
    end
    checks++; if (trace_q.size() != K2 || run1_t.size() != K2) begin failures++; $display("trace words %0d / %0d", run1_t.size(), trace_q.size()); end
    for (int k = 0; k < K2 && k < trace_q.size() && k < run1_t.size(); k++) begin
      cmp(trace_q[k], run1_t[k], "replayed trace");
      cmp(trace_q[k], 32'(K1 + k + 1), "trace model");
    end
    // the accumulators end equal to the first run's end state plus nothing extra
    resp_q.delete();
    for (int p = 0; p < R * C; p++) host(CMD_PEEK, p, SP_DMEM, 10'd0, 0);
    host_idle();
    repeat (R * C + 4) @(negedge clk);
    for (int p = 0; p < R * C; p++) cmp((resp_q.size() != 0) ? resp_q.pop_front() : 32'hx, 32'(K1 + K2), "counter after replay");

    // find r1 == K1 + 3 over the window: restore, insert the trigger, replay, scan
    for (int p = 0; p < R * C; p++) begin
      host(CMD_POKE, p, SP_REG, 10'd3, snap_r3[p]);
      host(CMD_POKE, p, SP_DMEM, 10'd0, snap_cnt[p]);
    end
    host(CMD_POKE, TRACE_TILE, SP_IMEM, 10'd6, I(OP_EQ, 6, 1, 1, K1 + 3, 0, DIR_N, 4'b0000, 1'b1));
    host(CMD_POKE, TRACE_TILE, SP_CTRL, CR_CODE_LEN, 32'd7);
    host_idle();
    repeat (R * C + 4) @(negedge clk);
    foreach (got_e[r]) begin got_e[r].delete(); got_w[r].delete(); end
    foreach (got_s[c]) got_s[c].delete();
    trace_q.delete(); trig_q.delete();
    for (int k = 0; k < K2; k++) push_inputs(k, 1'b1);
    run(K2);
    begin
      int found;
      found = -1;
      for (int k = 0; k < trig_q.size(); k++) if (found < 0 && trig_q[k] == 32'd1) found = k;
      checks++; if (trig_q.size() != K2) begin failures++; $display("%0d trigger words", trig_q.size()); end
      checks++; if (found != 2) begin failures++; $display("trigger found at %0d, expected 2", found); end
      $display("find: trigger first true in window cycle %0d (target cycle %0d)", found, K1 + found);
    end
    for (int r = 0; r < R; r++)
      for (int k = 0; k < K2 && k < got_e[r].size(); k++) cmp(got_e[r][k], run1_e[r][k], "east word with trigger inserted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
