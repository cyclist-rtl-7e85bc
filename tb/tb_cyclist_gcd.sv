// Emulation testbench: a small target circuit compiled by hand onto a 1 x 2 cyclist_array.
//
// The target is the classic subtractive GCD unit: registers x and y (16 bits). On load they
// take inputs a and b. Otherwise, while y != 0, the larger one is reduced by the smaller
// (x > y: x -= y, else y -= x). Its outputs are x and valid = (y == 0), which are functions
// of the registers alone.
//
// The mapping follows the usual emulator structure. Each target register lives in a tile's
// data memory (x in tile 0, y in tile 1). Each pass of a tile's loop is one target cycle: a
// combinational phase loads the register, exchanges it with the other tile over the mesh and
// computes the next value, and a state-update phase stores it back. Target inputs arrive on
// the array's edges: load and a at tile 0's west port (in that order each cycle), b at tile
// 1's east port. Tile 0 forwards load to tile 1 in the same instruction that reads it. The
// outputs leave on the edges: x at tile 0's west port, valid at tile 1's east port.
//
// The edge model offers and accepts words at random and refuses output words for long
// stretches, so both tiles wait on empty inputs and full outputs many times. Every output word of every target cycle is compared with a
// cycle model of the target circuit. Each finished computation is also checked against a
// GCD computed by Euclid's division method, independently of both.
module tb_cyclist_gcd;
  import cyclist_pkg::*;
  localparam int R = 1, C = 2, T = 400;
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
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1);
    $finish;
  end

  // ---------------- host chain ----------------
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
  logic [31:0] wq [$], eq_ [$], got_x [$], got_v [$];
  int in_waits = 0, out_waits = 0, clk_n = 0;
  // The output edges also refuse every word for 40 of every 100 clocks, long enough
  // for a second word to back up behind the first.
  always @(negedge clk) begin
    clk_n++;
    west_in_valid[0]  = wq.size() != 0 && $urandom_range(99) >= 40;
    west_in_data[0]   = wq.size() != 0 ? wq[0] : 32'd0;
    east_in_valid[0]  = eq_.size() != 0 && $urandom_range(99) >= 40;
    east_in_data[0]   = eq_.size() != 0 ? eq_[0] : 32'd0;
    west_out_ready[0] = $urandom_range(99) >= 40 && clk_n % 100 >= 40;
    east_out_ready[0] = $urandom_range(99) >= 40 && clk_n % 100 >= 40;
    north_in_valid = '0; north_in_data = '0; north_out_ready = '1;
    south_in_valid = '0; south_in_data = '0; south_out_ready = '1;
  end
  always @(posedge clk) if (rst_n) begin
    if (west_in_valid[0] && west_in_ready[0]) void'(wq.pop_front());
    if (east_in_valid[0] && east_in_ready[0]) void'(eq_.pop_front());
    if (west_out_valid[0] && west_out_ready[0]) got_x.push_back(west_out_data[0]);
    if (east_out_valid[0] && east_out_ready[0]) got_v.push_back(east_out_data[0]);
    if (dut.g_row[0].g_col[0].u_tile.rf_stall || dut.g_row[0].g_col[1].u_tile.rf_stall) in_waits++;
    if (dut.g_row[0].g_col[0].u_tile.wb_stall || dut.g_row[0].g_col[1].u_tile.wb_stall) out_waits++;
  end

  function automatic logic [31:0] I(input opcode_e op, input int dst, input int x, input int iy,
                                    input int y, input int z, input dir_e in, input logic [3:0] out);
    return mk_instr(op, 4'(dst), 5'(x), 1'(iy), 5'(y), 5'(z), in, out, 1'b0);
  endfunction

  task automatic cmp(input logic [31:0] g, input logic [31:0] e, input string what, input int t);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 20) $display("FAIL %s, target cycle %0d: got %0d exp %0d", what, t, g, e);
    end
  endtask

  function automatic int euclid(input int a, input int b);
    while (b != 0) begin
      int t;
      t = a % b; a = b; b = t;
    end
    return a;
  endfunction

  localparam logic [3:0] O_E = 4'b0010, O_W = 4'b1000;

  initial begin
    logic [31:0] p0 [12], p1 [13];
    logic        ld [T];
    logic [15:0] av [T], bv [T];
    logic [15:0] x, y, prev_y, cur_a, cur_b;
    int          done;

    // Tile 0 holds target register x.
    p0[0] = I(OP_LDI,  1, 0,  0, 0,  0, DIR_N, 4'b0000);       // r1 = x
    p0[1] = I(OP_OR,  15, 1,  1, 0,  0, DIR_N, O_E | O_W);     // x to tile 1 and to the output
    p0[2] = I(OP_ADD,  2, 31, 1, 0, 16, DIR_E, 4'b0000);       // r2 = y, from tile 1
    p0[3] = I(OP_LT,   3, 2,  0, 1, 16, DIR_N, 4'b0000);       // r3 = y < x
    p0[4] = I(OP_SUB,  4, 1,  0, 2, 16, DIR_N, 4'b0000);       // r4 = x - y
    p0[5] = I(OP_MUX,  5, 3,  0, 4,  1, DIR_N, 4'b0000);       // r5 = r3 ? x - y : x
    p0[6] = I(OP_EQ,   6, 2,  1, 0,  0, DIR_N, 4'b0000);       // r6 = y == 0
    p0[7] = I(OP_ADD,  7, 31, 1, 0,  1, DIR_W, O_E);           // r7 = load, also passed east
    p0[8]  = I(OP_ADD,  8, 31, 1, 0, 16, DIR_W, 4'b0000);      // r8 = a
    p0[9]  = I(OP_MUX,  5, 6,  0, 1,  5, DIR_N, 4'b0000);      // hold while y == 0
    p0[10] = I(OP_MUX,  9, 7,  0, 8,  5, DIR_N, 4'b0000);      // r9 = load ? a : r5
    p0[11] = I(OP_STI,  0, 9,  0, 0,  0, DIR_N, 4'b0000);      // x = r9
    // Tile 1 holds target register y.
    p1[0]  = I(OP_LDI,  1, 0,  0, 0,  0, DIR_N, 4'b0000);      // r1 = y
    p1[1]  = I(OP_OR,  15, 1,  1, 0,  0, DIR_N, O_W);          // y to tile 0
    p1[2]  = I(OP_ADD,  2, 31, 1, 0, 16, DIR_W, 4'b0000);      // r2 = x, from tile 0
    p1[3]  = I(OP_LT,   3, 1,  0, 2, 16, DIR_N, 4'b0000);      // r3 = y < x
    p1[4]  = I(OP_SUB,  4, 1,  0, 2, 16, DIR_N, 4'b0000);      // r4 = y - x
    p1[5]  = I(OP_MUX,  5, 3,  0, 1,  4, DIR_N, 4'b0000);      // r5 = r3 ? y : y - x
    p1[6]  = I(OP_EQ,   6, 1,  1, 0,  0, DIR_N, 4'b0000);      // r6 = y == 0
    p1[7]  = I(OP_OR,  15, 6,  1, 0,  0, DIR_N, O_E);          // valid to the output
    p1[8]  = I(OP_MUX,  5, 6,  0, 1,  5, DIR_N, 4'b0000);      // hold while y == 0
    p1[9]  = I(OP_ADD,  7, 31, 1, 0,  1, DIR_W, 4'b0000);      // r7 = load, from tile 0
    p1[10] = I(OP_ADD,  8, 31, 1, 0, 16, DIR_E, 4'b0000);      // r8 = b
    p1[11] = I(OP_MUX,  9, 7,  0, 8,  5, DIR_N, 4'b0000);      // r9 = load ? b : r5
    p1[12] = I(OP_STI,  0, 9,  0, 0,  0, DIR_N, 4'b0000);      // y = r9
    dbg_in = '0;

    // Target input stream: a load at cycle 0 and then at random intervals.
    for (int t = 0; t < T; t++) begin
      ld[t] = (t == 0) || ($urandom_range(99) < 4);
      av[t] = 16'($urandom_range(1, 300));
      bv[t] = 16'($urandom_range(1, 300));
    end
    for (int t = 0; t < T; t++) begin
      wq.push_back(32'(ld[t])); wq.push_back(32'(av[t])); eq_.push_back(32'(bv[t]));
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) host(CMD_POKE, 0, SP_IMEM, 10'(i), p0[i]);
    for (int i = 0; i < 13; i++) host(CMD_POKE, 1, SP_IMEM, 10'(i), p1[i]);
    host(CMD_POKE, 32'(TILE_BCAST), SP_DMEM, 10'd0, 32'd0);
    host(CMD_POKE, 0, SP_CTRL, CR_CODE_LEN, 32'd12);
    host(CMD_POKE, 1, SP_CTRL, CR_CODE_LEN, 32'd13);
    host(CMD_STEP, 32'(TILE_BCAST), SP_CTRL, 10'd0, 32'(T));
    host_idle();
    while (got_x.size() < T || got_v.size() < T || dut.g_row[0].g_col[0].u_tile.busy ||
           dut.g_row[0].g_col[1].u_tile.busy)
      @(negedge clk);

    // Cycle model of the target circuit, compared cycle by cycle.
    x = 0; y = 0; prev_y = 0; done = 0;
    cur_a = 0; cur_b = 0;
    for (int t = 0; t < T; t++) begin
      cmp(got_x[t], 32'(x), "output x", t);
      cmp(got_v[t], 32'(y == 0), "output valid", t);
      // A computation has just finished when y has reached 0 since the last cycle.
      if (y == 0 && prev_y != 0) begin
        cmp(got_x[t], 32'(euclid(int'(cur_a), int'(cur_b))), "gcd result", t);
        done++;
      end
      prev_y = y;
      if (ld[t]) begin x = av[t]; y = bv[t]; cur_a = av[t]; cur_b = bv[t]; end
      else if (y != 0) begin
        if (x > y) x = x - y; else y = y - x;
      end
    end
    $display("target cycles %0d, gcd results %0d, input waits %0d, output waits %0d",
             T, done, in_waits, out_waits);
    checks++; if (done < 3) begin failures++; $display("FAIL too few finished computations"); end
    checks++; if (in_waits == 0) begin failures++; $display("FAIL no input wait"); end
    checks++; if (out_waits == 0) begin failures++; $display("FAIL no output wait"); end
    // No extra words: the fabric emits exactly one x and one valid per target cycle.
    checks++; if (got_x.size() != T || got_v.size() != T) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
