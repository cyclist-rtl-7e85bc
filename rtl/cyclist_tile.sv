// cyclist_tile: one emulation tile of the Cyclist array.
//
// A tile runs a compiled slice of the target circuit as a loop of instructions with no
// branches. One pass through the code memory, from address 0 to CODE_LEN-1, evaluates the slice
// for one target clock cycle; the program counter then wraps to 0. The pipeline has five stages:
//   fetch      PC addresses the code memory (synchronous read)
//   decode     the word is decoded into a control bundle
//   reg/net    the register file is read and, if the instruction needs it, the word at the head
//              of the selected network input queue is taken
//   execute    the ALU computes; loads and stores address the data memory at the end of the stage
//   write-back the result (or loaded word) is written to a register, sent to the network output
//              queues named by the out mask (multicast), and traced to the debug chain if asked
// There are no data-hazard stalls: write-back forwards to execute and the register file writes
// through. The only stalls are the network interlocks. An instruction in reg/net whose input
// queue is empty waits there while older instructions drain (a bubble enters execute). An
// instruction in write-back whose output queues are full, or whose trace word cannot be taken,
// holds the whole pipeline. A host access over the debug chain also holds it for one cycle,
// so host writes never collide with the pipeline's.
//
// Each direction (N, E, S, W) has a one-element input queue and a one-element output queue.
// in_ready reports only whether the input queue is empty, and the output queue can take a
// word when it is empty or the neighbour is ready. No combinational path crosses a tile, so
// a mesh of tiles has no combinational loop. Words cross a link in one cycle per queue.
//
// The host starts the tile with a step command: the tile runs that many target cycles
// (passes), then drains and idles. Control registers (SP_CTRL space) hold the code length,
// the cycles left, the value returned by rst, a busy flag, the number of passes done and
// the tile id.
//
// From the published design: the five stages and their order, no control flow with an implicit
// loop, 32 registers, 1024-word code and data memories, one-element NSEW queue pairs,
// interlocking, multicast output mask, routing of the input word in parallel with compute,
// trace bit, peek/poke/step. This design's own choices: the stall split between reg/net and
// write-back, the memory access edge, the forwarding, the control registers and step semantics.
module cyclist_tile
  import cyclist_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [TILE_ID_W-1:0]     tile_id,
  // network, indexed by dir_e
  input  logic [NDIRS-1:0]         in_valid,
  output logic [NDIRS-1:0]         in_ready,
  input  logic [NDIRS-1:0][XLEN-1:0] in_data,
  output logic [NDIRS-1:0]         out_valid,
  input  logic [NDIRS-1:0]         out_ready,
  output logic [NDIRS-1:0][XLEN-1:0] out_data,
  // debug scanchain
  input  dbg_pkt_t                 dbg_in,
  output dbg_pkt_t                 dbg_out
);

  // ---------------- debug node and control registers ----------------
  logic              acc_valid, acc_write, step_valid;
  dbg_space_e        acc_space;
  logic [MEM_AW-1:0] acc_addr;
  logic [XLEN-1:0]   acc_wdata, acc_rdata, step_count;
  logic              trace_valid, trace_ready;

  logic [XLEN-1:0]   code_len, cycles_left, passes;
  logic              tgt_reset;
  logic              busy;

  logic freeze, dbg_freeze, wb_stall, rf_stall, front_adv;

  // ---------------- pipeline state ----------------
  logic [MEM_AW-1:0] pc;
  logic              id_valid;
  logic [MEM_AW-1:0] id_pc;
  logic [31:0]       id_instr;
  ctrl_t             id_ctrl;

  logic              rf_valid;
  logic [MEM_AW-1:0] rf_pc;
  ctrl_t             rf_ctrl;

  logic              ex_valid;
  logic [MEM_AW-1:0] ex_pc;
  ctrl_t             ex_ctrl;
  logic [XLEN-1:0]   ex_x, ex_y, ex_z, ex_net;

  logic              wb_valid;
  logic [MEM_AW-1:0] wb_pc;
  ctrl_t             wb_ctrl;
  logic [XLEN-1:0]   wb_alu, wb_net, wb_result, wb_out_word;

  // ---------------- network queues ----------------
  logic [NDIRS-1:0]           inq_valid, inq_pop, outq_space, outq_push;
  logic [NDIRS-1:0][XLEN-1:0] inq_data;

  for (genvar d = 0; d < NDIRS; d++) begin : g_dir
    cyclist_queue #(.WIDTH(XLEN)) u_inq (
      .clk, .rst_n,
      .enq_valid (in_valid[d] && in_ready[d]),
      .enq_ready (),
      .enq_data  (in_data[d]),
      .deq_valid (inq_valid[d]),
      .deq_ready (inq_pop[d]),
      .deq_data  (inq_data[d])
    );
    assign in_ready[d] = !inq_valid[d];

    cyclist_queue #(.WIDTH(XLEN)) u_outq (
      .clk, .rst_n,
      .enq_valid (outq_push[d]),
      .enq_ready (outq_space[d]),
      .enq_data  (wb_out_word),
      .deq_valid (out_valid[d]),
      .deq_ready (out_ready[d] && out_valid[d]),
      .deq_data  (out_data[d])
    );
  end

  // ---------------- memories and register file ----------------
  logic [XLEN-1:0] imem_rdata, imem_dbg, dmem_rdata, dmem_dbg, rf_dbg;
  logic [2:0][XLEN-1:0] rf_rd;
  logic            rf_we;
  logic [4:0]      rf_wa;
  logic [XLEN-1:0] rf_wd;
  logic            dmem_re, dmem_we;
  logic [MEM_AW-1:0] dmem_raddr, dmem_waddr, ex_addr;
  logic [XLEN-1:0] dmem_wdata;
  logic            ex_st_en;

  cyclist_sram #(.DEPTH(MEM_DEPTH), .WIDTH(XLEN)) u_imem (
    .clk,
    .re        (front_adv),
    .raddr     (pc),
    .rdata     (imem_rdata),
    .we        (acc_valid && acc_write && acc_space == SP_IMEM),
    .waddr     (acc_addr),
    .wdata     (acc_wdata),
    .dbg_raddr (acc_addr),
    .dbg_rdata (imem_dbg)
  );

  cyclist_sram #(.DEPTH(MEM_DEPTH), .WIDTH(XLEN)) u_dmem (
    .clk,
    .re        (dmem_re),
    .raddr     (dmem_raddr),
    .rdata     (dmem_rdata),
    .we        (dmem_we),
    .waddr     (dmem_waddr),
    .wdata     (dmem_wdata),
    .dbg_raddr (acc_addr),
    .dbg_rdata (dmem_dbg)
  );

  cyclist_regfile #(.NREG(NREGS), .W(XLEN)) u_rf (
    .clk, .rst_n,
    .ra     ({rf_ctrl.z, rf_ctrl.y, rf_ctrl.x}),
    .rd     (rf_rd),
    .we     (rf_we),
    .wa     (rf_wa),
    .wd     (rf_wd),
    .dbg_ra (acc_addr[4:0]),
    .dbg_rd (rf_dbg)
  );

  cyclist_debug u_dbg (
    .clk, .rst_n, .tile_id,
    .chain_in  (dbg_in),
    .chain_out (dbg_out),
    .acc_valid, .acc_write, .acc_space, .acc_addr, .acc_wdata, .acc_rdata,
    .step_valid, .step_count,
    .trace_valid, .trace_ready,
    .trace_addr (wb_pc),
    .trace_data (wb_result)
  );

  // ---------------- stall control ----------------
  assign dbg_freeze = acc_valid || step_valid;
  assign wb_stall   = wb_valid && (((wb_ctrl.out_mask & ~outq_space) != '0) ||
                                   (wb_ctrl.trace && !trace_ready));
  assign freeze     = dbg_freeze || wb_stall;
  assign rf_stall   = rf_valid && rf_ctrl.need_in && !inq_valid[rf_ctrl.in_dir];
  assign front_adv  = !freeze && !rf_stall;

  for (genvar d = 0; d < NDIRS; d++) begin : g_port_ctl
    assign inq_pop[d]   = rf_valid && rf_ctrl.need_in && rf_ctrl.in_dir == dir_e'(d) &&
                          !rf_stall && !freeze;
    assign outq_push[d] = wb_valid && wb_ctrl.out_mask[d] && !freeze;
  end

  // ---------------- fetch ----------------
  logic fetch_en, fetch_last;
  assign fetch_en   = (cycles_left != '0) && (code_len != '0);
  assign fetch_last = ({22'd0, pc} >= code_len - 1);

  // ---------------- decode ----------------
  assign id_instr = imem_rdata;
  cyclist_decode u_dec (.instr(id_instr), .ctrl(id_ctrl));

  // ---------------- reg/net read ----------------
  logic [XLEN-1:0] rf_net, rf_x, rf_y, rf_z;
  always_comb begin
    rf_net = inq_data[rf_ctrl.in_dir];
    rf_x   = rf_ctrl.x_net ? rf_net : rf_rd[0];
    rf_y   = rf_ctrl.y_imm ? {27'd0, rf_ctrl.y} : (rf_ctrl.y_net ? rf_net : rf_rd[1]);
    rf_z   = rf_ctrl.z_net ? rf_net : rf_rd[2];
  end

  // ---------------- execute ----------------
  logic [XLEN-1:0] fx, fy, fz, alu_res;
  logic            wb_writes;
  assign wb_writes = wb_valid && wb_ctrl.reg_we;
  always_comb begin
    fx = (wb_writes && !ex_ctrl.x_net && wb_ctrl.rd == ex_ctrl.x) ? wb_result : ex_x;
    fy = (wb_writes && !ex_ctrl.y_net && !ex_ctrl.y_imm && wb_ctrl.rd == ex_ctrl.y) ? wb_result : ex_y;
    fz = (wb_writes && !ex_ctrl.z_net && wb_ctrl.rd == ex_ctrl.z) ? wb_result : ex_z;
  end

  cyclist_alu u_alu (
    .op (ex_ctrl.op), .x (fx), .y (fy), .z (fz), .w (ex_ctrl.z), .imm (ex_ctrl.imm10),
    .target_reset (tgt_reset), .result (alu_res)
  );

  always_comb begin
    if (ex_ctrl.mem_direct)      ex_addr = ex_ctrl.imm10;
    else if (ex_ctrl.op == OP_ST) ex_addr = fy[MEM_AW-1:0];
    else                          ex_addr = fx[MEM_AW-1:0];
    ex_st_en = (ex_ctrl.op == OP_STI) || fz[0];

    dmem_re    = ex_valid && ex_ctrl.mem_rd && !freeze;
    dmem_raddr = ex_addr;
    if (acc_valid && acc_write && acc_space == SP_DMEM) begin
      dmem_we    = 1'b1;
      dmem_waddr = acc_addr;
      dmem_wdata = acc_wdata;
    end else begin
      dmem_we    = ex_valid && ex_ctrl.mem_wr && ex_st_en && !freeze;
      dmem_waddr = ex_addr;
      dmem_wdata = fx;
    end
  end

  // ---------------- write-back ----------------
  always_comb begin
    wb_result   = wb_ctrl.mem_rd ? dmem_rdata : wb_alu;
    wb_out_word = wb_ctrl.out_result ? wb_result : wb_net;
    if (acc_valid && acc_write && acc_space == SP_REG) begin
      rf_we = 1'b1;
      rf_wa = acc_addr[4:0];
      rf_wd = acc_wdata;
    end else begin
      rf_we = wb_writes && !freeze;
      rf_wa = wb_ctrl.rd;
      rf_wd = wb_result;
    end
  end
  assign trace_valid = wb_valid && wb_ctrl.trace && !freeze;

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      id_valid <= 1'b0;
      id_pc    <= '0;
      rf_valid <= 1'b0;
      rf_pc    <= '0;
      rf_ctrl  <= '0;
      ex_valid <= 1'b0;
      ex_pc    <= '0;
      ex_ctrl  <= '0;
      ex_x     <= '0;
      ex_y     <= '0;
      ex_z     <= '0;
      ex_net   <= '0;
      wb_valid <= 1'b0;
      wb_pc    <= '0;
      wb_ctrl  <= '0;
      wb_alu   <= '0;
      wb_net   <= '0;
    end else if (!freeze) begin
      if (!rf_stall) begin
        id_valid <= fetch_en;
        id_pc    <= pc;
        if (fetch_en) pc <= fetch_last ? '0 : pc + 1'b1;
        rf_valid <= id_valid;
        rf_pc    <= id_pc;
        rf_ctrl  <= id_ctrl;
      end
      ex_valid <= rf_valid && !rf_stall;
      ex_pc    <= rf_pc;
      ex_ctrl  <= rf_ctrl;
      ex_x     <= rf_x;
      ex_y     <= rf_y;
      ex_z     <= rf_z;
      ex_net   <= rf_net;
      wb_valid <= ex_valid;
      wb_pc    <= ex_pc;
      wb_ctrl  <= ex_ctrl;
      wb_alu   <= alu_res;
      wb_net   <= ex_net;
    end
  end

  // ---------------- control registers ----------------
  assign busy = (cycles_left != '0) || id_valid || rf_valid || ex_valid || wb_valid ||
                (out_valid != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_len    <= '0;
      cycles_left <= '0;
      passes      <= '0;
      tgt_reset   <= 1'b0;
    end else begin
      if (front_adv && fetch_en && fetch_last) begin
        cycles_left <= cycles_left - 1'b1;
        passes      <= passes + 1'b1;
      end
      if (step_valid) cycles_left <= step_count;
      if (acc_valid && acc_write && acc_space == SP_CTRL) begin
        unique case (acc_addr)
          CR_CODE_LEN:  code_len    <= acc_wdata;
          CR_CYCLES:    cycles_left <= acc_wdata;
          CR_TGT_RESET: tgt_reset   <= acc_wdata[0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (acc_space)
      SP_REG:  acc_rdata = rf_dbg;
      SP_DMEM: acc_rdata = dmem_dbg;
      SP_IMEM: acc_rdata = imem_dbg;
      default: begin
        unique case (acc_addr)
          CR_CODE_LEN:  acc_rdata = code_len;
          CR_CYCLES:    acc_rdata = cycles_left;
          CR_TGT_RESET: acc_rdata = {31'd0, tgt_reset};
          CR_STATUS:    acc_rdata = {31'd0, busy};
          CR_PASSES:    acc_rdata = passes;
          CR_TILE_ID:   acc_rdata = {{(XLEN-TILE_ID_W){1'b0}}, tile_id};
          default:      acc_rdata = '0;
        endcase
      end
    endcase
  end

endmodule
