// cyclist_pkg: types and constants shared by the Cyclist emulation tile and array.
//
// A tile executes a loop of 32-bit instructions with no control flow. Each word holds one
// ALU operation and one network operation. The field widths follow the published instruction
// format (op 5, dst 4, x 5, iy 1, y 5, z 5, in 2, out 4). A trace bit at the top makes the
// word 32 bits. The opcode numbering, the network register specifiers, the host packet format
// and the control-register map are this design's own choices.
package cyclist_pkg;

  localparam int unsigned XLEN        = 32;
  localparam int unsigned NREGS       = 32;
  localparam int unsigned MEM_DEPTH   = 1024;
  localparam int unsigned MEM_AW      = 10;
  localparam int unsigned TILE_ID_W   = 11;
  localparam int unsigned NDIRS       = 4;

  // Source specifier that reads the network input port named by the `in` field.
  localparam logic [4:0] SRC_NET = 5'd31;
  // Destination specifier that sends the result to the ports named by the `out` mask.
  localparam logic [3:0] DST_NET = 4'd15;
  // Tile address that every debug node accepts.
  localparam logic [TILE_ID_W-1:0] TILE_BCAST = '1;

  // Compass directions, also the bit positions of the `out` mask.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // The 24 operations, numbered in the order they are listed in the instruction table.
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,
    OP_RST  = 5'd1,
    OP_LIT  = 5'd2,
    OP_NOT  = 5'd3,
    OP_AND  = 5'd4,
    OP_OR   = 5'd5,
    OP_XOR  = 5'd6,
    OP_EQ   = 5'd7,
    OP_NEQ  = 5'd8,
    OP_MUX  = 5'd9,
    OP_LOG2 = 5'd10,
    OP_LSH  = 5'd11,
    OP_RSH  = 5'd12,
    OP_RSHA = 5'd13,
    OP_CAT  = 5'd14,
    OP_ADD  = 5'd15,
    OP_SUB  = 5'd16,
    OP_LT   = 5'd17,
    OP_GTE  = 5'd18,
    OP_MUL  = 5'd19,
    OP_LD   = 5'd20,
    OP_ST   = 5'd21,
    OP_LDI  = 5'd22,
    OP_STI  = 5'd23
  } opcode_e;

  typedef struct packed {
    logic       trace;
    opcode_e    op;
    logic [3:0] dst;
    logic [4:0] x;
    logic       iy;
    logic [4:0] y;
    logic [4:0] z;
    dir_e       in;
    logic [3:0] out;
  } instr_t;

  // Decoded control for one instruction.
  typedef struct packed {
    opcode_e    op;
    logic       trace;
    logic [4:0] x;          // register specifiers
    logic [4:0] y;
    logic [4:0] z;
    logic       x_net;      // operand comes from the network input
    logic       y_net;
    logic       z_net;
    logic       y_imm;      // y is the 5-bit immediate
    logic [9:0] imm10;      // {y,z}: literal or direct memory address
    logic       reg_we;     // result written to register dst
    logic [4:0] rd;
    logic       need_in;    // instruction dequeues the network input
    dir_e       in_dir;
    logic [3:0] out_mask;   // ports the instruction enqueues to
    logic       out_result; // 1: send the result, 0: forward the network input word
    logic       mem_rd;
    logic       mem_wr;
    logic       mem_direct; // address is imm10 instead of a register
  } ctrl_t;

  // Host packet on the debug scanchain.
  typedef enum logic [2:0] {
    CMD_NONE  = 3'd0,
    CMD_PEEK  = 3'd1,
    CMD_POKE  = 3'd2,
    CMD_STEP  = 3'd3,
    CMD_RESP  = 3'd4,
    CMD_TRACE = 3'd5
  } dbg_cmd_e;

  typedef enum logic [1:0] {
    SP_REG  = 2'd0,
    SP_DMEM = 2'd1,
    SP_IMEM = 2'd2,
    SP_CTRL = 2'd3
  } dbg_space_e;

  typedef struct packed {
    logic                 valid;
    dbg_cmd_e             cmd;
    logic [TILE_ID_W-1:0] tile;
    dbg_space_e           space;
    logic [MEM_AW-1:0]    addr;
    logic [XLEN-1:0]      data;
  } dbg_pkt_t;

  // Control-register addresses in SP_CTRL.
  localparam logic [MEM_AW-1:0] CR_CODE_LEN  = 10'd0;  // instructions per target cycle (RW)
  localparam logic [MEM_AW-1:0] CR_CYCLES    = 10'd1;  // target cycles left to run (RW)
  localparam logic [MEM_AW-1:0] CR_TGT_RESET = 10'd2;  // value read by rst (RW, bit 0)
  localparam logic [MEM_AW-1:0] CR_STATUS    = 10'd3;  // bit 0: busy (RO)
  localparam logic [MEM_AW-1:0] CR_PASSES    = 10'd4;  // target cycles completed (RO)
  localparam logic [MEM_AW-1:0] CR_TILE_ID   = 10'd5;  // chain address (RO)

  // Low `w` bits set; w = 0 stands for all 32.
  function automatic logic [XLEN-1:0] width_mask(input logic [4:0] w);
    return (w == 5'd0) ? '1 : ((XLEN'(1) << w) - XLEN'(1));
  endfunction

  // Instruction word builder, used by testbenches and program generators.
  function automatic logic [31:0] mk_instr(input opcode_e op, input logic [3:0] dst,
                                           input logic [4:0] x, input logic iy,
                                           input logic [4:0] y, input logic [4:0] z,
                                           input dir_e in, input logic [3:0] out,
                                           input logic trace);
    instr_t i;
    i.trace = trace; i.op = op; i.dst = dst; i.x = x; i.iy = iy; i.y = y; i.z = z;
    i.in = in; i.out = out;
    return i;
  endfunction

endpackage
