// Testbench for cyclist_alu: random operands for every operation, compared with a reference
// model written separately from the design (bit loops rather than masks and shifts where
// practical), plus directed corner cases for widths 0, 1 and 31.
module tb_cyclist_alu;
  import cyclist_pkg::*;
  opcode_e op;
  logic [31:0] x, y, z, result;
  logic [4:0] w;
  logic [9:0] imm;
  logic target_reset;
  int checks = 0, failures = 0;

  cyclist_alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] lowbits(input logic [31:0] v, input int n);
    logic [31:0] r = '0;
    for (int i = 0; i < n && i < 32; i++) r[i] = v[i];
    return r;
  endfunction

  function automatic logic [31:0] ref_model(input opcode_e o, input logic [31:0] a, b, c,
                                            input logic [4:0] wf, input logic [9:0] im,
                                            input logic tr);
    int n = (wf == 0) ? 32 : int'(wf);
    int sh = int'(b[4:0]);
    logic [31:0] r;
    logic [31:0] am = lowbits(a, n), bm = lowbits(b, n);
    case (o)
      OP_NOP:  r = 0;
      OP_RST:  r = {31'd0, tr};
      OP_LIT:  r = {22'd0, im};
      OP_NOT:  r = lowbits(~a, n);
      OP_AND:  r = a & b;
      OP_OR:   r = a | b;
      OP_XOR:  r = a ^ b;
      OP_EQ:   r = (a == b) ? 1 : 0;
      OP_NEQ:  r = (a != b) ? 1 : 0;
      OP_MUX:  r = a[0] ? b : c;
      OP_LOG2: begin r = 0; for (int i = 0; i < n; i++) if (a[i]) r = i; end
      OP_LSH:  begin r = 0; for (int i = 0; i < 32; i++) if (i - sh >= 0) r[i] = a[i - sh]; end
      OP_RSH:  begin r = 0; for (int i = 0; i < 32; i++) if (i + sh < n) r[i] = am[i + sh]; end
      OP_RSHA: begin
        r = 0;
        for (int i = 0; i < n; i++) r[i] = (i + sh < n) ? am[i + sh] : am[n-1];
      end
      OP_CAT:  begin
        r = 0;
        for (int i = 0; i < 32; i++) r[i] = (i < n) ? b[i] : ((i - n < 32) ? a[i - n] : 1'b0);
      end
      OP_ADD:  r = lowbits(a + b, n);
      OP_SUB:  r = lowbits(a - b, n);
      OP_LT:   r = (am < bm) ? 1 : 0;
      OP_GTE:  r = (am >= bm) ? 1 : 0;
      OP_MUL:  r = lowbits(a * b, n);
      OP_LD, OP_ST, OP_STI: r = a;
      OP_LDI:  r = {22'd0, im};
      default: r = 0;
    endcase
    return r;
  endfunction

  task automatic check_one();
    logic [31:0] e;
    #1;
    e = ref_model(op, x, y, z, w, imm, target_reset);
    checks++;
    if (result !== e) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s x=%h y=%h z=%h w=%0d: got %h exp %h", op.name(), x, y, z, w, result, e);
    end
  endtask

  initial begin
    for (int o = 0; o < 24; o++) begin
      for (int k = 0; k < 400; k++) begin
        op = opcode_e'(o);
        x = $urandom; y = $urandom; z = $urandom; w = 5'($urandom);
        imm = 10'($urandom); target_reset = 1'($urandom);
        if (k % 4 == 0) y = x;             // exercise eq/lt boundaries
        if (k % 5 == 0) w = 5'd0;
        check_one();
      end
    end
    // directed corners
    op = OP_ADD; x = 32'hFFFF_FFFF; y = 32'd1; w = 5'd0; check_one();
    op = OP_ADD; x = 32'h0000_00FF; y = 32'd1; w = 5'd8; check_one();
    op = OP_RSHA; x = 32'h0000_0080; y = 32'd3; w = 5'd8; check_one();
    op = OP_CAT; x = 32'h5; y = 32'hFFFF_FFFF; w = 5'd1; check_one();
    op = OP_LOG2; x = 32'h8000_0000; w = 5'd0; check_one();
    op = OP_LOG2; x = 32'h0; w = 5'd0; check_one();
    // hand-worked values, independent of the reference model
    op = OP_ADD; x = 32'd250; y = 32'd10; w = 5'd8; #1; checks++; if (result != 32'd4) failures++;
    op = OP_RSHA; x = 32'h80; y = 32'd3; w = 5'd8; #1; checks++; if (result != 32'hF0) failures++;
    op = OP_CAT; x = 32'h3; y = 32'h5; w = 5'd4; #1; checks++; if (result != 32'h35) failures++;
    op = OP_LOG2; x = 32'h0001_0400; w = 5'd0; #1; checks++; if (result != 32'd16) failures++;
    op = OP_LT; x = 32'h1_0003; y = 32'h0_0005; w = 5'd16; #1; checks++; if (result != 32'd1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
