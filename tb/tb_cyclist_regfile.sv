// Testbench for cyclist_regfile: random writes and reads on all three read ports and the host
// port against a shadow array, including same-cycle write-through and reset to zero.
module tb_cyclist_regfile;
  logic clk = 0, rst_n = 0;
  logic [2:0][4:0] ra;
  logic [2:0][31:0] rd;
  logic we;
  logic [4:0] wa, dbg_ra;
  logic [31:0] wd, dbg_rd;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  cyclist_regfile #(.NREG(32), .W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra = '0; dbg_ra = 0;
    foreach (shadow[i]) shadow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      dbg_ra = 5'(i); #1; checks++; if (dbg_rd != 0) failures++;
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      for (int p = 0; p < 3; p++) ra[p] = (k % 3 == p) ? wa : 5'($urandom);
      dbg_ra = 5'($urandom);
      #1;
      for (int p = 0; p < 3; p++) begin
        logic [31:0] e;
        e = (we && wa == ra[p]) ? wd : shadow[ra[p]];
        checks++;
        if (rd[p] != e) begin failures++; $display("port %0d reg %0d got %h exp %h", p, ra[p], rd[p], e); end
      end
      checks++; if (dbg_rd != shadow[dbg_ra]) failures++;
      @(posedge clk);
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
