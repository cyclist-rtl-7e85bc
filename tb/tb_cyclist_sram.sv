// Testbench for cyclist_sram at the full 1024 x 32 size: fills the array, then random reads
// and writes, checking the one-cycle read latency, that rdata holds while re is low, that a
// read in the cycle of a write to the same word returns the old word, and the host port.
module tb_cyclist_sram;
  logic clk = 0;
  logic re, we;
  logic [9:0] raddr, waddr, dbg_raddr;
  logic [31:0] rdata, wdata, dbg_rdata;
  logic [31:0] shadow [1024];
  int checks = 0, failures = 0;

  cyclist_sram #(.DEPTH(1024), .WIDTH(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0; dbg_raddr = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = 32'(i) * 32'h9E37_79B9; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 4000; k++) begin
      logic [31:0] exp_r, held;
      logic did_re;
      @(negedge clk);
      re = 1'($urandom); raddr = 10'($urandom);
      we = 1'($urandom); waddr = (k % 4 == 0) ? raddr : 10'($urandom); wdata = $urandom;
      dbg_raddr = 10'($urandom);
      #1; checks++; if (dbg_rdata != shadow[dbg_raddr]) failures++;
      exp_r = shadow[raddr]; did_re = re; held = rdata;
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      checks++;
      if (did_re ? (rdata != exp_r) : (rdata != held)) begin
        failures++; $display("read %0d got %h exp %h", raddr, rdata, did_re ? exp_r : held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
