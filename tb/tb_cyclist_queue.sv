// Testbench for cyclist_queue: pushes a random stream through the one-element queue with random
// producer and consumer stalls and checks order, no loss, no duplication, that the queue never
// holds more than one word, and that back-to-back transfer sustains one word per cycle.
module tb_cyclist_queue;
  logic clk = 0, rst_n = 0;
  logic enq_valid, enq_ready, deq_valid, deq_ready;
  logic [31:0] enq_data, deq_data;
  int checks = 0, failures = 0;
  int sent = 0, recvd = 0, cyc = 0;
  logic [31:0] expq [$];

  cyclist_queue #(.WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic pv, input logic [31:0] pd, input logic cr);
    enq_valid = pv; enq_data = pd; deq_ready = cr && deq_valid;
    #1;
    if (deq_ready) begin
      checks++;
      if (expq.size() == 0 || deq_data != expq[0]) begin
        failures++; $display("mismatch got %h", deq_data);
      end
      if (expq.size() > 0) void'(expq.pop_front());
      recvd++;
    end
    if (enq_valid && enq_ready) begin expq.push_back(enq_data); sent++; end
    @(posedge clk); #1;
    checks++;
    if (expq.size() > 1 || (expq.size() == 1) != deq_valid) begin
      failures++; $display("occupancy wrong: model %0d valid %0b", expq.size(), deq_valid);
    end
  endtask

  initial begin
    enq_valid = 0; deq_ready = 0; enq_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    checks++; if (deq_valid) failures++;
    // random traffic
    for (int i = 0; i < 2000; i++) step($urandom % 3 != 0, $urandom, $urandom % 3 != 0);
    // full throughput: producer and consumer always ready
    begin
      int s0;
      s0 = sent;
      for (int i = 0; i < 100; i++) step(1'b1, 32'(i), 1'b1);
      checks++;
      if (sent - s0 < 99) begin failures++; $display("throughput %0d/100", sent - s0); end
    end
    // drain
    for (int i = 0; i < 4; i++) step(1'b0, 0, 1'b1);
    checks++; if (sent != recvd) begin failures++; $display("lost words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
