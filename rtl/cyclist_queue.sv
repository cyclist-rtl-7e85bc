// cyclist_queue: one-element blocking queue of the Cyclist mesh network.
//
// Every tile has one of these per compass direction on its input side and one per direction on
// its output side, so a word crossing between two tiles passes an output queue and an input
// queue. The queue holds at most one word. A producer waits (enq_ready low) while it is full,
// and a consumer waits while it is empty; this blocking is what interlocks the statically
// scheduled pipelines. The one-element depth follows the published design. The valid/ready
// handshake, and accepting a new word in the cycle the held word leaves, are this design's
// choices, so that a chain of queues moves one word per cycle.
//
// Timing: a word enqueued at a clock edge is visible on deq_* in the next cycle.
module cyclist_queue #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enq_valid,
  output logic             enq_ready,
  input  logic [WIDTH-1:0] enq_data,
  output logic             deq_valid,
  input  logic             deq_ready,
  output logic [WIDTH-1:0] deq_data
);

  logic             full;
  logic [WIDTH-1:0] data;

  assign enq_ready = !full || deq_ready;
  assign deq_valid = full;
  assign deq_data  = data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      data <= '0;
    end else begin
      if (enq_valid && enq_ready) begin
        full <= 1'b1;
        data <= enq_data;
      end else if (deq_ready) begin
        full <= 1'b0;
      end
    end
  end

  // A word must not be taken from an empty queue.
  assert property (@(posedge clk) disable iff (!rst_n) deq_ready |-> full)
    else $error("cyclist_queue: dequeue while empty");

endmodule
