// dispatch_descriptor: the scheduler's Dispatch Descriptor.
//
// An ordered queue of placed requests. The Task Placer gives the position at
// which a new entry is inserted (entries behind it move back by one); the
// head is handed to the Address Manager with a valid/ready handshake, so the
// requests are executed one after another in queue order. An insert and a
// dequeue may happen in the same cycle: the position then refers to the queue
// before the head left. Depth NUM_TASKS, as every port has at most one request
// in flight. Inserting into a full queue is a protocol error (asserted).
//
// Timing: an inserted entry can be dequeued from the next cycle on.
module dispatch_descriptor
  import ammc_pkg::*;
#(
  parameter int NUM_TASKS = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ins_valid,
  input  logic [TID_W:0]    ins_pos,
  input  disp_t             ins_entry,
  input  logic              deq_ready,
  output logic              head_valid,
  output disp_t             head,
  output logic [TID_W:0]    count,
  output logic [PRIO_W-1:0] q_prio [NUM_TASKS]
);
  disp_t q [NUM_TASKS];
  logic  deq;

  assign head_valid = (count != 0);
  assign head       = q[0];
  assign deq        = head_valid && deq_ready;

  always_comb
    for (int i = 0; i < NUM_TASKS; i++) q_prio[i] = q[i].prio;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < NUM_TASKS; i++) q[i] <= '0;
    end else begin
      disp_t                 tmp [NUM_TASKS];
      int                    n, p;
      n = int'(count);
      for (int i = 0; i < NUM_TASKS; i++) tmp[i] = q[i];
      p = int'(ins_pos);
      if (deq) begin
        for (int i = 0; i < NUM_TASKS - 1; i++) tmp[i] = tmp[i+1];
        n = n - 1;
        if (p > 0) p = p - 1;
      end
      if (ins_valid && n < NUM_TASKS) begin
        if (p > n) p = n;
        for (int i = NUM_TASKS - 1; i > 0; i--)
          if (i > p) tmp[i] = tmp[i-1];
        tmp[p] = ins_entry;
        n = n + 1;
      end
      for (int i = 0; i < NUM_TASKS; i++) q[i] <= tmp[i];
      count <= (TID_W+1)'(n);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    ins_valid |-> (int'(count) < NUM_TASKS || deq));

endmodule
