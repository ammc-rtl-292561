// task_placer: the scheduler's Task Placer.
//
// Computes where a new request enters the Dispatch Descriptor. In symmetric
// mode the queue is FIFO and the request goes to the tail. In asymmetric mode
// it goes in front of the first queued entry with a strictly worse (larger)
// priority number, so better priorities run first and equal priorities keep
// their arrival (FIFO) order. Purely combinational.
module task_placer
  import ammc_pkg::*;
#(
  parameter int NUM_TASKS = 9
) (
  input  logic [TID_W:0]    count,
  input  logic [PRIO_W-1:0] q_prio [NUM_TASKS],
  input  logic [PRIO_W-1:0] new_prio,
  input  logic              symmetric,
  output logic [TID_W:0]    pos
);
  always_comb begin
    logic found;
    pos   = count;
    found = 1'b0;
    if (!symmetric) begin
      for (int i = 0; i < NUM_TASKS; i++) begin
        if (!found && i < int'(count) && q_prio[i] > new_prio) begin
          pos   = (TID_W+1)'(i);
          found = 1'b1;
        end
      end
    end
  end
endmodule
