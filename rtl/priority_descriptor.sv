// priority_descriptor: the Program-Time Priority Descriptor of the AMMC scheduler.
//
// For every core request port it holds the Task ID the port runs and the
// priority programmed for it (1 is the highest, larger numbers are lower).
// Written at program time; read continuously by the scheduler's Comparator and
// by the dispatch path. Reset gives port i task i and priority 1, which makes
// every port equal (the symmetric setting of the evaluation).
//
// Timing: a write is visible on the outputs the cycle after wr_en.
module priority_descriptor
  import ammc_pkg::*;
#(
  parameter int NUM_TASKS = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr_en,
  input  logic [TID_W-1:0]        wr_port,
  input  logic [TID_W-1:0]        wr_task,
  input  logic [PRIO_W-1:0]       wr_prio,
  output logic [TID_W-1:0]        task_id [NUM_TASKS],
  output logic [PRIO_W-1:0]       prio    [NUM_TASKS]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_TASKS; i++) begin
        task_id[i] <= TID_W'(i);
        prio[i]    <= PRIO_W'(1);
      end
    end else if (wr_en && int'(wr_port) < NUM_TASKS) begin
      task_id[wr_port] <= wr_task;
      prio[wr_port]    <= wr_prio;
    end
  end
endmodule
