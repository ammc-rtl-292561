// scheduler: the AMMC Scheduler.
//
// Core ports raise core_req (level). A request is accepted when the port has
// none in flight; it then waits in 'arrived' until the Comparator picks it
// (best programmed priority first), the Task Placer computes its position and
// it is inserted into the Dispatch Descriptor, one request per cycle. The head
// of the Dispatch Descriptor is dispatched to the Address Manager with the
// port's Task ID from the Program-Time Priority Descriptor. The port stays
// busy until core_done for it; a core that keeps core_req high while it
// computes ("request & busy", double buffering) is accepted again at once.
//
// Modes: symmetric = FIFO order; asymmetric = priority order with FIFO among
// equal priorities. The mode input may change at any time and applies to
// requests placed after the change. The structure (Program-Time Priority
// Descriptor, Comparator, Task Placer, Dispatch Descriptor) follows the AMMC
// description; the handshakes are this design's choice.
//
// Timing: a request accepted in cycle t is placed at t+1 at the earliest and
// can be dispatched at t+2.
module scheduler
  import ammc_pkg::*;
#(
  parameter int NUM_TASKS = 9
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 symmetric,
  // Program-Time Priority Descriptor write port
  input  logic                 prio_wr_en,
  input  logic [TID_W-1:0]     prio_wr_port,
  input  logic [TID_W-1:0]     prio_wr_task,
  input  logic [PRIO_W-1:0]    prio_wr_prio,
  // cores
  input  logic [NUM_TASKS-1:0] core_req,
  input  logic [NUM_TASKS-1:0] core_done,
  // to the Address Manager
  output logic                 disp_valid,
  input  logic                 disp_ready,
  output disp_t                disp,
  // status
  output logic [NUM_TASKS-1:0] waiting,      // accepted, not yet dispatched
  output logic [NUM_TASKS-1:0] outstanding   // accepted, not yet done
);
  logic [TID_W-1:0]  pd_task [NUM_TASKS];
  logic [PRIO_W-1:0] pd_prio [NUM_TASKS];
  logic [PRIO_W-1:0] q_prio  [NUM_TASKS];
  logic [NUM_TASKS-1:0] arrived, queued;
  logic              sel_valid;
  logic [TID_W-1:0]  sel;
  logic [PRIO_W-1:0] sel_prio;
  logic [TID_W:0]    count, pos;
  disp_t             head, ins_entry;
  logic              head_valid;

  priority_descriptor #(.NUM_TASKS(NUM_TASKS)) u_pd (
    .clk, .rst_n, .wr_en(prio_wr_en), .wr_port(prio_wr_port), .wr_task(prio_wr_task),
    .wr_prio(prio_wr_prio), .task_id(pd_task), .prio(pd_prio));

  comparator #(.NUM_TASKS(NUM_TASKS)) u_cmp (
    .pending(arrived), .prio(pd_prio), .symmetric, .sel_valid, .sel, .sel_prio);

  task_placer #(.NUM_TASKS(NUM_TASKS)) u_tp (
    .count, .q_prio, .new_prio(sel_prio), .symmetric, .pos);

  always_comb begin
    ins_entry         = '0;
    ins_entry.port    = sel;
    ins_entry.task_id = pd_task[sel];
    ins_entry.prio    = sel_prio;
  end

  dispatch_descriptor #(.NUM_TASKS(NUM_TASKS)) u_dd (
    .clk, .rst_n, .ins_valid(sel_valid), .ins_pos(pos), .ins_entry,
    .deq_ready(disp_ready), .head_valid, .head, .count, .q_prio);

  assign disp_valid = head_valid;
  assign disp       = head;
  assign waiting    = arrived | queued;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arrived     <= '0;
      queued      <= '0;
      outstanding <= '0;
    end else begin
      logic [NUM_TASKS-1:0] arr, que, out;
      arr = arrived;
      que = queued;
      out = outstanding;
      if (sel_valid) begin
        arr[sel] = 1'b0;
        que[sel] = 1'b1;
      end
      if (head_valid && disp_ready) que[head.port] = 1'b0;
      for (int i = 0; i < NUM_TASKS; i++) begin
        if (core_done[i]) out[i] = 1'b0;
        if (core_req[i] && !outstanding[i]) begin
          arr[i] = 1'b1;
          out[i] = 1'b1;
        end
      end
      arrived     <= arr;
      queued      <= que;
      outstanding <= out;
    end
  end

  a_done_only_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    (core_done & ~outstanding) == '0);

endmodule
