// descriptor_memory: the AMMC Descriptor Memory.
//
// Holds the access-pattern descriptors of every task. Each task owns a separate
// block of DESC_PER_TASK descriptors, written at program time through the write
// port and read by the Address Manager through the read port. Storage is one
// array addressed by {task, index}, which maps onto a block RAM.
//
// Timing: writes take effect at the clock edge; rd_desc is valid the cycle after
// rd_en (registered read). The per-task block organisation follows the AMMC
// description; the block size and read latency are this design's choices.
module descriptor_memory
  import ammc_pkg::*;
#(
  parameter int NUM_TASKS     = 9,
  parameter int DESC_PER_TASK = 8
) (
  input  logic                              clk,
  input  logic                              wr_en,
  input  logic [TID_W-1:0]                  wr_task,
  input  logic [$clog2(DESC_PER_TASK)-1:0]  wr_idx,
  input  desc_t                             wr_desc,
  input  logic                              rd_en,
  input  logic [TID_W-1:0]                  rd_task,
  input  logic [$clog2(DESC_PER_TASK)-1:0]  rd_idx,
  output desc_t                             rd_desc
);
  localparam int IW    = $clog2(DESC_PER_TASK);
  localparam int DEPTH = NUM_TASKS * DESC_PER_TASK;

  desc_t mem [DEPTH];

  function automatic int unsigned slot(input logic [TID_W-1:0] t, input logic [IW-1:0] i);
    return int'(t) * DESC_PER_TASK + int'(i);
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_task) < NUM_TASKS) mem[slot(wr_task, wr_idx)] <= wr_desc;
    if (rd_en) begin
      if (int'(rd_task) < NUM_TASKS) rd_desc <= mem[slot(rd_task, rd_idx)];
      else                           rd_desc <= '0;
    end
  end

endmodule
