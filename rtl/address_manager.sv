// address_manager: the Address Manager of the AMMC Memory Manager.
//
// Takes one dispatched request (port, task id) at a time, fetches the task's
// descriptors from the Descriptor Memory and turns them into a stream of
// address records for the Data Manager. A descriptor yields Size accesses at
// External Address + i*Stride (Stride in two's complement); the local buffer
// address counts up from 0 over the whole request, and the descriptor's Task
// ID selects which Specialized Memory is used. A non-zero Offset links to the
// descriptor at (index + Offset) mod DESC_PER_TASK, so irregular patterns are
// chains of descriptors; Offset 0 ends the chain, and at most DESC_PER_TASK
// descriptors are followed.
//
// Address Buffer: the generated records are kept in a buffer of ABUF_DEPTH
// entries tagged with the task id. When the same task is dispatched again and
// its whole list fitted, the list is replayed from the buffer without fetching
// descriptors (abuf_hit pulses). Any descriptor write clears the buffer.
// The descriptor walk follows the AMMC description; the address formula, link
// encoding and buffer organisation are this design's choices.
//
// Timing: two cycles per descriptor fetch, then one record per cycle while
// rec_ready is high; replay gives one record per cycle after one cycle.
module address_manager
  import ammc_pkg::*;
#(
  parameter int NUM_TASKS     = 9,
  parameter int DESC_PER_TASK = 8,
  parameter int ABUF_DEPTH    = 64
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // dispatched request
  input  logic                              disp_valid,
  output logic                              disp_ready,
  input  disp_t                             disp,
  // Descriptor Memory read port
  output logic                              dm_rd_en,
  output logic [TID_W-1:0]                  dm_rd_task,
  output logic [$clog2(DESC_PER_TASK)-1:0]  dm_rd_idx,
  input  desc_t                             dm_rd_desc,
  input  logic                              desc_write,
  // address records to the Data Manager
  output logic                              rec_valid,
  input  logic                              rec_ready,
  output addr_rec_t                         rec,
  // status
  output logic [NUM_TASKS-1:0]              busy_port,
  output logic                              abuf_hit
);
  localparam int IW = $clog2(DESC_PER_TASK);
  localparam int BW = $clog2(ABUF_DEPTH);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_LOAD, S_GEN, S_REPLAY} state_e;
  state_e state;

  logic [TID_W-1:0]  cur_port, cur_task;
  desc_t             cur;
  logic [IW-1:0]     idx;
  logic [IW:0]       hops;
  logic [SIZE_W-1:0] elem, elem_cnt;
  logic [EXT_AW-1:0] ext;
  logic [LOC_AW-1:0] loc;

  addr_rec_t         abuf [ABUF_DEPTH];
  logic [TID_W-1:0]  abuf_tag;
  logic              abuf_valid;
  logic [BW:0]       abuf_cnt;
  logic              abuf_ovf;
  logic [BW:0]       ridx;

  logic gen_last;
  assign elem_cnt = (cur.size == '0) ? SIZE_W'(1) : cur.size;
  assign gen_last = (elem == elem_cnt - 1'b1) &&
                    (cur.offset == '0 || int'(hops) == DESC_PER_TASK - 1);

  assign disp_ready = (state == S_IDLE);
  assign dm_rd_en   = (state == S_FETCH);
  assign dm_rd_task = cur_task;
  assign dm_rd_idx  = idx;

  always_comb begin
    rec       = '0;
    rec_valid = 1'b0;
    if (state == S_GEN) begin
      rec_valid    = 1'b1;
      rec.cmd      = cur.cmd;
      rec.buf_id   = cur.task_id;
      rec.ext_addr = ext;
      rec.loc_addr = loc;
      rec.port     = cur_port;
      rec.last     = gen_last;
    end else if (state == S_REPLAY) begin
      rec_valid = 1'b1;
      rec       = abuf[ridx[BW-1:0]];
      rec.port  = cur_port;
      rec.last  = (ridx == abuf_cnt - 1'b1);
    end
  end

  always_comb begin
    busy_port = '0;
    if (state != S_IDLE && int'(cur_port) < NUM_TASKS) busy_port[cur_port] = 1'b1;
  end

  // Address Buffer storage (no reset: only entries below abuf_cnt are read)
  always_ff @(posedge clk)
    if (state == S_GEN && rec_ready && int'(abuf_cnt) < ABUF_DEPTH)
      abuf[abuf_cnt[BW-1:0]] <= rec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur_port   <= '0;
      cur_task   <= '0;
      cur        <= '0;
      idx        <= '0;
      hops       <= '0;
      elem       <= '0;
      ext        <= '0;
      loc        <= '0;
      abuf_tag   <= '0;
      abuf_valid <= 1'b0;
      abuf_cnt   <= '0;
      abuf_ovf   <= 1'b0;
      ridx       <= '0;
      abuf_hit   <= 1'b0;
    end else begin
      abuf_hit <= 1'b0;
      unique case (state)
        S_IDLE: if (disp_valid) begin
          cur_port <= disp.port;
          cur_task <= disp.task_id;
          if (abuf_valid && abuf_tag == disp.task_id && !desc_write) begin
            state    <= S_REPLAY;
            ridx     <= '0;
            abuf_hit <= 1'b1;
          end else begin
            state      <= S_FETCH;
            idx        <= '0;
            hops       <= '0;
            loc        <= '0;
            abuf_tag   <= disp.task_id;
            abuf_valid <= 1'b0;
            abuf_cnt   <= '0;
            abuf_ovf   <= 1'b0;
          end
        end
        S_FETCH: state <= S_LOAD;
        S_LOAD: begin
          cur   <= dm_rd_desc;
          ext   <= dm_rd_desc.ext_addr;
          elem  <= '0;
          state <= S_GEN;
        end
        S_GEN: if (rec_ready) begin
          if (int'(abuf_cnt) < ABUF_DEPTH) begin
            abuf_cnt <= abuf_cnt + 1'b1;
          end else begin
            abuf_ovf <= 1'b1;
          end
          ext  <= ext + EXT_AW'(signed'(cur.stride));
          loc  <= loc + 1'b1;
          elem <= elem + 1'b1;
          if (gen_last) begin
            state      <= S_IDLE;
            abuf_valid <= !abuf_ovf && int'(abuf_cnt) < ABUF_DEPTH && !desc_write;
          end else if (elem == elem_cnt - 1'b1) begin
            idx   <= idx + cur.offset[IW-1:0];
            hops  <= hops + 1'b1;
            state <= S_FETCH;
          end
        end
        S_REPLAY: if (rec_ready) begin
          ridx <= ridx + 1'b1;
          if (ridx == abuf_cnt - 1'b1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      if (desc_write) begin
        abuf_valid <= 1'b0;
        abuf_ovf   <= 1'b1;
      end
    end
  end

endmodule
