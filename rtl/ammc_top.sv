// ammc_top: the Advanced Multi-core Memory Controller (AMMC).
//
// Serves NUM_TASKS core ports (one per application kernel) without a master
// processor or operating system. A core raises core_req; the Scheduler orders
// the requests (FIFO in symmetric mode, by programmed priority in asymmetric
// mode) and hands them one at a time to the Address Manager, which expands the
// task's descriptor chain from the Descriptor Memory into addresses (reusing
// its Address Buffer for a repeated task). The Data Manager moves the words
// between the cores' Specialized Memories and the Pattern Aware SDRAM
// Controller, reusing words it already holds, and pulses core_done when the
// request has finished. A record FIFO between the two managers lets address
// generation run ahead of the transfers. Kernel timers count Ts/Tm/Tt/Tc per
// port. All units work concurrently.
//
// Program-time ports write descriptors and the Program-Time Priority
// Descriptor; 'symmetric' selects the scheduling mode and may change at run
// time. Each core reaches its own Specialized Memory through its core_lm_*
// port (one cycle read latency). The SDRAM command bus is brought out.
// The unit structure follows the AMMC description; the on-chip bus that links
// cores and AMMC is not modelled: its signals are plain ports here.
module ammc_top
  import ammc_pkg::*;
#(
  parameter int NUM_TASKS     = 9,
  parameter int DESC_PER_TASK = 8,
  parameter int LM_DEPTH      = 1024,
  parameter int ABUF_DEPTH    = 64,
  parameter int REUSE_DEPTH   = 64,
  parameter int REC_FIFO_DEPTH = 16,
  parameter int T_REFI        = 780
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // program time
  input  logic                              prog_desc_wr,
  input  logic [TID_W-1:0]                  prog_desc_task,
  input  logic [$clog2(DESC_PER_TASK)-1:0]  prog_desc_idx,
  input  desc_t                             prog_desc,
  input  logic                              prog_prio_wr,
  input  logic [TID_W-1:0]                  prog_prio_port,
  input  logic [TID_W-1:0]                  prog_prio_task,
  input  logic [PRIO_W-1:0]                 prog_prio_val,
  input  logic                              symmetric,
  // cores
  input  logic [NUM_TASKS-1:0]              core_req,
  input  logic [NUM_TASKS-1:0]              core_busy,
  output logic [NUM_TASKS-1:0]              core_done,
  input  logic [NUM_TASKS-1:0]              core_lm_en,
  input  logic [NUM_TASKS-1:0]              core_lm_we,
  input  logic [$clog2(LM_DEPTH)-1:0]       core_lm_addr  [NUM_TASKS],
  input  logic [DATA_W-1:0]                 core_lm_wdata [NUM_TASKS],
  output logic [DATA_W-1:0]                 core_lm_rdata [NUM_TASKS],
  // SDRAM
  output logic                              sd_cs_n,
  output logic                              sd_ras_n,
  output logic                              sd_cas_n,
  output logic                              sd_we_n,
  output logic [1:0]                        sd_ba,
  output logic [12:0]                       sd_a,
  output logic [DATA_W-1:0]                 sd_dq_out,
  output logic                              sd_dq_oe,
  input  logic [DATA_W-1:0]                 sd_dq_in,
  // kernel timers and event strobes
  input  logic                              timers_clear,
  output logic [31:0]                       ts [NUM_TASKS],
  output logic [31:0]                       tm [NUM_TASKS],
  output logic [31:0]                       tt [NUM_TASKS],
  output logic [31:0]                       tc [NUM_TASKS],
  output logic                              ev_dispatch,
  output logic                              ev_abuf_hit,
  output logic                              ev_reuse_hit,
  output logic                              ev_row_hit,
  output logic                              ev_row_miss,
  output logic                              ev_refresh
);
  localparam int LW = $clog2(LM_DEPTH);

  // Scheduler -> Address Manager
  logic  disp_valid, disp_ready;
  disp_t disp;
  logic [NUM_TASKS-1:0] waiting, outstanding;

  // Descriptor Memory
  logic                             dm_rd_en;
  logic [TID_W-1:0]                 dm_rd_task;
  logic [$clog2(DESC_PER_TASK)-1:0] dm_rd_idx;
  desc_t                            dm_rd_desc;

  // Address Manager -> record FIFO -> Data Manager
  logic      rec_valid, rec_ready, dq_valid, dq_ready;
  addr_rec_t rec, dq_rec;
  logic [NUM_TASKS-1:0] am_busy, dmg_busy;

  // Data Manager <-> Specialized Memories / SDRAM controller
  logic                lm_en, lm_we;
  logic [TID_W-1:0]    lm_buf, lm_buf_q;
  logic [LOC_AW-1:0]   lm_addr;
  logic [DATA_W-1:0]   lm_wdata, lm_rdata;
  logic [DATA_W-1:0]   b_rdata [NUM_TASKS];
  logic                mc_req_valid, mc_req_ready, mc_req_we, mc_rsp_valid;
  logic [EXT_AW-1:0]   mc_req_addr;
  logic [DATA_W-1:0]   mc_req_wdata, mc_rsp_rdata;
  logic                done_valid;
  logic [TID_W-1:0]    done_port;

  scheduler #(.NUM_TASKS(NUM_TASKS)) u_sched (
    .clk, .rst_n, .symmetric,
    .prio_wr_en(prog_prio_wr), .prio_wr_port(prog_prio_port),
    .prio_wr_task(prog_prio_task), .prio_wr_prio(prog_prio_val),
    .core_req, .core_done,
    .disp_valid, .disp_ready, .disp, .waiting, .outstanding);

  descriptor_memory #(.NUM_TASKS(NUM_TASKS), .DESC_PER_TASK(DESC_PER_TASK)) u_desc (
    .clk, .wr_en(prog_desc_wr), .wr_task(prog_desc_task), .wr_idx(prog_desc_idx),
    .wr_desc(prog_desc), .rd_en(dm_rd_en), .rd_task(dm_rd_task), .rd_idx(dm_rd_idx),
    .rd_desc(dm_rd_desc));

  address_manager #(.NUM_TASKS(NUM_TASKS), .DESC_PER_TASK(DESC_PER_TASK),
                    .ABUF_DEPTH(ABUF_DEPTH)) u_am (
    .clk, .rst_n, .disp_valid, .disp_ready, .disp,
    .dm_rd_en, .dm_rd_task, .dm_rd_idx, .dm_rd_desc, .desc_write(prog_desc_wr),
    .rec_valid, .rec_ready, .rec, .busy_port(am_busy), .abuf_hit(ev_abuf_hit));

  record_fifo #(.DEPTH(REC_FIFO_DEPTH)) u_rfifo (
    .clk, .rst_n, .in_valid(rec_valid), .in_ready(rec_ready), .in_data(rec),
    .out_valid(dq_valid), .out_ready(dq_ready), .out_data(dq_rec));

  data_manager #(.NUM_TASKS(NUM_TASKS), .REUSE_DEPTH(REUSE_DEPTH)) u_dmgr (
    .clk, .rst_n, .rec_valid(dq_valid), .rec_ready(dq_ready), .rec(dq_rec),
    .lm_en, .lm_we, .lm_buf, .lm_addr, .lm_wdata, .lm_rdata,
    .mc_req_valid, .mc_req_ready, .mc_req_we, .mc_req_addr, .mc_req_wdata,
    .mc_rsp_valid, .mc_rsp_rdata,
    .done_valid, .done_port, .reuse_hit(ev_reuse_hit), .busy_port(dmg_busy));

  // Specialized Memories: port A to the core, port B to the Data Manager
  for (genvar i = 0; i < NUM_TASKS; i++) begin : g_lm
    specialized_memory #(.DEPTH(LM_DEPTH)) u_lm (
      .clk,
      .a_en(core_lm_en[i]), .a_we(core_lm_we[i]), .a_addr(core_lm_addr[i]),
      .a_wdata(core_lm_wdata[i]), .a_rdata(core_lm_rdata[i]),
      .b_en(lm_en && int'(lm_buf) == i), .b_we(lm_we), .b_addr(lm_addr[LW-1:0]),
      .b_wdata(lm_wdata), .b_rdata(b_rdata[i]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     lm_buf_q <= '0;
    else if (lm_en) lm_buf_q <= lm_buf;

  assign lm_rdata = (int'(lm_buf_q) < NUM_TASKS) ? b_rdata[lm_buf_q] : '0;

  sdram_controller #(.T_REFI(T_REFI)) u_sdc (
    .clk, .rst_n,
    .req_valid(mc_req_valid), .req_ready(mc_req_ready), .req_we(mc_req_we),
    .req_addr(mc_req_addr), .req_wdata(mc_req_wdata),
    .rsp_valid(mc_rsp_valid), .rsp_rdata(mc_rsp_rdata),
    .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dq_out, .sd_dq_oe, .sd_dq_in,
    .row_hit(ev_row_hit), .row_miss(ev_row_miss), .refresh(ev_refresh));

  always_comb begin
    core_done = '0;
    if (done_valid && int'(done_port) < NUM_TASKS) core_done[done_port] = 1'b1;
  end

  assign ev_dispatch = disp_valid && disp_ready;

  kernel_timers #(.NUM_TASKS(NUM_TASKS), .CNT_W(32)) u_timers (
    .clk, .rst_n, .clear(timers_clear),
    .sched(waiting), .mman(am_busy), .xfer(dmg_busy), .comp(core_busy),
    .ts, .tm, .tt, .tc);

endmodule
