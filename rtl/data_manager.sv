// data_manager: the Data Manager of the AMMC Memory Manager.
//
// Executes the address records produced by the Address Manager, one at a time:
//   CMD_READ : word from SDRAM (or from the reuse buffer) into a Specialized Memory
//   CMD_WRITE: word from a Specialized Memory out to SDRAM
// The reuse buffer keeps recently moved words so that data an earlier access
// pattern already brought on chip is reused instead of being fetched from
// SDRAM again; writes update it (write-through), so it never holds stale
// data. It is direct mapped: REUSE_DEPTH entries indexed by the low external
// address bits, tagged with the rest. When the record marked 'last' has been
// executed, done_valid pulses with the requesting port.
// Data reuse follows the AMMC description; the buffer organisation is this
// design's choice.
//
// Interfaces: records by valid/ready; the local memory port has one cycle of
// read latency; the SDRAM controller port is valid/ready for requests and a
// rsp_valid pulse for read data.
// Timing per record, from acceptance to accepting the next: read hit 4
// cycles, read miss 5 cycles plus the SDRAM latency, write 5 cycles plus any
// wait for the SDRAM controller.
module data_manager
  import ammc_pkg::*;
#(
  parameter int NUM_TASKS   = 9,
  parameter int REUSE_DEPTH = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rec_valid,
  output logic                 rec_ready,
  input  addr_rec_t            rec,
  // Specialized Memory port
  output logic                 lm_en,
  output logic                 lm_we,
  output logic [TID_W-1:0]     lm_buf,
  output logic [LOC_AW-1:0]    lm_addr,
  output logic [DATA_W-1:0]    lm_wdata,
  input  logic [DATA_W-1:0]    lm_rdata,
  // SDRAM controller port
  output logic                 mc_req_valid,
  input  logic                 mc_req_ready,
  output logic                 mc_req_we,
  output logic [EXT_AW-1:0]    mc_req_addr,
  output logic [DATA_W-1:0]    mc_req_wdata,
  input  logic                 mc_rsp_valid,
  input  logic [DATA_W-1:0]    mc_rsp_rdata,
  // completion and status
  output logic                 done_valid,
  output logic [TID_W-1:0]     done_port,
  output logic                 reuse_hit,
  output logic [NUM_TASKS-1:0] busy_port
);
  localparam int RW = $clog2(REUSE_DEPTH);

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_MREQ, S_MWAIT, S_LWRITE, S_LREAD, S_LDATA, S_FIN} state_e;
  state_e state;

  addr_rec_t          cur;
  logic [DATA_W-1:0]  data;

  logic [DATA_W-1:0]        rb_data [REUSE_DEPTH];
  logic [EXT_AW-RW-1:0]     rb_tag  [REUSE_DEPTH];
  logic [REUSE_DEPTH-1:0]   rb_valid;
  logic [RW-1:0]            ridx;
  logic                     rb_match;
  logic                     rb_fill;

  assign ridx     = cur.ext_addr[RW-1:0];
  assign rb_match = rb_valid[ridx] && rb_tag[ridx] == cur.ext_addr[EXT_AW-1:RW];

  assign rec_ready    = (state == S_IDLE);
  assign lm_en        = (state == S_LWRITE) || (state == S_LREAD);
  assign lm_we        = (state == S_LWRITE);
  assign lm_buf       = cur.buf_id;
  assign lm_addr      = cur.loc_addr;
  assign lm_wdata     = data;
  assign mc_req_valid = (state == S_MREQ);
  assign mc_req_we    = (cur.cmd == CMD_WRITE);
  assign mc_req_addr  = cur.ext_addr;
  assign mc_req_wdata = data;
  // a word enters the buffer when read from SDRAM or written to it
  assign rb_fill      = (state == S_MWAIT && mc_rsp_valid) ||
                        (state == S_MREQ && mc_req_ready && cur.cmd == CMD_WRITE);

  always_comb begin
    busy_port = '0;
    if (state != S_IDLE && int'(cur.port) < NUM_TASKS) busy_port[cur.port] = 1'b1;
  end

  always_ff @(posedge clk)
    if (rb_fill) begin
      rb_data[ridx] <= (state == S_MWAIT) ? mc_rsp_rdata : data;
      rb_tag[ridx]  <= cur.ext_addr[EXT_AW-1:RW];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur        <= '0;
      data       <= '0;
      rb_valid   <= '0;
      done_valid <= 1'b0;
      done_port  <= '0;
      reuse_hit  <= 1'b0;
    end else begin
      done_valid <= 1'b0;
      reuse_hit  <= 1'b0;
      if (rb_fill) rb_valid[ridx] <= 1'b1;
      unique case (state)
        S_IDLE: if (rec_valid) begin
          cur   <= rec;
          state <= (rec.cmd == CMD_READ) ? S_LOOK : S_LREAD;
        end
        S_LOOK: if (rb_match) begin
          data      <= rb_data[ridx];
          reuse_hit <= 1'b1;
          state     <= S_LWRITE;
        end else begin
          state <= S_MREQ;
        end
        S_MREQ: if (mc_req_ready) state <= (cur.cmd == CMD_READ) ? S_MWAIT : S_FIN;
        S_MWAIT: if (mc_rsp_valid) begin
          data  <= mc_rsp_rdata;
          state <= S_LWRITE;
        end
        S_LWRITE: state <= S_FIN;
        S_LREAD:  state <= S_LDATA;
        S_LDATA: begin
          data  <= lm_rdata;
          state <= S_MREQ;
        end
        S_FIN: begin
          done_valid <= cur.last;
          done_port  <= cur.port;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
