// sdram_controller: the Pattern Aware SDRAM Controller of the AMMC.
//
// Accepts single-word read and write requests on a physical word address and
// runs them on a single-data-rate SDRAM command bus. The address is mapped as
// {row, bank, column} with the column in the low bits, so the consecutive and
// short-stride accesses of a pattern fall in one row. Rows are left open after
// an access (open-row policy): an access to the open row of its bank goes
// straight to READ/WRITE (row_hit), another row needs PRECHARGE and ACTIVATE
// (row_miss). A refresh timer forces PRECHARGE-all and AUTO REFRESH every
// T_REFI cycles. After reset the controller runs PRECHARGE-all, two AUTO
// REFRESH and LOAD MODE (CAS latency T_CL, burst length 1).
//
// Command encoding {cs_n, ras_n, cas_n, we_n}: NOP 0111, ACTIVATE 0011,
// READ 0101, WRITE 0100, PRECHARGE 0010 (a[10]=1: all banks), AUTO REFRESH
// 0001, LOAD MODE 0000. The device stays selected (cs_n is held low; idle
// cycles are NOP). Command, address and write data are registered. Read
// data is sampled T_CL cycles after the READ command has been presented.
//
// The role (address mapping, SDRAM timing) follows the AMMC description; the
// command set, the address map, the open-row policy and all timing values are
// this design's choices. Requests: valid/ready; reads answer with a rsp_valid
// pulse. Timing: row hit read = T_CL + 3 cycles from acceptance.
module sdram_controller
  import ammc_pkg::*;
#(
  parameter int ROW_W  = 13,
  parameter int COL_W  = 9,
  parameter int BANK_W = 2,
  parameter int T_RCD  = 3,
  parameter int T_RP   = 3,
  parameter int T_CL   = 3,
  parameter int T_WR   = 3,
  parameter int T_RFC  = 10,
  parameter int T_REFI = 780
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_we,
  input  logic [EXT_AW-1:0]     req_addr,
  input  logic [DATA_W-1:0]     req_wdata,
  output logic                  rsp_valid,
  output logic [DATA_W-1:0]     rsp_rdata,
  // SDRAM bus
  output logic                  sd_cs_n,
  output logic                  sd_ras_n,
  output logic                  sd_cas_n,
  output logic                  sd_we_n,
  output logic [BANK_W-1:0]     sd_ba,
  output logic [ROW_W-1:0]      sd_a,
  output logic [DATA_W-1:0]     sd_dq_out,
  output logic                  sd_dq_oe,
  input  logic [DATA_W-1:0]     sd_dq_in,
  // status
  output logic                  row_hit,
  output logic                  row_miss,
  output logic                  refresh
);
  localparam int NB = 1 << BANK_W;
  localparam int TW = 16;

  typedef enum logic [3:0] {
    S_INIT_PRE, S_INIT_REF1, S_INIT_REF2, S_INIT_MRS, S_WAIT,
    S_IDLE, S_PRE, S_ACT, S_RW, S_RDWAIT, S_REF_PRE, S_REF
  } state_e;
  typedef enum logic [3:0] {
    C_MRS = 4'b0000, C_REF = 4'b0001, C_PRE = 4'b0010, C_ACT = 4'b0011,
    C_WR  = 4'b0100, C_RD  = 4'b0101, C_NOP = 4'b0111
  } cmd_e4;

  state_e              state, after_wait;
  logic [TW-1:0]       tmr;
  logic [TW-1:0]       ref_cnt;
  logic                ref_due;
  logic [NB-1:0]       open_v;
  logic [ROW_W-1:0]    open_row [NB];
  logic                cur_we;
  logic [ROW_W-1:0]    cur_row;
  logic [BANK_W-1:0]   cur_bank;
  logic [COL_W-1:0]    cur_col;
  logic [DATA_W-1:0]   cur_wdata;

  logic [ROW_W-1:0]    rq_row;
  logic [BANK_W-1:0]   rq_bank;
  logic [COL_W-1:0]    rq_col;
  assign {rq_row, rq_bank, rq_col} = (ROW_W+BANK_W+COL_W)'(req_addr);

  assign req_ready = (state == S_IDLE) && !ref_due;

  task automatic issue(input cmd_e4 c, input logic [BANK_W-1:0] ba, input logic [ROW_W-1:0] a);
    {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= c;
    sd_ba <= ba;
    sd_a  <= a;
  endtask

  function automatic logic [ROW_W-1:0] col_addr(input logic [COL_W-1:0] c);
    return ROW_W'(c);   // a[10] = 0: no auto precharge
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT_PRE;
      after_wait <= S_IDLE;
      tmr        <= '0;
      ref_cnt    <= '0;
      ref_due    <= 1'b0;
      open_v     <= '0;
      for (int b = 0; b < NB; b++) open_row[b] <= '0;
      cur_we     <= 1'b0;
      cur_row    <= '0;
      cur_bank   <= '0;
      cur_col    <= '0;
      cur_wdata  <= '0;
      {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= C_NOP;
      sd_ba      <= '0;
      sd_a       <= '0;
      sd_dq_out  <= '0;
      sd_dq_oe   <= 1'b0;
      rsp_valid  <= 1'b0;
      rsp_rdata  <= '0;
      row_hit    <= 1'b0;
      row_miss   <= 1'b0;
      refresh    <= 1'b0;
    end else begin
      {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= C_NOP;
      sd_dq_oe  <= 1'b0;
      rsp_valid <= 1'b0;
      row_hit   <= 1'b0;
      row_miss  <= 1'b0;
      refresh   <= 1'b0;

      if (int'(ref_cnt) >= T_REFI - 1) ref_due <= 1'b1;
      else                             ref_cnt <= ref_cnt + 1'b1;

      unique case (state)
        S_INIT_PRE: begin
          issue(C_PRE, '0, ROW_W'(1) << 10);
          tmr <= TW'(T_RP - 1); after_wait <= S_INIT_REF1; state <= S_WAIT;
        end
        S_INIT_REF1: begin
          issue(C_REF, '0, '0);
          tmr <= TW'(T_RFC - 1); after_wait <= S_INIT_REF2; state <= S_WAIT;
        end
        S_INIT_REF2: begin
          issue(C_REF, '0, '0);
          tmr <= TW'(T_RFC - 1); after_wait <= S_INIT_MRS; state <= S_WAIT;
        end
        S_INIT_MRS: begin
          issue(C_MRS, '0, ROW_W'(T_CL) << 4);   // CAS latency, burst length 1
          tmr <= TW'(1); after_wait <= S_IDLE; state <= S_WAIT;
        end
        S_WAIT: begin
          if (tmr == '0) state <= after_wait;
          else           tmr   <= tmr - 1'b1;
        end
        S_IDLE: begin
          if (ref_due) begin
            state <= S_REF_PRE;
          end else if (req_valid) begin
            cur_we    <= req_we;
            cur_row   <= rq_row;
            cur_bank  <= rq_bank;
            cur_col   <= rq_col;
            cur_wdata <= req_wdata;
            if (open_v[rq_bank] && open_row[rq_bank] == rq_row) begin
              row_hit <= 1'b1;
              state   <= S_RW;
            end else begin
              row_miss <= 1'b1;
              state    <= open_v[rq_bank] ? S_PRE : S_ACT;
            end
          end
        end
        S_PRE: begin
          issue(C_PRE, cur_bank, '0);
          open_v[cur_bank] <= 1'b0;
          tmr <= TW'(T_RP - 1); after_wait <= S_ACT; state <= S_WAIT;
        end
        S_ACT: begin
          issue(C_ACT, cur_bank, cur_row);
          open_v[cur_bank]   <= 1'b1;
          open_row[cur_bank] <= cur_row;
          tmr <= TW'(T_RCD - 1); after_wait <= S_RW; state <= S_WAIT;
        end
        S_RW: begin
          if (cur_we) begin
            issue(C_WR, cur_bank, col_addr(cur_col));
            sd_dq_out <= cur_wdata;
            sd_dq_oe  <= 1'b1;
            tmr <= TW'(T_WR - 1); after_wait <= S_IDLE; state <= S_WAIT;
          end else begin
            issue(C_RD, cur_bank, col_addr(cur_col));
            tmr <= TW'(T_CL); state <= S_RDWAIT;
          end
        end
        S_RDWAIT: begin
          if (tmr == '0) begin
            rsp_valid <= 1'b1;
            rsp_rdata <= sd_dq_in;
            state     <= S_IDLE;
          end else begin
            tmr <= tmr - 1'b1;
          end
        end
        S_REF_PRE: begin
          issue(C_PRE, '0, ROW_W'(1) << 10);
          open_v <= '0;
          tmr <= TW'(T_RP - 1); after_wait <= S_REF; state <= S_WAIT;
        end
        S_REF: begin
          issue(C_REF, '0, '0);
          refresh <= 1'b1;
          ref_due <= 1'b0;
          ref_cnt <= '0;
          tmr <= TW'(T_RFC - 1); after_wait <= S_IDLE; state <= S_WAIT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
