// sdram_model: behavioural model of a single-data-rate SDRAM (testbench only).
//
// Decodes the command bus {cs_n, ras_n, cas_n, we_n} of sdram_controller,
// keeps the open row of every bank, stores written words in a sparse array
// and returns read data T_CL cycles after the READ command was sampled.
// A word never written reads as init_word(addr) = 32'hD000_0000 | addr, so
// testbenches can predict it. Protocol errors are counted in 'errors':
// READ/WRITE to a closed bank, ACTIVATE to an open bank, READ/WRITE earlier
// than T_RCD after ACTIVATE, ACTIVATE earlier than T_RP after PRECHARGE, and
// any command but PRECHARGE/REFRESH/LOAD MODE before the mode is loaded.
module sdram_model #(
  parameter int ROW_W  = 13,
  parameter int COL_W  = 9,
  parameter int BANK_W = 2,
  parameter int T_CL   = 3,
  parameter int T_RCD  = 3,
  parameter int T_RP   = 3
) (
  input  logic              clk,
  input  logic              cs_n,
  input  logic              ras_n,
  input  logic              cas_n,
  input  logic              we_n,
  input  logic [BANK_W-1:0] ba,
  input  logic [ROW_W-1:0]  a,
  input  logic [31:0]       dq_in,    // from the controller
  input  logic              dq_oe,
  output logic [31:0]       dq_out    // to the controller
);
  localparam int NB = 1 << BANK_W;

  logic [31:0]      mem [int unsigned];
  logic [NB-1:0]    active = '0;
  logic [ROW_W-1:0] row [NB];
  longint           t_act [NB];
  longint           t_pre [NB];
  longint           cyc = 0;
  logic             mode_set = 1'b0;
  logic [31:0]      pipe [T_CL];
  int               errors = 0;
  int               n_act = 0, n_pre = 0, n_rd = 0, n_wr = 0, n_ref = 0;

  function automatic logic [31:0] init_word(input int unsigned addr);
    return 32'hD000_0000 | addr;
  endfunction

  function automatic logic [31:0] peek(input int unsigned addr);
    if (mem.exists(addr)) return mem[addr];
    return init_word(addr);
  endfunction

  function automatic int unsigned waddr(input logic [BANK_W-1:0] b, input logic [ROW_W-1:0] r,
                                        input logic [ROW_W-1:0] col);
    return int'({r, b, col[COL_W-1:0]});
  endfunction

  initial begin
    for (int b = 0; b < NB; b++) begin
      t_act[b] = -100; t_pre[b] = -100; row[b] = '0;
    end
    for (int i = 0; i < T_CL; i++) pipe[i] = '0;
  end

  assign dq_out = pipe[T_CL-1];

  always @(posedge clk) begin
    logic [31:0] rd;
    rd = '0;
    cyc <= cyc + 1;
    if (!cs_n) begin
      unique case ({ras_n, cas_n, we_n})
        3'b011: begin // ACTIVATE
          if (!mode_set || active[ba] || cyc - t_pre[ba] < longint'(T_RP)) begin
            errors++; $display("sdram_model: bad ACTIVATE bank %0d at cycle %0d", ba, cyc);
          end
          active[ba] <= 1'b1; row[ba] <= a; t_act[ba] <= cyc; n_act++;
        end
        3'b101, 3'b100: begin // READ / WRITE
          if (!active[ba] || cyc - t_act[ba] < longint'(T_RCD)) begin
            errors++; $display("sdram_model: bad READ/WRITE bank %0d at cycle %0d", ba, cyc);
          end
          if (we_n) begin
            rd = peek(waddr(ba, row[ba], a)); n_rd++;
          end else begin
            if (!dq_oe) errors++;
            mem[waddr(ba, row[ba], a)] = dq_in; n_wr++;
          end
        end
        3'b010: begin // PRECHARGE
          if (a[10]) begin
            active <= '0;
            for (int b = 0; b < NB; b++) t_pre[b] <= cyc;
          end else begin
            active[ba] <= 1'b0; t_pre[ba] <= cyc;
          end
          n_pre++;
        end
        3'b001: begin // AUTO REFRESH
          if (active != '0) begin
            errors++; $display("sdram_model: REFRESH with open banks at cycle %0d", cyc);
          end
          n_ref++;
        end
        3'b000: begin // LOAD MODE
          if (a[6:4] != 3'(T_CL)) errors++;
          mode_set <= 1'b1;
        end
        default: ;
      endcase
    end
    pipe[0] <= rd;
    for (int i = 1; i < T_CL; i++) pipe[i] <= pipe[i-1];
  end
endmodule
