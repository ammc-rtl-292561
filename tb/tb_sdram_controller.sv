// tb_sdram_controller: the Pattern Aware SDRAM Controller against the
// behavioural SDRAM model. Phase 1 (before the first refresh) is a
// hand-built sequence whose row hits and misses are predicted per bank, and
// checks the row-hit read latency of T_CL + 3 cycles from acceptance to the
// response. Phase 2 is random traffic long enough for several refreshes: all
// read data is compared with a reference memory, the model must report no
// protocol error, and the number of refreshes must match the refresh period.
module tb_sdram_controller;
  import ammc_pkg::*;
  localparam int T_CL = 3, T_REFI = 780;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0, rsp_valid;
  logic [EXT_AW-1:0] req_addr = 0;
  logic [DATA_W-1:0] req_wdata = 0, rsp_rdata;
  logic sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0] sd_ba; logic [12:0] sd_a;
  logic [DATA_W-1:0] sd_dq_out, sd_dq_in;
  logic row_hit, row_miss, refresh;

  sdram_controller #(.T_CL(T_CL), .T_REFI(T_REFI)) dut (.*);
  sdram_model #(.T_CL(T_CL)) u_mem (
    .clk, .cs_n(sd_cs_n | !rst_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .a(sd_a), .dq_in(sd_dq_out), .dq_oe(sd_dq_oe), .dq_out(sd_dq_in));

  logic [DATA_W-1:0] ref_mem [int unsigned];
  int n_hit = 0, n_miss = 0, n_ref = 0;
  longint t_acc, lat;
  always @(posedge clk) begin
    if (rst_n && row_hit) n_hit++;
    if (rst_n && row_miss) n_miss++;
    if (rst_n && refresh) begin n_ref++; if (n_ref == 1) $display("first refresh at cycle %0d", $time / 10); end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input bit we, input int unsigned addr, input logic [DATA_W-1:0] wd);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = EXT_AW'(addr); req_wdata = wd;
    @(posedge clk); while (!req_ready) @(posedge clk);
    t_acc = $time;
    #1 req_valid = 0;
    if (we) ref_mem[addr] = wd;
    else begin
      logic [DATA_W-1:0] exp;
      exp = ref_mem.exists(addr) ? ref_mem[addr] : u_mem.init_word(addr);
      @(posedge clk); while (!rsp_valid) @(posedge clk);
      lat = ($time - t_acc) / 10;
      chk(rsp_rdata === exp, $sformatf("read %h: %h exp %h", addr, rsp_rdata, exp));
    end
  endtask

  // address = {row, bank, col}
  function automatic int unsigned A(input int row, input int bank, input int col);
    return (row << 11) | (bank << 9) | col;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    int h0, m0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // phase 1
    access(1, A(5, 0, 1), 32'h1111_0001);   // miss (bank closed)
    access(1, A(5, 0, 2), 32'h1111_0002);   // hit
    access(0, A(5, 0, 1), 0);               // hit
    chk(lat == T_CL + 3, $sformatf("row-hit read latency %0d, expected %0d", lat, T_CL + 3));
    access(0, A(9, 0, 1), 0);               // miss (other row)
    access(0, A(9, 1, 7), 0);               // miss (bank 1 closed)
    access(0, A(5, 0, 2), 0);               // miss
    access(0, A(9, 1, 8), 0);               // hit
    chk(n_hit == 3 && n_miss == 4, $sformatf("phase 1: %0d hits %0d misses, expected 3 and 4", n_hit, n_miss));
    chk(n_ref == 0, "no refresh in phase 1");
    // phase 2
    t0 = $time;
    h0 = n_hit; m0 = n_miss;
    for (int k = 0; k < 3000; k++) begin
      int unsigned a;
      a = A($urandom_range(3), $urandom_range(3), $urandom_range(15));
      access($urandom_range(1), a, $urandom);
    end
    repeat (5) @(negedge clk);
    begin
      longint cyc;
      cyc = ($time - t0) / 10;
      chk(n_ref >= cyc / (T_REFI + 40) - 1 && n_ref <= cyc / T_REFI + 2,
          $sformatf("%0d refreshes in %0d cycles", n_ref, cyc));
    end
    chk(n_hit - h0 > 0 && n_miss - m0 > 0 && (n_hit - h0) + (n_miss - m0) == 3000, "hit/miss accounting");
    chk(u_mem.errors == 0, $sformatf("%0d SDRAM protocol errors", u_mem.errors));
    $display("row hits %0d, misses %0d, refreshes %0d", n_hit, n_miss, n_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
