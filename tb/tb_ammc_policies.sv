// tb_ammc_policies: the nine kernels of the evaluation run together once
// under each priority table: symmetric (all 1), asymmetric Group I, Group II,
// Group III, and architecture-based (accelerator kernels 1, processor kernels
// 2). The controller is reset between policies. For every policy the
// testbench checks all data the cores receive and write, that every dispatch
// obeys the policy (FIFO in symmetric mode; no request placed earlier with a
// strictly better priority left waiting in asymmetric mode), and that the
// SDRAM model saw no protocol error; it prints the cycles each policy took
// and the summed Ts/Tm/Tt/Tc. The kernel patterns are those of tb_ammc_top.
module tb_ammc_policies;
  import ammc_pkg::*;
  localparam int NT = 9, ND = 8, LMD = 1024;
  localparam int ROUNDS = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0;
  logic prog_desc_wr = 0; logic [TID_W-1:0] prog_desc_task = 0; logic [2:0] prog_desc_idx = 0;
  desc_t prog_desc = '0;
  logic prog_prio_wr = 0; logic [TID_W-1:0] prog_prio_port = 0, prog_prio_task = 0;
  logic [PRIO_W-1:0] prog_prio_val = 0;
  logic symmetric = 1;
  logic [NT-1:0] core_req = '0, core_busy = '0, core_done;
  logic [NT-1:0] core_lm_en = '0, core_lm_we = '0;
  logic [9:0] core_lm_addr [NT];
  logic [DATA_W-1:0] core_lm_wdata [NT], core_lm_rdata [NT];
  logic sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0] sd_ba; logic [12:0] sd_a; logic [DATA_W-1:0] sd_dq_out, sd_dq_in;
  logic timers_clear = 0;
  logic [31:0] ts [NT], tm [NT], tt [NT], tc [NT];
  logic ev_dispatch, ev_abuf_hit, ev_reuse_hit, ev_row_hit, ev_row_miss, ev_refresh;

  ammc_top dut (.*);
  sdram_model u_mem (
    .clk, .cs_n(sd_cs_n | !rst_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .a(sd_a), .dq_in(sd_dq_out), .dq_oe(sd_dq_oe), .dq_out(sd_dq_in));

  // ---------------------------------------------------------------- patterns
  desc_t pat [NT][ND];
  int    plen [NT];
  typedef struct { bit wr; int unsigned ext; int loc; } acc_t;
  acc_t  acc [NT][$];

  function automatic desc_t mk(input cmd_e c, input int tid, input int ext, input int size,
                               input int stride, input int off);
    desc_t d;
    d.cmd = c; d.task_id = TID_W'(tid); d.ext_addr = EXT_AW'(ext); d.prio = 1;
    d.size = SIZE_W'(size); d.stride = STRIDE_W'(stride); d.offset = OFF_W'(off);
    return d;
  endfunction

  function automatic void build_patterns();
    int in_base, out_base;
    for (int p = 0; p < NT; p++) begin
      in_base  = 'h10000 * (p + 1);
      out_base = 'h800000 + 'h1000 * p;
      plen[p] = 0;
      case (p)
        0: begin pat[p][0] = mk(CMD_READ, p, in_base, 24, 1, 1);        // FIR: window
                 pat[p][1] = mk(CMD_WRITE, p, out_base, 8, 1, 0); plen[p] = 2; end
        1: begin pat[p][0] = mk(CMD_READ, p, in_base, 16, 2, 1);        // FFT: stride 2
                 pat[p][1] = mk(CMD_WRITE, p, out_base, 16, 1, 0); plen[p] = 2; end
        2: begin pat[p][0] = mk(CMD_READ, p, in_base, 16, 64, 1);       // Mat_Mul: column
                 pat[p][1] = mk(CMD_WRITE, p, out_base, 4, 1, 0); plen[p] = 2; end
        3: begin pat[p][0] = mk(CMD_READ, p, in_base, 20, 1, 1);        // Laplacian rows
                 pat[p][1] = mk(CMD_READ, p, in_base + 1, 20, 1, 1);    // overlapping
                 pat[p][2] = mk(CMD_WRITE, p, out_base, 10, 1, 0); plen[p] = 3; end
        4: begin pat[p][0] = mk(CMD_READ, p, in_base, 12, 1024, 1);     // 3D stencil: planes
                 pat[p][1] = mk(CMD_WRITE, p, out_base, 6, 1, 0); plen[p] = 2; end
        5: begin pat[p][0] = mk(CMD_READ, p, in_base + 100, 5, 3, 2);   // CRG: linked rows
                 pat[p][2] = mk(CMD_READ, p, in_base + 7, 3, 11, 3);
                 pat[p][5] = mk(CMD_READ, p, in_base + 300, 4, -5, 1);
                 pat[p][6] = mk(CMD_WRITE, p, out_base, 6, 1, 0); plen[p] = 4; end
        6: begin pat[p][0] = mk(CMD_READ, p, in_base + 50, 7, -1, 1);   // Huffman: table walk
                 pat[p][1] = mk(CMD_READ, p, in_base + 50, 1, 0, 1);
                 pat[p][2] = mk(CMD_READ, p, in_base + 9, 6, 13, 1);
                 pat[p][3] = mk(CMD_WRITE, p, out_base, 5, 2, 0); plen[p] = 4; end
        7: begin pat[p][0] = mk(CMD_READ, p, in_base + 1000, 9, -37, 7); // In_Rem: 0 -> 7 -> 6
                 pat[p][7] = mk(CMD_READ, p, in_base + 5, 4, 100, 7);
                 pat[p][6] = mk(CMD_WRITE, p, out_base, 7, 1, 0); plen[p] = 3; end
        default: begin pat[p][0] = mk(CMD_READ, p, in_base, 10, 3, 1);   // N-Body
                 pat[p][1] = mk(CMD_READ, p, in_base + 2000, 10, 3, 1);
                 pat[p][2] = mk(CMD_READ, p, in_base + 4000, 10, 3, 1);
                 pat[p][3] = mk(CMD_WRITE, p, out_base, 8, 1, 0); plen[p] = 4; end
      endcase
      // the accesses a request makes, walked here independently
      acc[p] = {};
      begin
        int idx = 0, loc = 0;
        for (int h = 0; h < ND; h++) begin
          desc_t d = pat[p][idx];
          int n = (d.size == 0) ? 1 : int'(d.size);
          for (int e = 0; e < n; e++) begin
            acc_t a;
            a.wr = (d.cmd == CMD_WRITE);
            a.ext = int'(d.ext_addr) + e * int'(signed'(d.stride));
            a.loc = loc++;
            acc[p].push_back(a);
          end
          if (d.offset == 0) break;
          idx = (idx + int'(d.offset)) % ND;
        end
      end
    end
  endfunction

  // --------------------------------------------------------------- counters
  int group1 [NT] = '{1, 4, 5, 3, 2, 6, 7, 8, 9};   // Table I, Group I
  int tables [5][NT] = '{'{1, 1, 1, 1, 1, 1, 1, 1, 1},   // symmetric
                         '{1, 4, 5, 3, 2, 6, 7, 8, 9},   // Group I
                         '{2, 3, 4, 5, 1, 8, 6, 9, 7},   // Group II
                         '{9, 6, 5, 4, 8, 4, 3, 2, 1},   // Group III
                         '{1, 1, 1, 1, 1, 2, 2, 2, 2}};  // architecture based
  string tnames [5] = '{"symmetric", "Group I", "Group II", "Group III", "architecture"};
  int cur_tab [NT];
  int n_sym = 0, n_asym = 0, n_switch = 0, n_overtake = 0, n_abuf = 0, n_reuse = 0;
  int n_rhit = 0, n_rmiss = 0, n_ref = 0, n_chain = 0, n_reqbusy = 0;
  int busy_cyc [NT];
  int rounds_done [NT];
  longint arr_time [NT];
  bit     arr_pend [NT];
  int total_done = 0;
  int n_order_err = 0;
  longint switch_time = -1000;

  // sampled shortly after the falling edge, when the inputs of the next
  // rising edge are settled
  always @(negedge clk) if (rst_n) begin
    #2;
    if (ev_dispatch) begin
      automatic int p = int'(dut.disp.port);
      if (symmetric) n_sym++; else n_asym++;
      for (int q = 0; q < NT; q++)
        if (q != p && arr_pend[q] && arr_time[q] < arr_time[p]) begin n_overtake += !symmetric; break; end
      // order rules, for requests placed well after the last mode change
      for (int q = 0; q < NT; q++)
        if (q != p && arr_pend[q] && arr_time[q] > switch_time + 110 && arr_time[q] + 110 < $time) begin
          if (symmetric && arr_time[q] + 110 < arr_time[p]) begin
            n_order_err++;
            if (n_order_err < 4) $display("order: t=%0d p=%0d arr %0d q=%0d arr %0d", $time, p, arr_time[p], q, arr_time[q]);
          end
          if (!symmetric && cur_tab[q] < cur_tab[p]) n_order_err++;
        end
      arr_pend[p] = 0;
    end
    for (int q = 0; q < NT; q++) begin
      if (core_req[q] && !dut.u_sched.outstanding[q]) begin arr_pend[q] = 1; arr_time[q] = $time; end
      if (core_busy[q]) busy_cyc[q]++;
      if (core_req[q] && core_busy[q]) n_reqbusy++;
    end
    if (ev_abuf_hit) n_abuf++;
    if (ev_reuse_hit) n_reuse++;
    if (ev_row_hit) n_rhit++;
    if (ev_row_miss) n_rmiss++;
    if (ev_refresh) n_ref++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [DATA_W-1:0] result_word(input int p, input int r, input int j);
    return {8'(p), 8'(r), 16'(j * 7 + 1)};
  endfunction

  // ------------------------------------------------------------- core model
  task automatic core(input int p, input int rounds, input bit req_while_busy);
    for (int r = 0; r < rounds; r++) begin
      int bad = 0;
      // write this round's results into the write part of the buffer
      foreach (acc[p][k]) if (acc[p][k].wr) begin
        @(negedge clk);
        core_lm_en[p] = 1; core_lm_we[p] = 1; core_lm_addr[p] = 10'(acc[p][k].loc);
        core_lm_wdata[p] = result_word(p, r, k);
      end
      @(negedge clk);
      core_lm_en[p] = 0; core_lm_we[p] = 0;
      if (req_while_busy && r > 0) begin
        // still computing on the other buffer while the request is up
        core_req[p] = 1;
        repeat ($urandom_range(3, 10)) @(negedge clk);
        core_busy[p] = 0;
      end else begin
        core_busy[p] = 0;
        core_req[p] = 1;
      end
      while (!core_done[p]) begin
        @(posedge clk);
        if (dut.u_sched.outstanding[p]) core_req[p] = 0;
        #1;
      end
      core_req[p] = 0;
      if (plen[p] > 2 && p >= 5) n_chain++;
      // check the received words
      foreach (acc[p][k]) if (!acc[p][k].wr) begin
        @(negedge clk);
        core_lm_en[p] = 1; core_lm_we[p] = 0; core_lm_addr[p] = 10'(acc[p][k].loc);
        @(negedge clk);
        core_lm_en[p] = 0;
        if (core_lm_rdata[p] !== u_mem.peek(acc[p][k].ext & 32'hFF_FFFF)) bad++;
      end
      chk(bad == 0, $sformatf("port %0d round %0d: %0d input words wrong", p, r, bad));
      rounds_done[p]++;
      total_done++;
      // compute
      core_busy[p] = 1;
      repeat ($urandom_range(5, 40)) @(negedge clk);
    end
    core_busy[p] = 0;
  endtask

  // ---------------------------------------------------------------- program

  task automatic program_all();
    for (int p = 0; p < NT; p++)
      for (int i = 0; i < ND; i++) begin
        @(negedge clk);
        prog_desc_wr = 1; prog_desc_task = TID_W'(p); prog_desc_idx = 3'(i); prog_desc = pat[p][i];
      end
    @(negedge clk); prog_desc_wr = 0;
  endtask

  task automatic program_prio(input bit table1);
    for (int p = 0; p < NT; p++) begin
      @(negedge clk);
      prog_prio_wr = 1; prog_prio_port = TID_W'(p); prog_prio_task = TID_W'(p);
      prog_prio_val = PRIO_W'(table1 ? cur_tab[p] : 1);
    end
    @(negedge clk); prog_prio_wr = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NT; p++) begin
      core_lm_addr[p] = '0; core_lm_wdata[p] = '0; busy_cyc[p] = 0; rounds_done[p] = 0;
      arr_pend[p] = 0; arr_time[p] = 0;
      for (int i = 0; i < ND; i++) pat[p][i] = '0;
    end
    build_patterns();
    for (int pol = 0; pol < 5; pol++) begin
      longint t0;
      longint sts, stm, stt, stc;
      for (int p = 0; p < NT; p++) begin cur_tab[p] = tables[pol][p]; arr_pend[p] = 0; busy_cyc[p] = 0; end
      @(negedge clk); rst_n = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      symmetric = (pol == 0);
      switch_time = $time;
      program_all();
      program_prio(1);
      repeat (30) @(negedge clk);      // SDRAM initialisation
      timers_clear = 1;
      @(negedge clk); timers_clear = 0;
      for (int p = 0; p < NT; p++) busy_cyc[p] = 0;
      total_done = 0;
      t0 = $time;
      for (int p = 0; p < NT; p++) begin
        automatic int pp = p;
        fork core(pp, ROUNDS, pp < 5); join_none
      end
      wait (total_done == NT * ROUNDS);
      repeat (30) @(negedge clk);
      sts = 0; stm = 0; stt = 0; stc = 0;
      for (int p = 0; p < NT; p++) begin
        automatic int bad = 0;
        foreach (acc[p][k]) if (acc[p][k].wr)
          if (u_mem.peek(acc[p][k].ext) !== result_word(p, ROUNDS - 1, k)) bad++;
        chk(bad == 0, $sformatf("%s: port %0d: %0d output words wrong", tnames[pol], p, bad));
        chk(tc[p] == busy_cyc[p], $sformatf("%s: port %0d Tc %0d, busy %0d", tnames[pol], p, tc[p], busy_cyc[p]));
        sts += ts[p]; stm += tm[p]; stt += tt[p]; stc += tc[p];
      end
      chk(n_order_err == 0, $sformatf("%s: %0d dispatches out of order", tnames[pol], n_order_err));
      n_order_err = 0;
      $display("policy %-12s: %0d cycles, sum Ts %0d Tm %0d Tt %0d Tc %0d", tnames[pol], ($time - t0) / 10, sts, stm, stt, stc);
    end
    chk(u_mem.errors == 0, $sformatf("%0d SDRAM protocol errors", u_mem.errors));
    chk(n_sym > 0 && n_asym > 0, "both modes dispatched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
