// tb_scheduler: end-to-end checks of the AMMC scheduler.
//  1. symmetric mode: requests at distinct cycles leave in arrival order
//  2. asymmetric mode, Table I "Group I" priorities: leave in priority order,
//     arrival order among equals (stable sort computed in the testbench)
//  3. all ports at once: order by (priority, port)
//  4. run-time mode switch: hand-worked order 0,7,8,6
//  5. "request & busy": a port that keeps core_req high is accepted again
//     right after core_done
//  6. latency: an idle scheduler presents a request 2 cycles after it is sampled
// Dispatched Task IDs are checked against the programmed port -> task map.
module tb_scheduler;
  import ammc_pkg::*;
  localparam int NT = 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, symmetric = 1;
  logic prio_wr_en = 0;
  logic [TID_W-1:0] prio_wr_port = 0, prio_wr_task = 0;
  logic [PRIO_W-1:0] prio_wr_prio = 0;
  logic [NT-1:0] core_req = '0, core_done = '0, waiting, outstanding;
  logic disp_valid, disp_ready = 0;
  disp_t disp;

  // Table I, Group I: FIR FFT Mat_Mul Lapl 3D-Sten CRG Huffman In_Rem N-Body
  int group1 [NT] = '{1, 4, 5, 3, 2, 6, 7, 8, 9};
  int task_of [NT];

  scheduler #(.NUM_TASKS(NT)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic program_prio(input int pr [NT]);
    for (int i = 0; i < NT; i++) begin
      @(negedge clk);
      prio_wr_en = 1; prio_wr_port = TID_W'(i); prio_wr_task = TID_W'(task_of[i]);
      prio_wr_prio = PRIO_W'(pr[i]);
    end
    @(negedge clk); prio_wr_en = 0;
  endtask

  // raise one request per cycle in the given order, ready held low
  task automatic raise(input int ports [$]);
    foreach (ports[k]) begin
      @(negedge clk);
      core_req = '0; core_req[ports[k]] = 1'b1;
    end
    @(negedge clk); core_req = '0;
    repeat (3) @(negedge clk);
  endtask

  // drain the queue, completing each request, and compare the order
  task automatic drain_expect(input int exp [$], input string what);
    int got [$];
    @(negedge clk);
    disp_ready = 1;
    while (got.size() < exp.size()) begin
      @(posedge clk);
      if (disp_valid) begin
        got.push_back(int'(disp.port));
        chk(int'(disp.task_id) == task_of[disp.port], {what, ": task id"});
      end
    end
    @(negedge clk); disp_ready = 0;
    // complete everything
    core_done = outstanding;
    @(negedge clk); core_done = '0;
    chk(got == exp, what);
    if (got != exp) begin
      $write("  got:"); foreach (got[i]) $write(" %0d", got[i]);
      $write("  exp:"); foreach (exp[i]) $write(" %0d", exp[i]); $display("");
    end
  endtask

  function automatic void stable_sort(ref int ports [$], input int pr [NT]);
    for (int i = 1; i < ports.size(); i++)
      for (int j = i; j > 0 && pr[ports[j-1]] > pr[ports[j]]; j--) begin
        int t; t = ports[j]; ports[j] = ports[j-1]; ports[j-1] = t;
      end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [$], exp [$];
    int all1 [NT];
    for (int i = 0; i < NT; i++) begin task_of[i] = (i + 3) % NT; all1[i] = 1; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    program_prio(group1);

    // 1. symmetric FIFO, random arrival orders
    symmetric = 1;
    for (int r = 0; r < 5; r++) begin
      order = {};
      for (int i = 0; i < NT; i++) order.push_back(i);
      order.shuffle();
      raise(order);
      drain_expect(order, "symmetric FIFO");
    end

    // 2. asymmetric, random arrival orders, some priorities equal
    symmetric = 0;
    for (int r = 0; r < 5; r++) begin
      int pr [NT];
      for (int i = 0; i < NT; i++) pr[i] = (r == 0) ? group1[i] : $urandom_range(1, 4);
      program_prio(pr);
      order = {};
      for (int i = 0; i < NT; i++) order.push_back(i);
      order.shuffle();
      raise(order);
      exp = order;
      stable_sort(exp, pr);
      drain_expect(exp, "asymmetric priority order");
    end
    program_prio(group1);

    // 3. all at once
    @(negedge clk); core_req = '1;
    @(negedge clk); core_req = '0;
    repeat (NT + 2) @(negedge clk);
    exp = {0, 4, 3, 1, 2, 5, 6, 7, 8};
    drain_expect(exp, "simultaneous requests");

    // 4. mode switch at run time
    symmetric = 1;
    raise('{8, 6});
    symmetric = 0;
    raise('{0, 7});
    drain_expect('{0, 7, 8, 6}, "run-time mode switch");

    // 5. request & busy: port 2 keeps requesting
    @(negedge clk); core_req = '0; core_req[2] = 1'b1;
    repeat (3) @(negedge clk);
    chk(outstanding[2] && waiting[2], "request accepted");
    disp_ready = 1;
    @(negedge clk); disp_ready = 0;
    chk(!waiting[2] && outstanding[2], "dispatched, not done");
    core_done[2] = 1'b1;
    @(negedge clk); core_done = '0;
    @(negedge clk);
    chk(outstanding[2] && waiting[2], "re-accepted after done while request held");
    core_req = '0;
    repeat (2) @(negedge clk);
    chk(disp_valid && disp.port == 2, "re-request reaches the queue head");
    disp_ready = 1;
    @(negedge clk); disp_ready = 0;
    core_done[2] = 1'b1;
    @(negedge clk); core_done = '0;
    chk(outstanding == '0 && waiting == '0, "idle again");

    // 6. latency through an idle scheduler
    begin
      int lat;
      @(negedge clk); core_req[5] = 1'b1; disp_ready = 1;
      lat = 0;
      do begin @(negedge clk); core_req = '0; lat++; end while (!disp_valid && lat < 20);
      disp_ready = 0;
      chk(lat == 2, $sformatf("dispatch latency %0d cycles, expected 2", lat));
      @(negedge clk);
      core_done[5] = 1'b1;
      @(negedge clk); core_done = '0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
