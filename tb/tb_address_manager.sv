// tb_address_manager: the Address Manager with a Descriptor Memory.
// Programs regular (one descriptor), irregular (linked, negative stride),
// cyclic-link and oversize patterns, dispatches them with random back
// pressure and compares every record with a reference walk of the
// descriptors done in the testbench. Checks Address Buffer reuse (hit on a
// repeated task, replay identical), invalidation by a descriptor write, no
// reuse for a list larger than the buffer, and the cycle counts of a walk
// (2 + N cycles from acceptance to the last record) and of a replay (N) with the consumer always ready.
module tb_address_manager;
  import ammc_pkg::*;
  localparam int NT = 9, ND = 8, AB = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0;
  logic disp_valid = 0, disp_ready;
  disp_t disp = '0;
  logic dm_rd_en; logic [TID_W-1:0] dm_rd_task; logic [2:0] dm_rd_idx; desc_t dm_rd_desc;
  logic desc_write = 0;
  logic [TID_W-1:0] wr_task = 0; logic [2:0] wr_idx = 0; desc_t wr_desc = '0;
  logic rec_valid, rec_ready = 1;
  addr_rec_t rec;
  logic [NT-1:0] busy_port;
  logic abuf_hit;
  bit random_ready = 1;
  int hits = 0;

  desc_t shadow [NT][ND];

  descriptor_memory #(.NUM_TASKS(NT), .DESC_PER_TASK(ND)) u_dm (
    .clk, .wr_en(desc_write), .wr_task, .wr_idx, .wr_desc,
    .rd_en(dm_rd_en), .rd_task(dm_rd_task), .rd_idx(dm_rd_idx), .rd_desc(dm_rd_desc));
  address_manager #(.NUM_TASKS(NT), .DESC_PER_TASK(ND), .ABUF_DEPTH(AB)) dut (.*);

  always @(posedge clk) if (abuf_hit) hits++;
  always @(negedge clk) rec_ready <= random_ready ? ($urandom_range(3) != 0) : 1'b1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic desc_t mk(input cmd_e c, input int tid, input int ext, input int size,
                               input int stride, input int off);
    desc_t d;
    d.cmd = c; d.task_id = TID_W'(tid); d.ext_addr = EXT_AW'(ext); d.prio = 1;
    d.size = SIZE_W'(size); d.stride = STRIDE_W'(stride); d.offset = OFF_W'(off);
    return d;
  endfunction

  task automatic wr(input int t, input int i, input desc_t d);
    @(negedge clk);
    desc_write = 1; wr_task = TID_W'(t); wr_idx = 3'(i); wr_desc = d; shadow[t][i] = d;
    @(negedge clk);
    desc_write = 0;
  endtask

  // reference walk
  function automatic void expect_list(input int t, input int port, ref addr_rec_t q [$]);
    int idx, loc;
    q = {};
    idx = 0; loc = 0;
    for (int h = 0; h < ND; h++) begin
      desc_t d; int n; logic [EXT_AW-1:0] a;
      d = shadow[t][idx];
      n = (d.size == 0) ? 1 : int'(d.size);
      a = d.ext_addr;
      for (int e = 0; e < n; e++) begin
        addr_rec_t r;
        r.cmd = d.cmd; r.buf_id = d.task_id; r.ext_addr = a; r.loc_addr = LOC_AW'(loc);
        r.port = TID_W'(port); r.last = 0;
        q.push_back(r);
        a = a + EXT_AW'(signed'(d.stride));
        loc++;
      end
      if (d.offset == 0) break;
      idx = (idx + int'(d.offset)) % ND;
    end
    q[q.size()-1].last = 1;
  endfunction

  // dispatch and collect; returns cycles from dispatch acceptance to last record
  task automatic run(input int t, input int port, input bit exp_hit, input string what, output int cycles);
    addr_rec_t exp [$];
    int got, h0, start;
    bit ok;
    expect_list(t, port, exp);
    h0 = hits;
    @(negedge clk);
    disp_valid = 1; disp.port = TID_W'(port); disp.task_id = TID_W'(t); disp.prio = 1;
    do @(posedge clk); while (!disp_ready);
    start = $time;
    @(negedge clk); disp_valid = 0;
    chk(busy_port == (NT'(1) << port), {what, ": busy port"});
    got = 0; ok = 1;
    while (got < exp.size()) begin
      @(posedge clk);
      if (rec_valid && rec_ready) begin
        if (rec !== exp[got]) begin
          ok = 0;
          $display("  rec %0d: ext %h loc %0d last %0d, exp ext %h loc %0d last %0d", got,
                   rec.ext_addr, rec.loc_addr, rec.last, exp[got].ext_addr, exp[got].loc_addr, exp[got].last);
        end
        got++;
      end
    end
    cycles = (int'($time) - start) / 10;
    chk(ok, {what, ": records"});
    @(negedge clk);
    chk(disp_ready && !rec_valid, {what, ": back to idle"});
    chk((hits - h0 == 1) == exp_hit, {what, exp_hit ? ": expected Address Buffer hit" : ": unexpected Address Buffer hit"});
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // task 0: regular, one descriptor
    wr(0, 0, mk(CMD_READ, 0, 'h1000, 16, 2, 0));
    // task 5: irregular: 0 -> 3 -> 4, negative stride, a write pattern, size 0
    wr(5, 0, mk(CMD_READ, 5, 'h2000, 5, 7, 3));
    wr(5, 3, mk(CMD_READ, 5, 'h3000, 4, -3, 1));
    wr(5, 4, mk(CMD_WRITE, 2, 'h4000, 0, 1, 0));
    // task 6: cyclic link, stops after ND descriptors
    wr(6, 0, mk(CMD_READ, 6, 'h5000, 2, 1, 1));
    for (int i = 1; i < ND; i++) wr(6, i, mk(i % 2 ? CMD_WRITE : CMD_READ, 6, 'h5000 + 'h100 * i, 2, 1, 1));
    // task 7: larger than the Address Buffer
    wr(7, 0, mk(CMD_READ, 7, 'h8000, 40, 1, 1));
    wr(7, 1, mk(CMD_WRITE, 7, 'h9000, 40, 1, 0));

    run(0, 0, 0, "regular", cyc);
    run(0, 0, 1, "regular repeat", cyc);
    run(5, 4, 0, "irregular", cyc);
    run(5, 4, 1, "irregular repeat", cyc);
    run(0, 1, 0, "other task evicts", cyc);
    run(6, 6, 0, "cyclic chain", cyc);
    run(6, 6, 1, "cyclic chain repeat", cyc);
    run(7, 7, 0, "oversize", cyc);
    run(7, 7, 0, "oversize no reuse", cyc);
    run(5, 2, 0, "irregular again", cyc);
    wr(5, 3, mk(CMD_READ, 5, 'h3800, 6, 5, 1));
    run(5, 2, 0, "after descriptor write", cyc);
    run(5, 2, 1, "after descriptor write repeat", cyc);

    // timing with the consumer always ready
    random_ready = 0;
    run(0, 3, 0, "timing walk", cyc);
    chk(cyc == 2 + 16, $sformatf("walk of 16 took %0d cycles, expected 18", cyc));
    run(0, 3, 1, "timing replay", cyc);
    chk(cyc == 16, $sformatf("replay of 16 took %0d cycles, expected 16", cyc));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
