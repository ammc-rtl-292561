// tb_data_manager: drives address records into the Data Manager, with a
// testbench local memory (one cycle read latency) and a memory responder of
// random latency on the SDRAM-controller port. Checks: final contents of the
// local buffers and of external memory against a sequential reference, the
// number of external reads (a direct-mapped reuse-buffer model predicts which
// reads are served on chip), reuse_hit pulses, done pulses with the right
// port on 'last' records, and 4 cycles per record for reuse hits.
module tb_data_manager;
  import ammc_pkg::*;
  localparam int NT = 9, RD = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0;
  logic rec_valid = 0, rec_ready;
  addr_rec_t rec = '0;
  logic lm_en, lm_we; logic [TID_W-1:0] lm_buf; logic [LOC_AW-1:0] lm_addr;
  logic [DATA_W-1:0] lm_wdata, lm_rdata;
  logic mc_req_valid, mc_req_ready, mc_req_we, mc_rsp_valid = 0;
  logic [EXT_AW-1:0] mc_req_addr; logic [DATA_W-1:0] mc_req_wdata, mc_rsp_rdata = '0;
  logic done_valid; logic [TID_W-1:0] done_port; logic reuse_hit;
  logic [NT-1:0] busy_port;

  data_manager #(.NUM_TASKS(NT), .REUSE_DEPTH(RD)) dut (.*);

  // local memories
  logic [DATA_W-1:0] lmem [NT][256];
  always @(posedge clk) if (lm_en) begin
    if (lm_we) lmem[lm_buf][lm_addr[7:0]] <= lm_wdata;
    lm_rdata <= lmem[lm_buf][lm_addr[7:0]];
  end
  // external memory with random latency
  logic [DATA_W-1:0] xmem [int unsigned];
  function automatic logic [DATA_W-1:0] xrd(input int unsigned a);
    return xmem.exists(a) ? xmem[a] : (32'hE000_0000 ^ a);
  endfunction
  int n_ext_rd = 0, n_hits = 0, n_done = 0;
  logic busy_mc = 0;
  assign mc_req_ready = !busy_mc && ($urandom_range(1) == 1);
  always @(posedge clk) begin
    mc_rsp_valid <= 0;
    if (mc_req_valid && mc_req_ready) begin
      if (mc_req_we) xmem[mc_req_addr] = mc_req_wdata;
      else begin
        automatic int lat = $urandom_range(1, 6);
        automatic logic [DATA_W-1:0] d = xrd(mc_req_addr);
        n_ext_rd++;
        busy_mc <= 1;
        fork begin
          repeat (lat) @(posedge clk);
          mc_rsp_valid <= 1; mc_rsp_rdata <= d; busy_mc <= 0;
        end join_none
      end
    end
    if (reuse_hit) n_hits++;
  end

  // reference
  logic [DATA_W-1:0] r_lmem [NT][256];
  logic [DATA_W-1:0] r_xmem [int unsigned];
  logic [EXT_AW-1:0] r_tag [RD];
  bit r_valid [RD];
  int exp_ext_rd = 0, exp_hits = 0;
  int done_q [$];
  longint acc_time;
  always @(posedge clk) if (done_valid) begin
    n_done++;
    checks++;
    if (done_q.size() == 0 || int'(done_port) != done_q[0]) begin
      failures++; $display("FAIL done port %0d", done_port);
    end
    if (done_q.size() > 0) void'(done_q.pop_front());
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input cmd_e c, input int b, input int ext, input int loc, input int port, input bit last);
    int idx;
    @(negedge clk);
    rec_valid = 1;
    rec.cmd = c; rec.buf_id = TID_W'(b); rec.ext_addr = EXT_AW'(ext); rec.loc_addr = LOC_AW'(loc);
    rec.port = TID_W'(port); rec.last = last;
    @(posedge clk); while (!rec_ready) @(posedge clk);
    acc_time = $time;
    #1 rec_valid = 0;
    // reference
    idx = ext % RD;
    if (c == CMD_READ) begin
      if (r_valid[idx] && r_tag[idx] == EXT_AW'(ext)) exp_hits++;
      else begin exp_ext_rd++; r_valid[idx] = 1; r_tag[idx] = EXT_AW'(ext); end
      r_lmem[b][loc] = r_xmem.exists(ext) ? r_xmem[ext] : (32'hE000_0000 ^ ext);
    end else begin
      r_xmem[ext] = r_lmem[b][loc];
      r_valid[idx] = 1; r_tag[idx] = EXT_AW'(ext);
    end
    if (last) done_q.push_back(port);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NT; b++)
      for (int i = 0; i < 256; i++) begin
        lmem[b][i] = {8'(b), 24'(i)} ^ 32'h5A00_0000; r_lmem[b][i] = lmem[b][i];
      end
    for (int i = 0; i < RD; i++) r_valid[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // a stencil-like request: overlapping windows reuse data
    for (int w = 0; w < 8; w++)
      for (int k = 0; k < 4; k++) send(CMD_READ, 1, 'h100 + w + k, w * 4 + k, 1, (w == 7 && k == 3));
    // write-back from another buffer, then read the written words again
    for (int i = 0; i < 10; i++) send(CMD_WRITE, 2, 'h100 + i, 50 + i, 2, i == 9);
    for (int i = 0; i < 10; i++) send(CMD_READ, 3, 'h100 + i, i, 3, i == 9);
    // random traffic, conflicting indexes
    for (int i = 0; i < 400; i++)
      send($urandom_range(3) == 0 ? CMD_WRITE : CMD_READ, $urandom_range(NT-1),
           ($urandom_range(7) << 6) | $urandom_range(15), $urandom_range(255), $urandom_range(NT-1), (i % 37) == 36);
    // rate of reuse hits: prime 8 words, then read them again back to back
    for (int i = 0; i < 8; i++) send(CMD_READ, 4, 'h7100 + i, i, 4, 0);
    begin
      longint prev;
      int h0, bad;
      h0 = n_hits; bad = 0;
      send(CMD_READ, 5, 'h7100, 0, 5, 0);
      for (int i = 1; i < 8; i++) begin
        prev = acc_time;
        send(CMD_READ, 5, 'h7100 + i, i, 5, 0);
        if ((acc_time - prev) / 10 != 4) bad++;
      end
      repeat (4) @(negedge clk);
      chk(n_hits - h0 == 8, "primed words served from the reuse buffer");
      chk(bad == 0, $sformatf("%0d reuse hits did not take 4 cycles", bad));
    end
    repeat (20) @(negedge clk);
    // compare
    begin
      int bad = 0;
      for (int b = 0; b < NT; b++) for (int i = 0; i < 256; i++) if (lmem[b][i] !== r_lmem[b][i]) bad++;
      chk(bad == 0, $sformatf("local memories: %0d words differ", bad));
      bad = 0;
      foreach (r_xmem[a]) if (xrd(a) !== r_xmem[a]) bad++;
      chk(bad == 0, $sformatf("external memory: %0d words differ", bad));
    end
    chk(n_ext_rd == exp_ext_rd, $sformatf("external reads %0d, expected %0d", n_ext_rd, exp_ext_rd));
    chk(n_hits == exp_hits && n_hits > 0, $sformatf("reuse hits %0d, expected %0d", n_hits, exp_hits));
    chk(done_q.size() == 0 && n_done == 3 + 10, $sformatf("done pulses %0d", n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
