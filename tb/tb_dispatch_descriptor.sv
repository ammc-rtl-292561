// tb_dispatch_descriptor: random inserts at random positions and random
// dequeues (also in the same cycle) against a SystemVerilog queue model;
// checks head, count and the priority list every cycle.
module tb_dispatch_descriptor;
  import ammc_pkg::*;
  localparam int NT = 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 0, ins_valid = 0, deq_ready = 0, head_valid;
  logic [TID_W:0] ins_pos = 0, count;
  disp_t ins_entry = '0, head;
  logic [PRIO_W-1:0] q_prio [NT];
  disp_t model [$];

  dispatch_descriptor #(.NUM_TASKS(NT)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 3000; k++) begin
      int p; bit ins, deq;
      @(negedge clk);
      // compare state
      checks++;
      if (int'(count) != model.size() || head_valid != (model.size() > 0) ||
          (model.size() > 0 && head !== model[0])) begin
        failures++;
        $display("FAIL cycle %0d count %0d exp %0d", k, count, model.size());
      end
      for (int i = 0; i < model.size(); i++)
        if (q_prio[i] !== model[i].prio) begin failures++; $display("FAIL prio list at %0d", i); end
      deq = ($urandom_range(2) == 0);
      ins = (model.size() < NT || (deq && model.size() > 0)) && ($urandom_range(1) == 1);
      p   = $urandom_range(model.size());
      ins_valid <= ins; deq_ready <= deq; ins_pos <= (TID_W+1)'(p);
      ins_entry <= disp_t'($urandom);
      @(posedge clk); #1;
      // model: the head leaves first, the position refers to the old queue
      if (deq && model.size() > 0) begin
        void'(model.pop_front());
        if (p > 0) p--;
      end
      if (ins) begin
        if (p >= model.size()) model.push_back(ins_entry);
        else model.insert(p, ins_entry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
