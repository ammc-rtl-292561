// tb_priority_descriptor: checks the reset contents (port i -> task i,
// priority 1) and random program-time writes against a shadow copy.
module tb_priority_descriptor;
  import ammc_pkg::*;
  localparam int NT = 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 0, wr_en = 0;
  logic [TID_W-1:0] wr_port = 0, wr_task = 0;
  logic [PRIO_W-1:0] wr_prio = 0;
  logic [TID_W-1:0] task_id [NT];
  logic [PRIO_W-1:0] prio [NT];
  logic [TID_W-1:0] s_task [NT];
  logic [PRIO_W-1:0] s_prio [NT];

  priority_descriptor #(.NUM_TASKS(NT)) dut (.*);

  task automatic compare(input string when);
    for (int i = 0; i < NT; i++) begin
      checks++;
      if (task_id[i] !== s_task[i] || prio[i] !== s_prio[i]) begin
        failures++;
        $display("FAIL %s port %0d: task %0d prio %0d exp %0d %0d", when, i, task_id[i], prio[i], s_task[i], s_prio[i]);
      end
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NT; i++) begin s_task[i] = TID_W'(i); s_prio[i] = 1; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    compare("reset");
    for (int k = 0; k < 100; k++) begin
      int p;
      p = $urandom_range(NT-1);
      @(negedge clk);
      wr_en = 1; wr_port = TID_W'(p); wr_task = TID_W'($urandom); wr_prio = PRIO_W'($urandom);
      s_task[p] = wr_task; s_prio[p] = wr_prio;
      @(negedge clk);
      wr_en = 0;
      compare("write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
