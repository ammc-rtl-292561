// tb_kernel_timers: random phase inputs for 9 ports; the four counters of
// every port are compared with counts kept by the testbench, across a clear.
module tb_kernel_timers;
  localparam int NT = 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 0, clear = 0;
  logic [NT-1:0] sched = 0, mman = 0, xfer = 0, comp = 0;
  logic [31:0] ts [NT], tm [NT], tt [NT], tc [NT];
  int e [4][NT];

  kernel_timers #(.NUM_TASKS(NT)) dut (.*);

  task automatic compare(input string when);
    for (int i = 0; i < NT; i++) begin
      checks++;
      if (ts[i] != e[0][i] || tm[i] != e[1][i] || tt[i] != e[2][i] || tc[i] != e[3][i]) begin
        failures++;
        $display("FAIL %s port %0d: %0d %0d %0d %0d exp %0d %0d %0d %0d", when, i, ts[i], tm[i], tt[i], tc[i],
                 e[0][i], e[1][i], e[2][i], e[3][i]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++) for (int i = 0; i < NT; i++) e[p][i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      for (int k = 0; k < 500; k++) begin
        @(negedge clk);
        sched = NT'($urandom); mman = NT'($urandom); xfer = NT'($urandom); comp = NT'($urandom);
        for (int i = 0; i < NT; i++) begin
          e[0][i] += sched[i]; e[1][i] += mman[i]; e[2][i] += xfer[i]; e[3][i] += comp[i];
        end
      end
      @(negedge clk);
      sched = 0; mman = 0; xfer = 0; comp = 0;
      @(negedge clk);
      compare("run");
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int p = 0; p < 4; p++) for (int i = 0; i < NT; i++) e[p][i] = 0;
      compare("clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
