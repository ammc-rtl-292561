// tb_task_placer: random queue contents, counts and new priorities; the
// expected insert position (tail in symmetric mode, before the first strictly
// worse priority otherwise) is computed independently.
module tb_task_placer;
  import ammc_pkg::*;
  localparam int NT = 9;
  int checks = 0, failures = 0;
  logic [TID_W:0] count, pos;
  logic [PRIO_W-1:0] q_prio [NT];
  logic [PRIO_W-1:0] new_prio;
  logic symmetric;

  task_placer #(.NUM_TASKS(NT)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int exp_pos, c;
      c = $urandom_range(NT);
      count = (TID_W+1)'(c);
      // a sorted queue, as asymmetric mode builds it
      q_prio[0] = PRIO_W'($urandom_range(1, 4));
      for (int i = 1; i < NT; i++) q_prio[i] = q_prio[i-1] + PRIO_W'($urandom_range(1));
      new_prio  = PRIO_W'($urandom_range(1, 9));
      symmetric = $urandom_range(1);
      #1;
      exp_pos = c;
      if (!symmetric)
        for (int i = c - 1; i >= 0; i--) if (q_prio[i] > new_prio) exp_pos = i;
      checks++;
      if (int'(pos) != exp_pos) begin
        failures++;
        $display("FAIL count=%0d new=%0d sym=%0d pos=%0d exp=%0d", c, new_prio, symmetric, pos, exp_pos);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
