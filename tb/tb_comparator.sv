// tb_comparator: random pending vectors and priorities in both modes; the
// expected selection (lowest priority number, then lowest port; lowest port
// in symmetric mode) is computed by a plain loop in the testbench.
module tb_comparator;
  import ammc_pkg::*;
  localparam int NT = 9;
  int checks = 0, failures = 0;
  logic [NT-1:0] pending;
  logic [PRIO_W-1:0] prio [NT];
  logic symmetric, sel_valid;
  logic [TID_W-1:0] sel;
  logic [PRIO_W-1:0] sel_prio;

  comparator #(.NUM_TASKS(NT)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int exp_sel, best;
      pending   = NT'($urandom);
      if (k % 10 == 0) pending = '0;
      symmetric = $urandom_range(1);
      for (int i = 0; i < NT; i++) prio[i] = PRIO_W'($urandom_range(1, 9));
      #1;
      exp_sel = -1; best = 99;
      for (int i = 0; i < NT; i++)
        if (pending[i]) begin
          if (symmetric) begin if (exp_sel < 0) exp_sel = i; end
          else if (int'(prio[i]) < best) begin best = int'(prio[i]); exp_sel = i; end
        end
      checks++;
      if (sel_valid !== (exp_sel >= 0) || (exp_sel >= 0 && (int'(sel) != exp_sel || sel_prio !== prio[exp_sel]))) begin
        failures++;
        $display("FAIL pending=%b sym=%0d sel=%0d exp=%0d", pending, symmetric, sel, exp_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
