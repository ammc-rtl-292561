// tb_record_fifo: random pushes and pops against a SystemVerilog queue;
// checks order, full/empty flags and that a word written in one cycle is
// readable in the next.
module tb_record_fifo;
  import ammc_pkg::*;
  localparam int D = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  addr_rec_t in_data = '0, out_data;
  addr_rec_t model [$];

  record_fifo #(.DEPTH(D)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      bit push, pop;
      @(negedge clk);
      checks++;
      if (in_ready != (model.size() < D) || out_valid != (model.size() > 0) ||
          (model.size() > 0 && out_data !== model[0])) begin
        failures++;
        $display("FAIL cycle %0d: size %0d ready %b valid %b", k, model.size(), in_ready, out_valid);
      end
      // phases: mostly filling, mostly draining, mixed
      case ((k / 500) % 3)
        0: begin push = $urandom_range(3) != 0; pop = $urandom_range(3) == 0; end
        1: begin push = $urandom_range(3) == 0; pop = $urandom_range(3) != 0; end
        default: begin push = $urandom_range(1); pop = $urandom_range(1); end
      endcase
      in_valid = push; out_ready = pop;
      in_data = addr_rec_t'({$urandom, $urandom, $urandom});
      push = push && in_ready; pop = pop && out_valid;
      @(posedge clk); #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
