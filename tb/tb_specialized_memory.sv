// tb_specialized_memory: random traffic on both ports against a shadow
// array; checks one-cycle read latency on each port, that a word written on
// one port is read on the other, and that port B wins a same-address write.
module tb_specialized_memory;
  import ammc_pkg::*;
  localparam int D = 1024;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [9:0] a_addr = 0, b_addr = 0;
  logic [DATA_W-1:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [DATA_W-1:0] shadow [D];

  specialized_memory #(.DEPTH(D)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill through port A
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 10'(i); a_wdata = $urandom; shadow[i] = a_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    for (int k = 0; k < 3000; k++) begin
      logic [DATA_W-1:0] ea, eb;
      bit ra, rb;
      @(negedge clk);
      a_en = $urandom_range(1); a_we = $urandom_range(1); a_addr = 10'($urandom_range(31));
      b_en = $urandom_range(1); b_we = $urandom_range(1); b_addr = 10'($urandom_range(31));
      a_wdata = $urandom; b_wdata = $urandom;
      ea = shadow[a_addr]; eb = shadow[b_addr];
      ra = a_en; rb = b_en;
      if (a_en && a_we) shadow[a_addr] = a_wdata;
      if (b_en && b_we) shadow[b_addr] = b_wdata;
      @(posedge clk); #1;
      if (ra) begin checks++; if (a_rdata !== ea) begin failures++; $display("FAIL port A read"); end end
      if (rb) begin checks++; if (b_rdata !== eb) begin failures++; $display("FAIL port B read"); end end
    end
    // final contents through port B
    a_en = 0; a_we = 0; b_we = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); b_en = 1; b_addr = 10'(i);
      @(posedge clk); #1;
      checks++; if (b_rdata !== shadow[i]) begin failures++; $display("FAIL final word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
