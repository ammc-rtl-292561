// tb_descriptor_memory: writes random descriptors into every block and slot,
// reads them back in random order and checks the one-cycle read latency and
// that blocks of different tasks do not alias.
module tb_descriptor_memory;
  import ammc_pkg::*;
  localparam int NT = 9, ND = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0, rd_en = 0;
  logic [TID_W-1:0] wr_task = 0, rd_task = 0;
  logic [2:0] wr_idx = 0, rd_idx = 0;
  desc_t wr_desc = '0, rd_desc;
  desc_t shadow [NT][ND];

  descriptor_memory #(.NUM_TASKS(NT), .DESC_PER_TASK(ND)) dut (.*);

  function automatic desc_t rand_desc();
    desc_t d;
    d = desc_t'({$urandom, $urandom, $urandom});
    return d;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int t = 0; t < NT; t++)
      for (int i = 0; i < ND; i++) begin
        shadow[t][i] = rand_desc();
        wr_en <= 1; wr_task <= TID_W'(t); wr_idx <= 3'(i); wr_desc <= shadow[t][i];
        @(posedge clk);
      end
    wr_en <= 0;
    for (int k = 0; k < 200; k++) begin
      int t, i;
      t = $urandom_range(NT-1); i = $urandom_range(ND-1);
      rd_en <= 1; rd_task <= TID_W'(t); rd_idx <= 3'(i);
      @(posedge clk);
      rd_en <= 0;
      #1;
      checks++;
      if (rd_desc !== shadow[t][i]) begin
        failures++;
        $display("FAIL read task %0d idx %0d: %h exp %h", t, i, rd_desc, shadow[t][i]);
      end
    end
    // overwrite one slot and read it back
    shadow[3][5] = rand_desc();
    wr_en <= 1; wr_task <= 3; wr_idx <= 5; wr_desc <= shadow[3][5];
    @(posedge clk);
    wr_en <= 0; rd_en <= 1; rd_task <= 3; rd_idx <= 5;
    @(posedge clk);
    rd_en <= 0; #1;
    checks++;
    if (rd_desc !== shadow[3][5]) begin failures++; $display("FAIL overwrite"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
