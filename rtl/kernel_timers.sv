// kernel_timers: per-kernel execution-time counters.
//
// Every core port has four cycle counters, as in the AMMC evaluation:
//   Ts scheduling      - request waiting in the scheduler
//   Tm memory manager  - request being expanded by the Address Manager
//   Tt data transfer   - request's accesses being executed by the Data Manager
//   Tc computation     - the core reports that it is computing
// A counter adds one in every cycle its condition holds, so overlapping phases
// are all counted. 'clear' zeroes all counters. The counters saturate.
module kernel_timers #(
  parameter int NUM_TASKS = 9,
  parameter int CNT_W     = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [NUM_TASKS-1:0] sched,
  input  logic [NUM_TASKS-1:0] mman,
  input  logic [NUM_TASKS-1:0] xfer,
  input  logic [NUM_TASKS-1:0] comp,
  output logic [CNT_W-1:0]     ts [NUM_TASKS],
  output logic [CNT_W-1:0]     tm [NUM_TASKS],
  output logic [CNT_W-1:0]     tt [NUM_TASKS],
  output logic [CNT_W-1:0]     tc [NUM_TASKS]
);
  function automatic logic [CNT_W-1:0] bump(input logic [CNT_W-1:0] c, input logic en);
    return (en && c != '1) ? c + 1'b1 : c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_TASKS; i++) begin
        ts[i] <= '0; tm[i] <= '0; tt[i] <= '0; tc[i] <= '0;
      end
    end else if (clear) begin
      for (int i = 0; i < NUM_TASKS; i++) begin
        ts[i] <= '0; tm[i] <= '0; tt[i] <= '0; tc[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NUM_TASKS; i++) begin
        ts[i] <= bump(ts[i], sched[i]);
        tm[i] <= bump(tm[i], mman[i]);
        tt[i] <= bump(tt[i], xfer[i]);
        tc[i] <= bump(tc[i], comp[i]);
      end
    end
  end
endmodule
