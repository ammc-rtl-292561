// comparator: the scheduler's Comparator.
//
// Looks at the requests that have arrived but are not yet placed in the
// Dispatch Descriptor and selects one per cycle: the one with the best
// (numerically lowest) programmed priority, the lowest port number among
// equals. In symmetric mode priorities are ignored and the lowest port wins,
// which only orders requests arriving in the same cycle. Purely combinational.
module comparator
  import ammc_pkg::*;
#(
  parameter int NUM_TASKS = 9
) (
  input  logic [NUM_TASKS-1:0] pending,
  input  logic [PRIO_W-1:0]    prio [NUM_TASKS],
  input  logic                 symmetric,
  output logic                 sel_valid,
  output logic [TID_W-1:0]     sel,
  output logic [PRIO_W-1:0]    sel_prio
);
  always_comb begin
    logic [PRIO_W-1:0] best;
    sel_valid = 1'b0;
    sel       = '0;
    best      = '1;
    for (int i = 0; i < NUM_TASKS; i++) begin
      if (pending[i]) begin
        if (!sel_valid || (!symmetric && prio[i] < best)) begin
          sel_valid = 1'b1;
          sel       = TID_W'(i);
          best      = prio[i];
        end
      end
    end
    sel_prio = sel_valid ? prio[sel] : '0;
  end
endmodule
