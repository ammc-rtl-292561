// record_fifo: synchronous FIFO for address records between the Address
// Manager and the Data Manager.
//
// Lets the Address Manager run ahead of the Data Manager, so that address
// generation for a request (Tm) overlaps the data transfers (Tt) and the
// next request can be expanded while the previous one is still moving data.
// DEPTH entries (a power of two), valid/ready on both sides, first-word
// fall-through: an entry written in one cycle can be read in the next.
// A plain register array with read and write pointers; no reset of the data.
module record_fifo
  import ammc_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  addr_rec_t in_data,
  output logic      out_valid,
  input  logic      out_ready,
  output addr_rec_t out_data
);
  localparam int AW = $clog2(DEPTH);

  addr_rec_t       mem [DEPTH];
  logic [AW:0]     wptr, rptr;
  logic            push, pop;

  assign in_ready  = (wptr - rptr) != (AW+1)'(DEPTH);
  assign out_valid = (wptr != rptr);
  assign out_data  = mem[rptr[AW-1:0]];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk)
    if (push) mem[wptr[AW-1:0]] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
    end
  end

endmodule
