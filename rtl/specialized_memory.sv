// specialized_memory: one core's Specialized Memory (local buffer).
//
// A true dual-port RAM of DEPTH words: port A belongs to the core, port B to
// the AMMC Data Manager. Both ports read with one cycle of latency (the word
// addressed while en is high appears on rdata the next cycle) and write at
// the clock edge. If both ports write the same word in one cycle, port B wins.
// One buffer per core follows the AMMC description; size and latency are this
// design's choices.
module specialized_memory
  import ammc_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [DATA_W-1:0]        a_wdata,
  output logic [DATA_W-1:0]        a_rdata,
  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic [DATA_W-1:0]        b_wdata,
  output logic [DATA_W-1:0]        b_rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule
