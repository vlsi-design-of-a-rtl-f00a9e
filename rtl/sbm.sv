// Shared buffer memory (SBM): one bank of the shared cell buffer.
//
// A single-port synchronous RAM holding DEPTH whole cells. One access per
// clock: a write when en and we are high, a read when en is high and we low.
// Read data appears on rdata in the clock after the read and stays until the
// next read. Several banks side by side form the shared buffer; the
// controllers give every bank at most one access per clock. Whole-cell words
// and the one-clock read latency are this design's choices.
module sbm
  import switch_pkg::*;
#(
  parameter int DEPTH  = 64,
  parameter int ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  cell_t             wdata,
  output cell_t             rdata
);

  cell_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
