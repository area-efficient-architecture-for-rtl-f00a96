// line_buffer: holds the state words of the last row (row 3) of the
// previous stripe, one 5-bit word per column, for the context window of
// row 0 of the current stripe.  64 x 5 bits.
// One synchronous write port and one asynchronous read port; a write and a
// read of the same address in one cycle returns the old word.
// Its size and purpose follow the published architecture; the port
// arrangement is this design's own.
module line_buffer
  import ebc_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  samp_t                    wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output samp_t                    rdata
);
  samp_t mem [DEPTH];
  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = mem[raddr];
endmodule
