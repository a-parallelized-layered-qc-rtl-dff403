// ldpc_ram: one half of the Q-, T- or R-memory of the decoder.
//
// A simple dual-port memory with one synchronous read port and one write
// port, both used every cycle. The read is registered: the address given in
// cycle k delivers its word in cycle k+1. A read that falls on the word being
// written in the same cycle returns the old contents, unless `byp` is set, in
// which case it returns the write data (the memory bypass that the command
// sequence requests). Depth and width are parameters: the Q- and T-memory
// halves hold 8 words of Z*5 bits, the R-memory halves 28 words of Z*5 bits.
// The original architecture specifies the sizes and the split into two independent
// halves; the port arrangement and the bypass-by-flag are this design's own.
module ldpc_ram #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 210,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  input  logic             byp,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= byp ? wdata : mem[raddr];
  end
endmodule
