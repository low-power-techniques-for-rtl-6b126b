// line_cache: full-last-line cache (FLLC). An on-chip memory holding data
// of the macroblock line above the one being decoded, so neighbour data is
// read from chip instead of the off-chip frame buffer. It is direct-mapped
// and needs no tags: the address is always the horizontal position within
// the last line, and every word is written before it is read, so there are
// no misses. One write port and two read ports (for example the top and
// top-right neighbours of an intra block).
// Timing: writes take effect at the clock edge; reads are asynchronous
// (register-file style), which keeps the callers' timing simple. The
// defaults (324 words of 32 bits) are the luma intra last-line cache;
// other instances hold the deblocking last four lines.
module line_cache #(
  parameter int unsigned DEPTH = 324,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr0,
  output logic [WIDTH-1:0]         rdata0,
  input  logic [$clog2(DEPTH)-1:0] raddr1,
  output logic [WIDTH-1:0]         rdata1
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata0 = mem[raddr0];
  assign rdata1 = mem[raddr1];
endmodule
