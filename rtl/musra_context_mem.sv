// musra_context_mem: the context memory of MUSRA.
//
// Holds NCTX contexts of CTX_WORDS = 128 32-bit words each, as one array of
// 32-bit words (context k starts at word k*128). The host side has a write
// port and a read port (used by the bus interface); the context parser has its
// own read port. Both reads are synchronous: data appear on the clock after
// the request and stay until the next request. A host write and a parser read
// of the same word in one cycle return the old word to the parser.
// A context of 128 32-bit words is the architecture's; the number of contexts
// (NCTX = 16) and the port arrangement are this design's choice.
module musra_context_mem
  import musra_pkg::*;
#(
  parameter int unsigned NCTX = 16,
  localparam int unsigned AW  = $clog2(NCTX * CTX_WORDS)
) (
  input  logic          clk,
  // host
  input  logic          h_we,
  input  logic [AW-1:0] h_waddr,
  input  logic [31:0]   h_wdata,
  input  logic          h_re,
  input  logic [AW-1:0] h_raddr,
  output logic [31:0]   h_rdata,
  // context parser
  input  logic          p_re,
  input  logic [AW-1:0] p_addr,
  output logic [31:0]   p_rdata
);

  logic [31:0] mem_q [NCTX * CTX_WORDS];

  always_ff @(posedge clk) begin
    if (h_we) mem_q[h_waddr] <= h_wdata;
  end

  always_ff @(posedge clk) begin
    if (h_re) h_rdata <= mem_q[h_raddr];
    if (p_re) p_rdata <= mem_q[p_addr];
  end

endmodule
