// musra_data_mem: local data memory of MUSRA with its port arbitration.
//
// DM_ROWS rows of 512 bits, the width of one FIFO row, so the DMAs move a
// whole FIFO row per access. The memory has one read and one write port.
// The host (through the bus interface) reads and writes single 32-bit words,
// addressed as row*16 + word; the input DMA reads whole rows and the output
// DMA writes whole rows. On each port the host has priority: a DMA request
// is granted (rd_gnt / wr_gnt) only in a cycle without a host access on that
// port, and a refused DMA simply repeats its request.
// Timing: reads are synchronous. Host read data (h_rdata) and DMA read data
// (rd_data) are valid on the clock after the access; writes land on the clock
// edge. The size (DM_ROWS = 1024, 64 KiB) and the arbitration are this
// design's choices; the document names the data memory without sizing it.
module musra_data_mem
  import musra_pkg::*;
#(
  parameter int unsigned DM_ROWS = 1024,
  localparam int unsigned RW     = $clog2(DM_ROWS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host: 32-bit words
  input  logic          h_we,
  input  logic [RW+3:0] h_waddr,
  input  logic [31:0]   h_wdata,
  input  logic          h_re,
  input  logic [RW+3:0] h_raddr,
  output logic [31:0]   h_rdata,
  // input DMA: row reads
  input  logic          rd_req,
  input  logic [RW-1:0] rd_row,
  output logic          rd_gnt,
  output fifo_row_t     rd_data,
  // output DMA: row writes
  input  logic          wr_req,
  input  logic [RW-1:0] wr_row,
  input  fifo_row_t     wr_data,
  output logic          wr_gnt
);

  fifo_row_t   mem_q [DM_ROWS];
  fifo_row_t   rdata_q;
  logic [3:0]  h_word_q;
  logic        r_en, w_en;
  logic [RW-1:0] r_row, w_row;
  fifo_row_t   w_data, w_mask;

  assign rd_gnt = rd_req && !h_re;
  assign wr_gnt = wr_req && !h_we;
  assign r_en   = h_re || rd_req;
  assign r_row  = h_re ? h_raddr[RW+3:4] : rd_row;
  assign w_en   = h_we || wr_req;
  assign w_row  = h_we ? h_waddr[RW+3:4] : wr_row;

  always_comb begin
    if (h_we) begin
      w_mask = fifo_row_t'(32'hFFFF_FFFF) << (h_waddr[3:0] * 32);
      w_data = fifo_row_t'(h_wdata) << (h_waddr[3:0] * 32);
    end else begin
      w_mask = '1;
      w_data = wr_data;
    end
  end

  always_ff @(posedge clk) begin
    if (w_en) mem_q[w_row] <= (mem_q[w_row] & ~w_mask) | (w_data & w_mask);
    if (r_en) rdata_q <= mem_q[r_row];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) h_word_q <= '0;
    else if (h_re) h_word_q <= h_raddr[3:0];
  end

  assign rd_data = rdata_q;
  assign h_rdata = rdata_q[h_word_q*32 +: 32];

endmodule
