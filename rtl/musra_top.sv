// musra_top: the MUSRA coarse-grained reconfigurable array with its memories,
// DMAs, FIFOs, context parser and AHB slave port.
//
// The host processor writes contexts into the context memory and input data
// into the data memory through the AHB port, then writes a context number to
// the CMD register. The context parser loads that context into the inactive
// configuration layer of the 8 x 8 RC array and the inactive GRF bank,
// swaps layers when the array is idle and starts the input DMA (data memory
// -> IN_FIFO), the array and the output DMA (OUT_FIFO -> data memory). Each
// input-FIFO row is broadcast to all RCs; rows of RCs form a pipeline joined
// by crossbar switches, and the PE and LOR outputs of one configured row are
// stored as one OUT_FIFO row (words 0..7 PE_OUT, 8..15 LOR_OUT of columns
// 0..7, rest zero). While a context runs, the next one can be loaded.
//
// Interface: AHB-Lite slave (see musra_ahb_if for the register map) plus a
// `ctx_done` pulse per finished context. One clock (supplied by the system's
// clock generator) and an active-low asynchronous reset.
// The block structure follows the MUSRA architecture; memory sizes, the
// context format and all control protocols are this design's choices.
module musra_top
  import musra_pkg::*;
#(
  parameter int unsigned NCTX    = 16,
  parameter int unsigned DM_ROWS = 1024
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic        hreadyout,
  output logic        hresp,
  output logic [31:0] hrdata,
  output logic        ctx_done
);

  localparam int unsigned CAW = $clog2(NCTX * CTX_WORDS);
  localparam int unsigned RW  = $clog2(DM_ROWS);

  // host ports
  logic             h_cm_we, h_cm_re, h_dm_we, h_dm_re;
  logic [CAW-1:0]   h_cm_waddr, h_cm_raddr;
  logic [RW+3:0]    h_dm_waddr, h_dm_raddr;
  logic [31:0]      h_cm_wdata, h_cm_rdata, h_dm_wdata, h_dm_rdata;
  logic             cmd_valid, cmd_ready;
  logic [7:0]       cmd_ctx;
  logic [31:0]      status, stat_stall, stat_sched;
  // parser
  logic             p_cm_re;
  logic [CAW-1:0]   p_cm_addr;
  logic [31:0]      p_cm_rdata;
  logic             cfg_we, cfg_lor_we, cfg_layer, act_layer, swap;
  logic [$clog2(ROWS)-1:0] cfg_row, out_row;
  logic [$clog2(COLS)-1:0] cfg_col;
  rc_cfg_t          cfg_word;
  logic [31:0]      cfg_lor;
  logic             grf_we;
  logic [$clog2(GRF_N)-2:0] grf_pair;
  logic [31:0]      grf_data;
  logic             dma_start, out_dma_done, in_dma_done;
  logic [RW-1:0]    in_row, out_row_addr;
  logic [15:0]      in_rows, out_rows;
  logic             in_pop, out_push, rca_en;
  logic             loading, pending, running;
  logic [15:0]      n_done, n_stall_in, n_stall_out, n_swap, n_preload;
  logic             in_busy, out_busy;
  // FIFOs and memories
  logic             in_push, in_empty, in_full, out_pop, out_empty, out_full;
  logic [$clog2(FIFO_DEPTH+1)-1:0] in_count, out_count;
  fifo_row_t        in_wdata, in_head, out_wdata, out_head;
  logic             dm_rd_req, dm_rd_gnt, dm_wr_req, dm_wr_gnt;
  logic [RW-1:0]    dm_rd_row, dm_wr_row;
  fifo_row_t        dm_rd_data, dm_wr_data;
  // array
  word_t [GRF_N-1:0]          grf;
  word_t [ROWS-1:0][COLS-1:0] pe_out, lor_out;

  assign status     = {n_done, 13'd0, loading, running, cmd_valid || loading || pending};
  assign stat_stall = {n_stall_out, n_stall_in};
  assign stat_sched = {n_preload, n_swap};

  musra_ahb_if #(.NCTX(NCTX), .DM_ROWS(DM_ROWS)) u_ahb (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hreadyout, .hresp, .hrdata,
    .cm_we(h_cm_we), .cm_waddr(h_cm_waddr), .cm_wdata(h_cm_wdata),
    .cm_re(h_cm_re), .cm_raddr(h_cm_raddr), .cm_rdata(h_cm_rdata),
    .dm_we(h_dm_we), .dm_waddr(h_dm_waddr), .dm_wdata(h_dm_wdata),
    .dm_re(h_dm_re), .dm_raddr(h_dm_raddr), .dm_rdata(h_dm_rdata),
    .cmd_valid, .cmd_ctx, .cmd_ready, .status, .stat_stall, .stat_sched
  );

  musra_context_mem #(.NCTX(NCTX)) u_cm (
    .clk(hclk),
    .h_we(h_cm_we), .h_waddr(h_cm_waddr), .h_wdata(h_cm_wdata),
    .h_re(h_cm_re), .h_raddr(h_cm_raddr), .h_rdata(h_cm_rdata),
    .p_re(p_cm_re), .p_addr(p_cm_addr), .p_rdata(p_cm_rdata)
  );

  musra_context_parser #(.NCTX(NCTX), .RW(RW)) u_parser (
    .clk(hclk), .rst_n(hresetn),
    .cmd_valid, .cmd_ctx($clog2(NCTX)'(cmd_ctx)), .cmd_ready,
    .cm_re(p_cm_re), .cm_addr(p_cm_addr), .cm_rdata(p_cm_rdata),
    .cfg_we, .cfg_lor_we, .cfg_row, .cfg_col, .cfg_layer, .cfg_word, .cfg_lor,
    .act_layer, .swap,
    .grf_we, .grf_pair, .grf_data,
    .dma_start, .in_row, .out_row_addr, .in_count(in_rows), .out_count(out_rows), .out_dma_done,
    .in_empty, .in_pop, .out_full, .out_push, .out_row, .rca_en,
    .loading, .pending, .running, .done(ctx_done),
    .n_done, .n_stall_in, .n_stall_out, .n_swap, .n_preload
  );

  musra_grf u_grf (
    .clk(hclk), .rst_n(hresetn),
    .wr_en(grf_we), .wr_bank(cfg_layer), .wr_pair(grf_pair), .wr_data(grf_data),
    .act_bank(act_layer), .rd_data(grf)
  );

  musra_data_mem #(.DM_ROWS(DM_ROWS)) u_dm (
    .clk(hclk), .rst_n(hresetn),
    .h_we(h_dm_we), .h_waddr(h_dm_waddr), .h_wdata(h_dm_wdata),
    .h_re(h_dm_re), .h_raddr(h_dm_raddr), .h_rdata(h_dm_rdata),
    .rd_req(dm_rd_req), .rd_row(dm_rd_row), .rd_gnt(dm_rd_gnt), .rd_data(dm_rd_data),
    .wr_req(dm_wr_req), .wr_row(dm_wr_row), .wr_data(dm_wr_data), .wr_gnt(dm_wr_gnt)
  );

  musra_input_dma #(.RW(RW)) u_idma (
    .clk(hclk), .rst_n(hresetn),
    .start(dma_start), .src_row(in_row), .count(in_rows),
    .busy(in_busy), .done(in_dma_done),
    .rd_req(dm_rd_req), .rd_row(dm_rd_row), .rd_gnt(dm_rd_gnt), .rd_data(dm_rd_data),
    .fifo_count(in_count), .fifo_push(in_push), .fifo_data(in_wdata)
  );

  musra_fifo #(.WIDTH($bits(fifo_row_t)), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk(hclk), .rst_n(hresetn),
    .push(in_push), .wr_data(in_wdata), .pop(in_pop), .rd_data(in_head),
    .empty(in_empty), .full(in_full), .count(in_count)
  );

  musra_rca u_rca (
    .clk(hclk), .rst_n(hresetn), .en(rca_en),
    .cfg_we, .cfg_lor_we, .cfg_row, .cfg_col, .cfg_layer, .cfg_word, .cfg_lor,
    .act_layer, .swap,
    .fifo_row(in_head), .grf,
    .pe_out, .lor_out
  );

  always_comb begin
    out_wdata = '0;
    for (int c = 0; c < COLS; c++) begin
      out_wdata[c*DW +: DW]          = pe_out[out_row][c];
      out_wdata[(COLS+c)*DW +: DW]   = lor_out[out_row][c];
    end
  end

  musra_fifo #(.WIDTH($bits(fifo_row_t)), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk(hclk), .rst_n(hresetn),
    .push(out_push), .wr_data(out_wdata), .pop(out_pop), .rd_data(out_head),
    .empty(out_empty), .full(out_full), .count(out_count)
  );

  musra_output_dma #(.RW(RW)) u_odma (
    .clk(hclk), .rst_n(hresetn),
    .start(dma_start), .dst_row(out_row_addr), .count(out_rows),
    .busy(out_busy), .done(out_dma_done),
    .fifo_empty(out_empty), .fifo_data(out_head), .fifo_pop(out_pop),
    .wr_req(dm_wr_req), .wr_row(dm_wr_row), .wr_data(dm_wr_data), .wr_gnt(dm_wr_gnt)
  );

endmodule
