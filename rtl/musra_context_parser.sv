// musra_context_parser: loads contexts into the array and runs them.
//
// Loading (pre-load and pre-decode): on a command (cmd_valid/cmd_ready with a
// context number) the parser reads the context's 128 words from the context
// memory, one per cycle, and decodes each one as it arrives: words 0..63 go
// to the RC configuration of the inactive layer, 64..79 to the inactive GRF
// bank, 80..82 to shadow control registers and 96..127 to the LOR initial
// values of the inactive layer (word map in musra_pkg). Because only the
// inactive layer is written, loading runs behind the execution of the
// current context. When loading is complete and the array is idle, the
// parser swaps layers in one cycle (`swap`), copies the shadow control
// registers, starts both DMAs and starts execution; it is then free to
// pre-load the next context.
//
// Execution: the array runs N iterations. An iteration reads N_I input-FIFO
// rows on N_I successive advancing cycles (rca_en), so later rows feed later
// pipeline stages, and delivers N_O output rows from N_O successive array
// rows; a new iteration starts every max(N_I, N_O) advancing cycles (with
// N_I = N_O = 1, one per cycle). A valid bit per row follows the first input
// row of each iteration down the pipeline; when it sits at output row
// first+k, that row's outputs are pushed into OUT_FIFO. The DMAs move
// N * N_I and N * N_O rows.
// The whole array stalls (rca_en low) when it needs an input row and IN_FIFO
// is empty, or when a result is due and OUT_FIFO is full. The context is
// finished when the output DMA has written all N rows (out_dma_done); `done`
// pulses then. Counters record stall cycles, layer swaps and loads that
// ran, at least in part, while the array was executing.
//
// Timing: a row pushed into IN_FIFO on one clock edge enters row 0 on the
// next, and PE_OUT of row r holds its result r edges later (for the AES
// Mix_Add mapping, output row 5: seven clocks from FIFO write to result).
// The loading behind execution and the parser's role are the architecture's;
// multi-row iterations follow the architecture's execution model; the context
// word map, command interface and stall rules are this design's.
module musra_context_parser
  import musra_pkg::*;
#(
  parameter int unsigned NCTX = 16,
  parameter int unsigned RW   = 10,
  localparam int unsigned CXW = $clog2(NCTX),
  localparam int unsigned AW  = $clog2(NCTX * CTX_WORDS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // command
  input  logic                    cmd_valid,
  input  logic [CXW-1:0]          cmd_ctx,
  output logic                    cmd_ready,
  // context memory read port
  output logic                    cm_re,
  output logic [AW-1:0]           cm_addr,
  input  logic [31:0]             cm_rdata,
  // RCA configuration
  output logic                    cfg_we,
  output logic                    cfg_lor_we,
  output logic [$clog2(ROWS)-1:0] cfg_row,
  output logic [$clog2(COLS)-1:0] cfg_col,
  output logic                    cfg_layer,
  output rc_cfg_t                 cfg_word,
  output logic [31:0]             cfg_lor,
  output logic                    act_layer,
  output logic                    swap,
  // GRF
  output logic                    grf_we,
  output logic [$clog2(GRF_N)-2:0] grf_pair,
  output logic [31:0]             grf_data,
  // DMAs
  output logic                    dma_start,
  output logic [RW-1:0]           in_row,
  output logic [RW-1:0]           out_row_addr,
  output logic [15:0]             in_count,    // rows for the input DMA: N * N_I
  output logic [15:0]             out_count,   // rows for the output DMA: N * N_O
  input  logic                    out_dma_done,
  // FIFOs and array control
  input  logic                    in_empty,
  output logic                    in_pop,
  input  logic                    out_full,
  output logic                    out_push,
  output logic [$clog2(ROWS)-1:0] out_row,
  output logic                    rca_en,
  // status
  output logic                    loading,
  output logic                    pending,
  output logic                    running,
  output logic                    done,
  output logic [15:0]             n_done,
  output logic [15:0]             n_stall_in,
  output logic [15:0]             n_stall_out,
  output logic [15:0]             n_swap,
  output logic [15:0]             n_preload
);

  typedef enum logic [1:0] {LD_IDLE, LD_READ, LD_WAIT} ld_e;

  ld_e            ld_q;
  logic [AW-1:0]  base_q;
  logic [7:0]     k_q;         // next word to request (bit 7: all requested)
  logic           rv_q;        // read data valid this cycle
  logic [6:0]     rk_q;        // word index of the read data
  logic [31:0]    sh_ctrl_q, sh_in_q, sh_out_q;
  logic           act_q, run_q, ovl_q;
  logic [15:0]    n_q, issued_q;
  logic [$clog2(ROWS)-1:0] orow_q;
  logic [ROWS-1:0] vld_q;
  logic [2:0]     ni_q, no_q, ii_q, ph_q;   // N_I-1, N_O-1, issue interval-1, phase
  logic [2:0]     ni_sh, no_sh;
  logic           need_in, stall_in, stall_out, res_due;
  logic [2:0]     res_k;
  logic [4:0]     lidx;
  logic [$clog2(ROWS)-1:0] lor_row;
  logic [$clog2(COLS)-1:0] lor_col;

  // ---------------------------------------------------------------- loading
  assign cmd_ready = (ld_q == LD_IDLE);
  assign cm_re     = (ld_q == LD_READ) && !k_q[7];
  assign cm_addr   = base_q + AW'(k_q[6:0]);
  assign loading   = (ld_q == LD_READ);
  assign pending   = (ld_q == LD_WAIT);

  assign cfg_layer = !act_q;
  assign cfg_we    = rv_q && rk_q < 7'(W_GRF);
  assign cfg_row   = cfg_lor_we ? lor_row : rk_q[5:3];
  assign cfg_col   = cfg_lor_we ? lor_col : rk_q[2:0];
  assign cfg_word  = rc_cfg_t'(cm_rdata);
  assign lidx      = 5'(rk_q - 7'(W_LOR));
  assign cfg_lor_we = rv_q && rk_q >= 7'(W_LOR);
  assign cfg_lor   = cm_rdata;
  assign grf_we    = rv_q && rk_q >= 7'(W_GRF) && rk_q < 7'(W_CTRL);
  assign grf_pair  = 4'(rk_q - 7'(W_GRF));
  assign grf_data  = cm_rdata;

  // the LOR pair of word 96+i is RC 2i and 2i+1: row i/4, columns 2*(i%4) and +1
  assign lor_row = lidx[4:2];
  assign lor_col = {lidx[1:0], 1'b0};

  assign swap = (ld_q == LD_WAIT) && !run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_q      <= LD_IDLE;
      base_q    <= '0;
      k_q       <= '0;
      rv_q      <= 1'b0;
      rk_q      <= '0;
      sh_ctrl_q <= '0;
      sh_in_q   <= '0;
      sh_out_q  <= '0;
    end else begin
      rv_q <= cm_re;
      rk_q <= k_q[6:0];
      unique case (ld_q)
        LD_IDLE: if (cmd_valid) begin
          base_q <= AW'(cmd_ctx) * AW'(CTX_WORDS);
          k_q    <= '0;
          ld_q   <= LD_READ;
        end
        LD_READ: begin
          if (cm_re) k_q <= k_q + 1'b1;
          if (rv_q && rk_q == 7'(CTX_WORDS - 1)) ld_q <= LD_WAIT;
        end
        LD_WAIT: if (swap) ld_q <= LD_IDLE;
        default: ld_q <= LD_IDLE;
      endcase
      if (rv_q && rk_q == 7'(W_CTRL))    sh_ctrl_q <= cm_rdata;
      if (rv_q && rk_q == 7'(W_INADDR))  sh_in_q   <= cm_rdata;
      if (rv_q && rk_q == 7'(W_OUTADDR)) sh_out_q  <= cm_rdata;
    end
  end

  // -------------------------------------------------------------- execution
  // An iteration takes N_I input rows on N_I successive advancing cycles
  // (phases 0..N_I-1) and delivers N_O output rows from rows orow..orow+N_O-1;
  // a new iteration starts every max(N_I, N_O) advancing cycles.
  assign ni_sh     = sh_ctrl_q[21:19];
  assign no_sh     = sh_ctrl_q[24:22];
  assign need_in   = issued_q != n_q && ph_q <= ni_q;
  // the valid bit of an iteration marks its first input row; the result of
  // output k is due when that bit sits at row orow+k (at most one k at a time)
  always_comb begin
    res_due = 1'b0;
    res_k   = '0;
    for (int k = 0; k < ROWS; k++)
      if (3'(k) <= no_q && int'(orow_q) + k < ROWS && vld_q[int'(orow_q) + k]) begin
        res_due = 1'b1;
        res_k   = 3'(k);
      end
  end
  assign stall_in  = run_q && need_in && in_empty;
  assign stall_out = run_q && res_due && out_full;
  assign rca_en    = run_q && !stall_in && !stall_out;
  assign in_pop    = rca_en && need_in;
  assign out_push  = rca_en && res_due;
  assign out_row   = orow_q + res_k;
  assign act_layer = act_q;
  assign running   = run_q;
  assign dma_start = swap && sh_ctrl_q[15:0] != 16'd0;
  assign in_row    = RW'(sh_in_q[15:0]);
  assign out_row_addr = RW'(sh_out_q[15:0]);
  assign in_count  = 16'(sh_ctrl_q[15:0] * ({13'd0, ni_sh} + 16'd1));
  assign out_count = 16'(sh_ctrl_q[15:0] * ({13'd0, no_sh} + 16'd1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q       <= 1'b0;
      run_q       <= 1'b0;
      n_q         <= '0;
      issued_q    <= '0;
      orow_q      <= '0;
      ni_q        <= '0;
      no_q        <= '0;
      ii_q        <= '0;
      ph_q        <= '0;
      vld_q       <= '0;
      done        <= 1'b0;
      n_done      <= '0;
      n_stall_in  <= '0;
      n_stall_out <= '0;
      n_swap      <= '0;
      n_preload   <= '0;
      ovl_q       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (swap) begin
        act_q    <= !act_q;
        run_q    <= sh_ctrl_q[15:0] != 16'd0;
        n_q      <= sh_ctrl_q[15:0];
        orow_q   <= sh_ctrl_q[16 +: $clog2(ROWS)];
        ni_q     <= ni_sh;
        no_q     <= no_sh;
        ii_q     <= (ni_sh > no_sh) ? ni_sh : no_sh;
        ph_q     <= '0;
        issued_q <= '0;
        vld_q    <= '0;
        n_swap   <= n_swap + 1'b1;
        if (sh_ctrl_q[15:0] == 16'd0) begin
          done   <= 1'b1;
          n_done <= n_done + 1'b1;
        end
      end else begin
        if (rca_en) begin
          vld_q <= {vld_q[ROWS-2:0], in_pop && ph_q == 3'd0};
          if (in_pop && ph_q == ni_q) issued_q <= issued_q + 1'b1;
          ph_q  <= (ph_q == ii_q) ? 3'd0 : ph_q + 3'd1;
        end
        if (run_q && out_dma_done) begin
          run_q  <= 1'b0;
          done   <= 1'b1;
          n_done <= n_done + 1'b1;
        end
      end
      if (stall_in)  n_stall_in  <= n_stall_in + 1'b1;
      if (stall_out) n_stall_out <= n_stall_out + 1'b1;
      // a load counts as overlapped if the array ran during any of its cycles
      if (ld_q == LD_IDLE) ovl_q <= 1'b0;
      else if (ld_q == LD_READ && run_q) ovl_q <= 1'b1;
      if (ld_q == LD_READ && rv_q && rk_q == 7'(CTX_WORDS - 1) && (ovl_q || run_q))
        n_preload <= n_preload + 1'b1;
    end
  end

  a_single_cfg: assert property (@(posedge clk) disable iff (!rst_n) !(cfg_we && cfg_lor_we));

endmodule
