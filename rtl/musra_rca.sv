// musra_rca: the Reconfigurable Computing Array, ROWS x COLS RCs.
//
// Each row is one pipeline stage; a crossbar switch in front of every row
// lets each RC take any PE_OUT or LOR_OUT of the row above. The row of the
// input FIFO currently at its head is broadcast to every RC, and the GRF
// constants reach every RC, so any RC may read input data directly. The
// crossbar in front of row 0 has no row above it; there its sixteen sources
// are the FIFO words 0..15 (this design's choice).
//
// Configuration: cfg_we writes the operation word of one RC layer, addressed
// by cfg_row/cfg_col/cfg_layer; cfg_lor_we writes the LOR initial values of
// the pair of RCs cfg_col (even) and cfg_col+1 in one go. act_layer selects the layer all RCs execute; swap switches all
// RCs to the other layer at once and loads their LORs from it.
// Timing: with `en` high every row captures one result per clock, so a value
// entering row 0 from the FIFO reaches PE_OUT of row r after r+1 clocks. `en`
// low freezes the whole array (stall). Multiple loop iterations are in
// flight at once, one per row.
module musra_rca
  import musra_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      cfg_we,
  input  logic [$clog2(ROWS)-1:0]   cfg_row,
  input  logic [$clog2(COLS)-1:0]   cfg_col,
  input  logic                      cfg_lor_we,  // writes the LOR init of cfg_col and cfg_col+1
  input  logic                      cfg_layer,
  input  rc_cfg_t                   cfg_word,
  input  logic [31:0]               cfg_lor,     // [15:0] for cfg_col, [31:16] for cfg_col+1
  input  logic                      act_layer,
  input  logic                      swap,
  input  fifo_row_t                 fifo_row,
  input  word_t [GRF_N-1:0]         grf,
  output word_t [ROWS-1:0][COLS-1:0] pe_out,
  output word_t [ROWS-1:0][COLS-1:0] lor_out
);

  word_t [ROWS-1:0][XSRC-1:0]      xsrc;
  logic  [ROWS-1:0][COLS-1:0][5:0] sel_a, sel_b, sel_l;
  word_t [ROWS-1:0][COLS-1:0]      pre_a, pre_b, pre_l;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    if (r == 0) begin : g_src0
      for (genvar k = 0; k < XSRC; k++) begin : g_k
        assign xsrc[0][k] = fifo_row[k*DW +: DW];
      end
    end else begin : g_srcn
      assign xsrc[r] = {lor_out[r-1], pe_out[r-1]};
    end

    musra_crossbar u_xbar (
      .src   (xsrc[r]),
      .sel_a (sel_a[r]),
      .sel_b (sel_b[r]),
      .sel_l (sel_l[r]),
      .out_a (pre_a[r]),
      .out_b (pre_b[r]),
      .out_l (pre_l[r])
    );

    for (genvar c = 0; c < COLS; c++) begin : g_col
      musra_rc u_rc (
        .clk       (clk),
        .rst_n     (rst_n),
        .en        (en),
        .cfg_we    (cfg_we && cfg_row == r && cfg_col == c),
        .cfg_lor_we(cfg_lor_we && cfg_row == r && cfg_col[$clog2(COLS)-1:1] == ($clog2(COLS)-1)'(c / 2)),
        .cfg_layer (cfg_layer),
        .cfg_word  (cfg_word),
        .cfg_lor   (cfg_lor[(c % 2)*DW +: DW]),
        .act_layer (act_layer),
        .swap      (swap),
        .fifo_row  (fifo_row),
        .pre_a     (pre_a[r][c]),
        .pre_b     (pre_b[r][c]),
        .pre_l     (pre_l[r][c]),
        .grf       (grf),
        .xsel_a    (sel_a[r][c]),
        .xsel_b    (sel_b[r][c]),
        .xsel_l    (sel_l[r][c]),
        .pe_out    (pe_out[r][c]),
        .lor_out   (lor_out[r][c])
      );
    end
  end

endmodule
