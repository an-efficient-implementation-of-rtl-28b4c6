// musra_rc: one reconfigurable cell (RC) of the MUSRA array.
//
// An RC is a processing element (PE) plus a local register (LOR). The PE has
// three operand multiplexers: A and B pick a word of the broadcast input-FIFO
// row, a line from the crossbar above (PRE_LINE), a GRF constant (B only has
// the GRF in the architecture; A may also take the LOR here), and C is the
// LOR, taken either from the register or straight from its input multiplexer
// (FIFO word or crossbar line).
// The 16-bit datapath result is captured in OUT_REG, which drives PE_OUT.
// The LOR either holds a constant (loaded when a context is switched in) or
// captures a FIFO word, a crossbar line or the PE result each cycle, so it can
// serve as a pipeline-balancing delay or as coefficient storage.
//
// Configuration is held in two layers. The context parser writes one layer
// (cfg_we writes the operation word, cfg_lor_we the LOR initial value, both
// into layer cfg_layer) while the other is active, and `swap` flips to
// the newly written layer; in that cycle the LOR loads its initial value from
// the incoming layer. The active layer index comes from the parser (act_layer).
//
// Timing: OUT_REG and LOR update on the rising clock edge when `en` is high;
// with `en` low the RC freezes (array-wide stall). One cycle per stage.
// The cell structure (muxes, datapath, OUT_REG, LOR, two layers) follows the
// architecture; the opcode list and the configuration word are this design's.
module musra_rc
  import musra_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,          // ENABLE: advance the pipeline
  // configuration port
  input  logic                  cfg_we,
  input  logic                  cfg_lor_we,
  input  logic                  cfg_layer,
  input  rc_cfg_t               cfg_word,
  input  word_t                 cfg_lor,
  input  logic                  act_layer,   // layer that drives the datapath
  input  logic                  swap,        // switching to layer !act_layer this cycle
  // operands
  input  fifo_row_t             fifo_row,    // broadcast input-FIFO row
  input  word_t                 pre_a,       // crossbar lines selected by xsel_*
  input  word_t                 pre_b,
  input  word_t                 pre_l,
  input  word_t [GRF_N-1:0]     grf,
  output logic [5:0]            xsel_a,      // crossbar source selects of the active layer
  output logic [5:0]            xsel_b,
  output logic [5:0]            xsel_l,
  // results
  output word_t                 pe_out,
  output word_t                 lor_out
);

  rc_layer_t layer_q [2];
  rc_cfg_t   cfg;
  word_t     a, b, c, lor_ext, lor_in, res, out_q, lor_q;

  assign cfg    = layer_q[act_layer].cfg;
  assign xsel_a = cfg.a_idx;
  assign xsel_b = cfg.b_idx;
  assign xsel_l = cfg.lor_idx;

  // FIFO word select; index bit 5 is unused (32 words per row)
  function automatic word_t fifo_word(fifo_row_t row, logic [4:0] idx);
    return row[idx*DW +: DW];
  endfunction

  always_comb begin
    unique case (cfg.a_src)
      SRC_FIFO: a = fifo_word(fifo_row, cfg.a_idx[4:0]);
      SRC_PRE:  a = pre_a;
      SRC_GRF:  a = grf[cfg.a_idx[4:0]];
      default:  a = lor_q;
    endcase
    unique case (cfg.b_src)
      SRC_FIFO: b = fifo_word(fifo_row, cfg.b_idx[4:0]);
      SRC_PRE:  b = pre_b;
      SRC_GRF:  b = grf[cfg.b_idx[4:0]];
      default:  b = lor_q;
    endcase
    // LOR multiplexer without the PE-result input; C may bypass the LOR
    // register only through this path, so the cell has no combinational loop
    unique case (cfg.lor_src)
      LOR_FIFO: lor_ext = fifo_word(fifo_row, cfg.lor_idx[4:0]);
      LOR_PRE:  lor_ext = pre_l;
      default:  lor_ext = lor_q;
    endcase
    c = cfg.c_byp ? lor_ext : lor_q;
  end

  assign lor_in = (cfg.lor_src == LOR_SELF) ? res : lor_ext;

  musra_pe_alu u_alu (
    .op   (cfg.op),
    .a    (a),
    .b    (b),
    .c    (c),
    .hold (out_q),
    .y    (res)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      layer_q[0] <= '0;
      layer_q[1] <= '0;
    end else begin
      if (cfg_we)     layer_q[cfg_layer].cfg      <= cfg_word;
      if (cfg_lor_we) layer_q[cfg_layer].lor_init <= cfg_lor;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_q <= '0;
      lor_q <= '0;
    end else if (swap) begin
      lor_q <= layer_q[!act_layer].lor_init;
    end else if (en) begin
      out_q <= res;
      lor_q <= lor_in;
    end
  end

  assign pe_out  = out_q;
  assign lor_out = lor_q;

endmodule
