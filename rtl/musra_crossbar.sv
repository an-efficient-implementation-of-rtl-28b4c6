// musra_crossbar: crossbar switch between two neighbouring rows of RCs.
//
// Every RC of the lower row can take any result of the row above. The
// sources are the XSRC = 16 words of the row above: PE_OUT of columns 0..7
// (sources 0..7) and LOR_OUT of columns 0..7 (sources 8..15). Each RC has
// three independent outputs from the switch, one per operand multiplexer
// (A, B and the LOR input), each chosen by the low four bits of that RC's
// select. Purely combinational; the registers are in the RCs.
// The any-to-any reach to the row above follows the architecture; carrying
// the LOR outputs through the switch as well is this design's choice.
module musra_crossbar
  import musra_pkg::*;
(
  input  word_t [XSRC-1:0]      src,
  input  logic  [COLS-1:0][5:0] sel_a,
  input  logic  [COLS-1:0][5:0] sel_b,
  input  logic  [COLS-1:0][5:0] sel_l,
  output word_t [COLS-1:0]      out_a,
  output word_t [COLS-1:0]      out_b,
  output word_t [COLS-1:0]      out_l
);

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      out_a[c] = src[sel_a[c][3:0]];
      out_b[c] = src[sel_b[c][3:0]];
      out_l[c] = src[sel_l[c][3:0]];
    end
  end

endmodule
