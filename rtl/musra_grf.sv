// musra_grf: Global Register File of scalar constants for the RCA.
//
// GRF_N 16-bit entries, all read in parallel by every RC (B operand, and A
// in this design). The file has two banks, matching the two configuration
// layers of the RCs: the context parser writes the constants of the next
// context into the inactive bank (wr_en/wr_bank/wr_idx/wr_data) while the
// active bank feeds the array, and both switch together (act_bank).
// A write carries two entries, 2*wr_pair and 2*wr_pair+1 (one 32-bit context
// word). Writes take effect on the next rising edge. Reset clears both banks.
// The GRF's role (scalar constants, global or loaded at run time by
// configuration words) is the architecture's; the size of 32 entries follows the
// register indices of the original AES mapping, and the banking is
// this design's choice to allow loading behind execution.
module musra_grf
  import musra_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic                     wr_bank,
  input  logic [$clog2(GRF_N)-2:0] wr_pair,
  input  logic [31:0]              wr_data,
  input  logic                     act_bank,
  output word_t [GRF_N-1:0]        rd_data
);

  word_t bank_q [2][GRF_N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < GRF_N; i++)
          bank_q[b][i] <= '0;
    end else if (wr_en) begin
      bank_q[wr_bank][{wr_pair, 1'b0}] <= wr_data[15:0];
      bank_q[wr_bank][{wr_pair, 1'b1}] <= wr_data[31:16];
    end
  end

  always_comb begin
    for (int i = 0; i < GRF_N; i++)
      rd_data[i] = bank_q[act_bank][i];
  end

endmodule
