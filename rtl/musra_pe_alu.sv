// musra_pe_alu: combinational datapath of one RC.
//
// Computes the configured operation on the 16-bit operands A, B and C:
// arithmetic and logic, multiply and multiply-accumulate, barrel shifts,
// shift-with-rounding, absolute difference, minimum/maximum and two-lane
// 8-bit add/subtract. The architecture lists these classes of operation
// (fixed-point 8/16-bit, two or three operands, multiplier, barrel shift,
// shift and round, absolute differences); the exact list and encoding
// (musra_pkg::op_e) are this design's. OP_NOP returns `hold`, the current
// OUT_REG value, so an idle PE keeps its output.
module musra_pe_alu
  import musra_pkg::*;
(
  input  op_e   op,
  input  word_t a,
  input  word_t b,
  input  word_t c,
  input  word_t hold,
  output word_t y
);

  logic [3:0]             sh;
  logic                   sgn;       // signed multiply / arithmetic shift
  logic signed [DW:0]     ma, mb;    // multiplier operands, sign- or zero-extended
  logic signed [2*DW+1:0] prod;
  logic [DW-1:0]          half;      // 2^(sh-1) for rounding, 0 when sh = 0
  logic signed [DW+1:0]   sr_in;
  logic signed [DW+1:0]   sr;

  // one multiplier serves MUL, MULS and MAC
  assign ma   = {(op == OP_MULS) & a[DW-1], a};
  assign mb   = {(op == OP_MULS) & b[DW-1], b};
  assign prod = ma * mb;
  assign sh   = b[3:0];

  // one right shifter serves SRL, SRA and SRND
  always_comb begin
    half = '0;
    for (int i = 1; i < 16; i++)
      if (sh == 4'(i)) half[i-1] = 1'b1;
  end
  assign sgn   = (op == OP_SRA) || (op == OP_SRND);
  assign sr_in = $signed({{2{sgn & a[DW-1]}}, a}) + ((op == OP_SRND) ? $signed({2'b00, half}) : '0);
  assign sr    = sr_in >>> sh;

  always_comb begin
    unique case (op)
      OP_NOP:   y = hold;
      OP_PASSA: y = a;
      OP_ADD:   y = a + b;
      OP_SUB:   y = a - b;
      OP_MUL:   y = prod[DW-1:0];
      OP_MULS:  y = prod[DW-1:0];
      OP_MAC:   y = prod[DW-1:0] + c;
      OP_AND:   y = a & b;
      OP_OR:    y = a | b;
      OP_XOR:   y = a ^ b;
      OP_NOT:   y = ~a;
      OP_SLL:   y = a << sh;
      OP_SRL:   y = sr[DW-1:0];
      OP_SRA:   y = sr[DW-1:0];
      OP_SRND:  y = sr[DW-1:0];
      OP_ABSD:  y = (a > b) ? a - b : b - a;
      OP_ADD3:  y = a + b + c;
      OP_XOR3:  y = a ^ b ^ c;
      OP_MIN:   y = ($signed(a) < $signed(b)) ? a : b;
      OP_MAX:   y = ($signed(a) > $signed(b)) ? a : b;
      OP_ADD8:  y = {a[15:8] + b[15:8], a[7:0] + b[7:0]};
      OP_SUB8:  y = {a[15:8] - b[15:8], a[7:0] - b[7:0]};
      default:  y = hold;
    endcase
  end

endmodule
