// musra_pkg: shared sizes, types and the context encoding of the MUSRA
// coarse-grained reconfigurable array.
//
// The array is 8 x 8 reconfigurable cells (RCs) with 16-bit words; the input
// and output FIFOs are 512 bits wide (thirty-two 16-bit words) and 8 rows
// deep; a context is 128 32-bit words. Those numbers are the architecture's.
// The opcode set, the bit layout of an RC configuration word and the word map
// of a context are this implementation's own choices, described below.
//
// Context word map (128 x 32 bit):
//   0..63    RC configuration, word r*8+c configures the RC in row r, column c
//   64..79   GRF constants, word 64+i holds GRF[2i] in [15:0], GRF[2i+1] in [31:16]
//   80       [15:0] iteration count N, [18:16] first row whose outputs are
//            stored, [21:19] input rows per iteration N_I - 1, [24:22] output
//            rows per iteration N_O - 1 (rows stored: first .. first + N_O - 1)
//   81       [15:0] first data-memory row read by the input DMA
//   82       [15:0] first data-memory row written by the output DMA
//   83..95   reserved
//   96..127  LOR initial values, word 96+i holds LOR of RC 2i in [15:0],
//            RC 2i+1 in [31:16] (RC index r*8+c)
package musra_pkg;

  localparam int unsigned ROWS      = 8;   // RCA rows (pipeline stages)
  localparam int unsigned COLS      = 8;   // RCs per row
  localparam int unsigned DW        = 16;  // RC word width
  localparam int unsigned FIFO_WORDS = 32; // 16-bit words per FIFO row (512 bits)
  localparam int unsigned FIFO_DEPTH = 8;  // FIFO rows
  localparam int unsigned GRF_N     = 32;  // GRF entries
  localparam int unsigned CTX_WORDS = 128; // 32-bit words per context
  localparam int unsigned XSRC      = 2 * COLS; // crossbar sources: PE_OUT and LOR_OUT of the row above

  localparam int unsigned W_RC      = 0;
  localparam int unsigned W_GRF     = 64;
  localparam int unsigned W_CTRL    = 80;
  localparam int unsigned W_INADDR  = 81;
  localparam int unsigned W_OUTADDR = 82;
  localparam int unsigned W_LOR     = 96;

  typedef logic [DW-1:0]                 word_t;
  typedef logic [FIFO_WORDS*DW-1:0]      fifo_row_t;   // 512-bit FIFO / data-memory row

  // Datapath operations. A and B are the two main operands, C the third
  // (the LOR side input) used by the three-operand operations.
  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,   // output register holds its value
    OP_PASSA  = 5'd1,   // A
    OP_ADD    = 5'd2,   // A + B
    OP_SUB    = 5'd3,   // A - B
    OP_MUL    = 5'd4,   // A * B, low 16 bits, unsigned
    OP_MULS   = 5'd5,   // A * B, low 16 bits, signed
    OP_MAC    = 5'd6,   // A * B + C
    OP_AND    = 5'd7,
    OP_OR     = 5'd8,
    OP_XOR    = 5'd9,
    OP_NOT    = 5'd10,  // ~A
    OP_SLL    = 5'd11,  // A << B[3:0]  (barrel shift)
    OP_SRL    = 5'd12,  // A >> B[3:0]  logical
    OP_SRA    = 5'd13,  // A >>> B[3:0] arithmetic
    OP_SRND   = 5'd14,  // signed shift right with rounding: (A + 2^(B-1)) >>> B
    OP_ABSD   = 5'd15,  // |A - B|, unsigned
    OP_ADD3   = 5'd16,  // A + B + C
    OP_XOR3   = 5'd17,  // A ^ B ^ C
    OP_MIN    = 5'd18,  // signed minimum
    OP_MAX    = 5'd19,  // signed maximum
    OP_ADD8   = 5'd20,  // two 8-bit lanes: A + B per byte
    OP_SUB8   = 5'd21   // two 8-bit lanes: A - B per byte
  } op_e;

  // Source selects of the operand multiplexers (input FIFO, PRE_LINE, GRF, LOR)
  typedef enum logic [1:0] {SRC_FIFO = 2'd0, SRC_PRE = 2'd1, SRC_GRF = 2'd2, SRC_LOR = 2'd3} src_e;
  // LOR input multiplexer
  typedef enum logic [1:0] {LOR_HOLD = 2'd0, LOR_FIFO = 2'd1, LOR_PRE = 2'd2, LOR_SELF = 2'd3} lsrc_e;

  // One RC configuration word (30 of 32 bits used).
  typedef struct packed {
    logic  [1:0] rsvd;
    logic        c_byp;    // C operand: 0 = LOR register, 1 = LOR multiplexer output
    lsrc_e       lor_src;
    logic  [5:0] lor_idx;  // FIFO word or crossbar source of the LOR input
    src_e        b_src;
    logic  [5:0] b_idx;    // FIFO word, crossbar source or GRF entry
    src_e        a_src;
    logic  [5:0] a_idx;
    op_e         op;
  } rc_cfg_t;

  // One configuration layer of an RC: the operation plus the LOR initial value.
  typedef struct packed {
    rc_cfg_t cfg;
    word_t   lor_init;
  } rc_layer_t;

  // Builds one RC configuration word (used when assembling contexts).
  function automatic logic [31:0] rc_word(op_e op, src_e a_src, logic [5:0] a_idx,
                                          src_e b_src, logic [5:0] b_idx,
                                          lsrc_e lor_src = LOR_HOLD, logic [5:0] lor_idx = '0,
                                          logic c_byp = 1'b0);
    rc_cfg_t c;
    c.rsvd    = '0;
    c.c_byp   = c_byp;
    c.lor_src = lor_src;
    c.lor_idx = lor_idx;
    c.b_src   = b_src;
    c.b_idx   = b_idx;
    c.a_src   = a_src;
    c.a_idx   = a_idx;
    c.op      = op;
    return 32'(c);
  endfunction

endpackage
