// musra_tb_pkg: shared verification helpers for the MUSRA testbenches.
//
// - An AES reference model (FIPS-197) written from the cipher's definition:
//   GF(2^8) arithmetic, the S-box computed as the affine map of the field
//   inverse, key expansion for 128/192/256-bit keys and block encryption.
// - Builders for the two AES contexts of the array:
//     mixadd_ctx  one state column per iteration: MixColumns followed by
//                 AddRoundKey with the four key bytes K0..K3 held in GRF 3..6,
//                 GRF 0..2 holding the constants 0x07, 0x01, 0x1B. Six rows:
//                 t = xi ^ xi+1, u = xi+1 ^ xi+2 ^ xi+3, v = t << 1,
//                 b = (t >> 7) & 1, m = b * 0x1B, w = v ^ m,
//                 y = w ^ (u ^ K). Results on PE_OUT of row 5, columns 0..3
//                 (16-bit; the low byte is the AES byte, bit 8 is t's top bit).
//     ark_ctx     AddRoundKey only: row 0 XORs FIFO words 0..3 with GRF 3..6.
//   Input rows carry one state column in FIFO words 0..3 (one byte per word).
package musra_tb_pkg;
  import musra_pkg::*;

  typedef logic [7:0]  byte_t;
  typedef byte_t       block_t [16];
  typedef logic [31:0] ctx_t [CTX_WORDS];

  function automatic byte_t xtime(byte_t x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = xtime(a);
    end
    return p;
  endfunction

  function automatic byte_t sbox(byte_t x);
    localparam byte_t C = 8'h63;
    byte_t inv = 0, s;
    if (x != 0)
      for (int c = 1; c < 256; c++)
        if (gmul(x, byte_t'(c)) == 8'h01) inv = byte_t'(c);
    s = inv;
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ C[i];
    return s;
  endfunction

  // state byte order: s[4*c + r] is row r, column c (input byte order)
  function automatic void sub_shift(ref block_t s);
    block_t t;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        t[4*c + r] = sbox(s[4*((c + r) % 4) + r]);
    s = t;
  endfunction

  function automatic void mix_columns(ref block_t s);
    block_t t;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        t[4*c + r] = gmul(8'h02, s[4*c + r]) ^ gmul(8'h03, s[4*c + (r+1)%4])
                   ^ s[4*c + (r+2)%4] ^ s[4*c + (r+3)%4];
    s = t;
  endfunction

  // round keys: rk[16*i + j], i = 0..nr; nk = 4, 6 or 8 key words
  function automatic void key_expand(input byte_t key [32], input int nk, ref byte_t rk [240]);
    int nr = nk + 6;
    byte_t w [240];
    byte_t rcon = 8'h01;
    byte_t tmp [4];
    for (int i = 0; i < 4*nk; i++) w[i] = key[i];
    for (int i = nk; i < 4*(nr+1); i++) begin
      for (int j = 0; j < 4; j++) tmp[j] = w[4*(i-1) + j];
      if (i % nk == 0) begin
        byte_t t0 = tmp[0];
        tmp[0] = sbox(tmp[1]) ^ rcon;
        tmp[1] = sbox(tmp[2]);
        tmp[2] = sbox(tmp[3]);
        tmp[3] = sbox(t0);
        rcon = xtime(rcon);
      end else if (nk > 6 && i % nk == 4) begin
        for (int j = 0; j < 4; j++) tmp[j] = sbox(tmp[j]);
      end
      for (int j = 0; j < 4; j++) w[4*i + j] = w[4*(i-nk) + j] ^ tmp[j];
    end
    rk = w;
  endfunction

  function automatic void aes_encrypt(ref block_t s, input byte_t rk [240], input int nr);
    for (int j = 0; j < 16; j++) s[j] ^= rk[j];
    for (int r = 1; r <= nr; r++) begin
      sub_shift(s);
      if (r != nr) mix_columns(s);
      for (int j = 0; j < 16; j++) s[j] ^= rk[16*r + j];
    end
  endfunction

  // ------------------------------------------------------------ contexts
  function automatic void ctx_common(ref ctx_t ctx, input byte_t k [4], input int n,
                                     input int in_row, input int out_row, input int orow);
    ctx[W_GRF + 0] = {16'h0001, 16'h0007};        // GRF0 = 7, GRF1 = 1
    ctx[W_GRF + 1] = {8'h00, k[0], 16'h001B};      // GRF2 = 0x1B, GRF3 = K0
    ctx[W_GRF + 2] = {8'h00, k[2], 8'h00, k[1]};   // GRF4 = K1, GRF5 = K2
    ctx[W_GRF + 3] = {24'h0, k[3]};                // GRF6 = K3
    ctx[W_CTRL]    = {13'd0, 3'(orow), 16'(n)};
    ctx[W_INADDR]  = 32'(in_row);
    ctx[W_OUTADDR] = 32'(out_row);
  endfunction

  function automatic void mixadd_ctx(ref ctx_t ctx, input byte_t k [4], input int n,
                                     input int in_row, input int out_row);
    foreach (ctx[i]) ctx[i] = '0;
    for (int j = 0; j < 4; j++) begin
      // row 0: t_j = x_j ^ x_j+1, LOR <- x_j+3
      ctx[0*8 + j]     = rc_word(OP_XOR, SRC_FIFO, 6'(j), SRC_FIFO, 6'((j+1)%4), LOR_FIFO, 6'((j+3)%4));
      // row 1: u_j = t_j+2 ^ x_j+1 (LOR of column j+2), LOR <- t_j ; t_j >> 7
      ctx[1*8 + j]     = rc_word(OP_XOR, SRC_PRE, 6'((j+2)%4), SRC_PRE, 6'(8 + (j+2)%4), LOR_PRE, 6'(j));
      ctx[1*8 + 4 + j] = rc_word(OP_SRL, SRC_PRE, 6'(j), SRC_GRF, 6'd0);
      // row 2: v_j = t_j << 1, LOR <- u_j ; b_j = (t_j >> 7) & 1
      ctx[2*8 + j]     = rc_word(OP_SLL, SRC_PRE, 6'(8 + j), SRC_GRF, 6'd1, LOR_PRE, 6'(j));
      ctx[2*8 + 4 + j] = rc_word(OP_AND, SRC_PRE, 6'(4 + j), SRC_GRF, 6'd1);
      // row 3: idle PE, LOR <- u_j ; m_j = b_j * 0x1B, LOR <- v_j
      ctx[3*8 + j]     = rc_word(OP_NOP, SRC_FIFO, 6'd0, SRC_FIFO, 6'd0, LOR_PRE, 6'(8 + j));
      ctx[3*8 + 4 + j] = rc_word(OP_MUL, SRC_PRE, 6'(4 + j), SRC_GRF, 6'd2, LOR_PRE, 6'(j));
      // row 4: u_j ^ K_j ; w_j = m_j ^ v_j
      ctx[4*8 + j]     = rc_word(OP_XOR, SRC_PRE, 6'(8 + j), SRC_GRF, 6'(3 + j));
      ctx[4*8 + 4 + j] = rc_word(OP_XOR, SRC_PRE, 6'(4 + j), SRC_PRE, 6'(12 + j));
      // row 5: y_j = w_j ^ (u_j ^ K_j)
      ctx[5*8 + j]     = rc_word(OP_XOR, SRC_PRE, 6'(4 + j), SRC_PRE, 6'(j));
    end
    ctx_common(ctx, k, n, in_row, out_row, 5);
  endfunction

  function automatic void ark_ctx(ref ctx_t ctx, input byte_t k [4], input int n,
                                  input int in_row, input int out_row);
    foreach (ctx[i]) ctx[i] = '0;
    for (int j = 0; j < 4; j++)
      ctx[j] = rc_word(OP_XOR, SRC_FIFO, 6'(j), SRC_GRF, 6'(3 + j));
    ctx_common(ctx, k, n, in_row, out_row, 0);
  endfunction

endpackage
