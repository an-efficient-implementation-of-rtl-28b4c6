// tb_musra_top: end-to-end test of the MUSRA array running AES encryption.
//
// A behavioural host on the AHB port plays the role of the system processor.
// It follows the hardware/software split of the AES mapping: key expansion,
// SubBytes and ShiftRows run on the host; AddRoundKey and the combined
// MixColumns + AddRoundKey ("Mix_Add") run on the array, round by round over
// all blocks. The state is stored column-major in the data memory, one state
// column per 512-bit row (bytes in 16-bit words 0..3), grouped so that column
// c of every block is contiguous: each round issues four contexts, one per
// column, whose GRF holds that column's round-key bytes.
// The test encrypts NBLK blocks (the FIPS-197 example block and random ones)
// with a 128-bit key and again with a 256-bit key, and compares every
// ciphertext with the reference model. It also checks the seven-clock latency
// from an IN_FIFO write to the Mix_Add result, and counts how often each
// mechanism happened: input and output stalls, layer swaps, context loads
// overlapping execution, host/DMA memory arbitration; one that never happened
// is a failure. A last context runs a small loop whose iterations each take
// two input rows and give two output rows. All parameters of the top are at
// their defaults.
module tb_musra_top;
  import musra_pkg::*;
  import musra_tb_pkg::*;

  localparam int NBLK   = 128;    // 4*128 input + 4*128 output rows: the whole data memory
  localparam int REG_IN = 0;      // data-memory regions (rows)
  localparam int REG_OUT = 512;

  logic        hclk = 0, hresetn = 0, hsel = 0, hwrite = 0, hready;
  logic [31:0] haddr = 0, hwdata = 0, hrdata;
  logic [1:0]  htrans = 0;
  logic [2:0]  hsize = 3'd2;
  logic        hreadyout, hresp, ctx_done;
  int checks = 0, failures = 0;
  longint cycle = 0;

  assign hready = hreadyout;

  musra_top dut (.*);

  always #5 hclk = ~hclk;
  always @(posedge hclk) cycle <= cycle + 1;

  initial begin
    repeat (2_000_000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ AHB host
  task automatic ahb_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge hclk);
    hsel = 1; htrans = 2'b10; hwrite = 1; haddr = a;
    @(negedge hclk);
    hsel = 0; htrans = 2'b00; hwrite = 0; hwdata = d;
  endtask

  task automatic ahb_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge hclk);
    hsel = 1; htrans = 2'b10; hwrite = 0; haddr = a;
    @(negedge hclk);
    hsel = 0; htrans = 2'b00;
    d = hrdata;
  endtask

  function automatic logic [31:0] cm_addr(int word); return 32'h0010_0000 | 32'(word * 4); endfunction
  function automatic logic [31:0] dm_addr(int row, int word); return 32'h0020_0000 | 32'((row * 16 + word) * 4); endfunction

  int n_cmd = 0;
  logic [31:0] st;

  task automatic wait_taken();
    do ahb_read(32'h4, st); while (st[0]);
  endtask

  task automatic wait_done(input int n);
    do ahb_read(32'h4, st); while (int'(st[31:16]) < n);
  endtask

  // contexts are written only while the array and the parser are idle
  task automatic write_ctx(input int slot, input ctx_t ctx);
    for (int w = 0; w < CTX_WORDS; w++)
      if (w < 96 || ctx[w] != 0) ahb_write(cm_addr(slot * CTX_WORDS + w), ctx[w]);
  endtask

  // commands go out back to back: the next context loads while one runs
  task automatic issue(input int slot);
    wait_taken();
    ahb_write(32'h0, 32'(slot));
    n_cmd++;
  endtask

  // ------------------------------------------------------------ monitors
  int n_arb = 0, lat_first = -1;
  longint t_push = -1;
  bit lat_armed = 0;
  always @(posedge hclk) begin
    if ((dut.dm_wr_req && !dut.dm_wr_gnt) || (dut.dm_rd_req && !dut.dm_rd_gnt)) n_arb++;
    if (lat_armed && dut.in_push && t_push < 0) t_push = cycle;
    if (lat_armed && t_push >= 0 && dut.u_parser.vld_q[5] && lat_first < 0) lat_first = int'(cycle - t_push);
  end


  // ------------------------------------------------------------ multi-row loop
  // The loop body of the architecture's execution-model example: two input
  // rows per iteration (x, y then z, t) and two output rows (v, then w = v
  // passed one stage on), so a new iteration starts every second cycle.
  //   row 0: x * y   row 1: + z, LOR <- t   row 2: & t   row 3: - GRF0 (35) = v
  //   row 4: pass A = w
  localparam int NL = 40;
  task automatic run_loop();
    ctx_t ctx;
    logic [15:0] x [NL], y [NL], z [NL], t [NL], v;
    logic [31:0] d;
    int base_done;
    foreach (ctx[i]) ctx[i] = '0;
    ctx[0]  = rc_word(OP_MUL, SRC_FIFO, 6'd0, SRC_FIFO, 6'd1);
    ctx[8]  = rc_word(OP_ADD, SRC_PRE, 6'd0, SRC_FIFO, 6'd0, LOR_FIFO, 6'd1);
    ctx[16] = rc_word(OP_AND, SRC_PRE, 6'd0, SRC_PRE, 6'd8);
    ctx[24] = rc_word(OP_SUB, SRC_PRE, 6'd0, SRC_GRF, 6'd0);
    ctx[32] = rc_word(OP_PASSA, SRC_PRE, 6'd0, SRC_FIFO, 6'd0);
    ctx[W_GRF]     = 32'd35;
    ctx[W_CTRL]    = {7'd0, 3'd1, 3'd1, 3'd3, 16'(NL)};  // N_O = 2, N_I = 2, first output row 3
    ctx[W_INADDR]  = 32'd0;
    ctx[W_OUTADDR] = 32'd512;
    write_ctx(5, ctx);
    for (int i = 0; i < NL; i++) begin
      x[i] = 16'($urandom); y[i] = 16'($urandom); z[i] = 16'($urandom); t[i] = 16'($urandom);
      ahb_write(dm_addr(2*i, 0), {y[i], x[i]});
      ahb_write(dm_addr(2*i + 1, 0), {t[i], z[i]});
    end
    base_done = n_cmd;
    issue(5);
    wait_done(base_done + 1);
    for (int i = 0; i < NL; i++) begin
      v = ((x[i] * y[i]) + z[i]) & t[i];
      v = v - 16'd35;
      for (int k = 0; k < 2; k++) begin
        ahb_read(dm_addr(512 + 2*i + k, 0), d);
        checks++;
        if (d[15:0] !== v) begin
          failures++;
          if (failures < 10) $display("loop iteration %0d output %0d: got %h expected %h", i, k, d[15:0], v);
        end
      end
    end
  endtask

  // ------------------------------------------------------------ AES run
  byte_t sb [256];
  block_t blk [NBLK], ref_ct [NBLK];

  task automatic run_aes(input byte_t key [32], input int nk);
    byte_t rk [240];
    int nr = nk + 6;
    ctx_t ctx;
    byte_t kc [4];
    logic [31:0] d0, d1;
    int base_done;
    key_expand(key, nk, rk);
    for (int b = 0; b < NBLK; b++) begin
      ref_ct[b] = blk[b];
      aes_encrypt(ref_ct[b], rk, nr);
    end
    // plaintext to the data memory
    for (int b = 0; b < NBLK; b++)
      for (int c = 0; c < 4; c++) begin
        ahb_write(dm_addr(REG_IN + c*NBLK + b, 0), {8'h00, blk[b][4*c+1], 8'h00, blk[b][4*c]});
        ahb_write(dm_addr(REG_IN + c*NBLK + b, 1), {8'h00, blk[b][4*c+3], 8'h00, blk[b][4*c+2]});
      end
    for (int r = 0; r <= nr; r++) begin
      base_done = n_cmd;
      for (int c = 0; c < 4; c++) begin
        for (int j = 0; j < 4; j++) kc[j] = rk[16*r + 4*c + j];
        if (r == 0 || r == nr) ark_ctx(ctx, kc, NBLK, REG_IN + c*NBLK, REG_OUT + c*NBLK);
        else                   mixadd_ctx(ctx, kc, NBLK, REG_IN + c*NBLK, REG_OUT + c*NBLK);
        write_ctx(c, ctx);
      end
      for (int c = 0; c < 4; c++) begin
        if (r == 1 && c == 0) lat_armed = 1;
        issue(c);
        // once per run: occupy the data-memory write port so OUT_FIFO backs up;
        // the rows written hold column-0 input that context 0 has already consumed
        // and that the host overwrites after this round
        if (r == 2 && c == 3) repeat (200) ahb_write(dm_addr(REG_IN, 0), 32'hDEAD_BEEF);
      end
      wait_done(base_done + 4);
      // host: read the round's result, SubBytes + ShiftRows, write back
      for (int b = 0; b < NBLK; b++) begin
        block_t s;
        for (int c = 0; c < 4; c++) begin
          ahb_read(dm_addr(REG_OUT + c*NBLK + b, 0), d0);
          ahb_read(dm_addr(REG_OUT + c*NBLK + b, 1), d1);
          s[4*c] = d0[7:0]; s[4*c+1] = d0[23:16]; s[4*c+2] = d1[7:0]; s[4*c+3] = d1[23:16];
        end
        if (r == nr) begin
          for (int j = 0; j < 16; j++) begin
            checks++;
            if (s[j] !== ref_ct[b][j]) begin
              failures++;
              if (failures < 10) $display("nk=%0d block %0d byte %0d: got %h expected %h", nk, b, j, s[j], ref_ct[b][j]);
            end
          end
        end else begin
          block_t t;
          for (int cc = 0; cc < 4; cc++)
            for (int rr = 0; rr < 4; rr++)
              t[4*cc + rr] = sb[s[4*((cc + rr) % 4) + rr]];
          for (int c = 0; c < 4; c++) begin
            ahb_write(dm_addr(REG_IN + c*NBLK + b, 0), {8'h00, t[4*c+1], 8'h00, t[4*c]});
            ahb_write(dm_addr(REG_IN + c*NBLK + b, 1), {8'h00, t[4*c+3], 8'h00, t[4*c+2]});
          end
        end
      end
    end
  endtask

  initial begin
    byte_t key [32];
    logic [31:0] s1, s2;
    for (int i = 0; i < 256; i++) sb[i] = sbox(byte_t'(i));
    for (int b = 0; b < NBLK; b++)
      for (int j = 0; j < 16; j++) blk[b][j] = (b == 0) ? byte_t'(8'h11 * (j % 16)) : byte_t'($urandom);
    for (int j = 0; j < 32; j++) key[j] = byte_t'(j);
    repeat (3) @(negedge hclk);
    hresetn = 1;
    // FIPS-197 C.1 / C.3: plaintext 00112233..ff, key 000102..
    run_aes(key, 4);
    checks++;
    if (ref_ct[0][0] !== 8'h69 || ref_ct[0][15] !== 8'h5a) begin
      failures++; $display("reference model disagrees with FIPS-197 AES-128 example");
    end
    run_aes(key, 8);
    checks++;
    if (ref_ct[0][0] !== 8'h8e || ref_ct[0][15] !== 8'h89) begin
      failures++; $display("reference model disagrees with FIPS-197 AES-256 example");
    end
    run_loop();
    ahb_read(32'h8, s1);
    ahb_read(32'hC, s2);
    $display("contexts=%0d input-stall cycles=%0d output-stall cycles=%0d swaps=%0d overlapped loads=%0d arbitration waits=%0d latency=%0d cycles=%0d",
             n_cmd, s1[15:0], s1[31:16], s2[15:0], s2[31:16], n_arb, lat_first, cycle);
    checks++; if (s1[15:0] == 0)  begin failures++; $display("no input stall happened"); end
    checks++; if (s1[31:16] == 0) begin failures++; $display("no output stall happened"); end
    checks++; if (s2[15:0] != 16'(n_cmd)) begin failures++; $display("swap count %0d != %0d", s2[15:0], n_cmd); end
    checks++; if (s2[31:16] == 0) begin failures++; $display("no load overlapped execution"); end
    checks++; if (n_arb == 0)     begin failures++; $display("no memory arbitration happened"); end
    checks++; if (lat_first != 7) begin failures++; $display("latency %0d, expected 7", lat_first); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
