// tb_musra_rca: self-checking test of the 8 x 8 array.
//
// Loads the AES Mix_Add context (MixColumns + AddRoundKey, six pipeline rows)
// into layer 1 while layer 0 is active, swaps, and streams random state
// columns through the array, one per clock. Each PE_OUT of row 5 is compared,
// six clocks after its column entered, with the byte computed by the AES
// reference model (low byte) and with the top bit of x_j ^ x_j+1 (bit 8).
// It then stalls the array for a few cycles (en low) and checks that the
// outputs hold, and checks that a second swap loads LOR initial values that
// an RC can use as an operand.
module tb_musra_rca;
  import musra_pkg::*;
  import musra_tb_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic cfg_we = 0, cfg_lor_we = 0, cfg_layer = 0, act_layer = 0, swap = 0;
  logic [2:0] cfg_row = 0, cfg_col = 0;
  rc_cfg_t cfg_word = '0;
  logic [31:0] cfg_lor = 0;
  fifo_row_t fifo_row = '0;
  word_t [GRF_N-1:0] grf;
  word_t [ROWS-1:0][COLS-1:0] pe_out, lor_out;
  int checks = 0, failures = 0, cycle = 0;

  musra_rca dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_ctx(input ctx_t ctx, input logic layer);
    for (int w = 0; w < 64; w++) begin
      @(negedge clk);
      cfg_we = 1; cfg_layer = layer; cfg_row = 3'(w / 8); cfg_col = 3'(w % 8);
      cfg_word = rc_cfg_t'(ctx[w]);
    end
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      cfg_we = 0; cfg_lor_we = 1; cfg_row = 3'(i / 4); cfg_col = 3'(2 * (i % 4));
      cfg_lor = ctx[W_LOR + i];
    end
    @(negedge clk);
    cfg_we = 0; cfg_lor_we = 0;
  endtask

  localparam int NCOL = 40;
  byte_t xin [NCOL][4];
  byte_t key [4];
  ctx_t ctx;

  initial begin
    for (int i = 0; i < GRF_N; i++) grf[i] = '0;
    for (int j = 0; j < 4; j++) key[j] = byte_t'($urandom);
    grf[0] = 16'h0007; grf[1] = 16'h0001; grf[2] = 16'h001B;
    for (int j = 0; j < 4; j++) grf[3+j] = {8'h00, key[j]};
    for (int i = 0; i < NCOL; i++) for (int j = 0; j < 4; j++) xin[i][j] = byte_t'($urandom);
    mixadd_ctx(ctx, key, NCOL, 0, 0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    load_ctx(ctx, 1'b1);
    // swap to layer 1 (the active layer register lives in the parser; here the testbench)
    @(negedge clk); swap = 1;
    @(negedge clk); swap = 0; act_layer = 1;
    // stream columns; output of column i is on row 5 after 6 edges
    fork
      begin
        for (int i = 0; i < NCOL + 6; i++) begin
          fifo_row = '0;
          if (i < NCOL) for (int j = 0; j < 4; j++) fifo_row[j*DW +: DW] = {8'h00, xin[i][j]};
          en = 1;
          @(negedge clk);
        end
        en = 0;
      end
      begin
        @(negedge clk);   // column 0 entered row 0 on the edge before this point
        repeat (5) @(negedge clk);
        for (int i = 0; i < NCOL; i++) begin
          block_t s;
          for (int j = 0; j < 4; j++) s[j] = xin[i][j];
          for (int j = 4; j < 16; j++) s[j] = 0;
          mix_columns(s);
          for (int j = 0; j < 4; j++) begin
            logic [15:0] exp16;
            exp16 = {7'd0, xin[i][j][7] ^ xin[i][(j+1)%4][7], s[j] ^ key[j]};
            checks++;
            if (pe_out[5][j] !== exp16) begin
              failures++;
              if (failures < 10) $display("col %0d byte %0d: got %h expected %h", i, j, pe_out[5][j], exp16);
            end
          end
          @(negedge clk);
        end
      end
    join
    // stall: outputs must hold while en is low
    begin
      word_t held;
      held = pe_out[5][0];
      fifo_row = '1;
      repeat (3) @(negedge clk);
      checks++;
      if (pe_out[5][0] !== held) begin failures++; $display("stall did not hold row 5"); end
    end
    // LOR initial values: layer 0 gets a context where RC(0,0) adds FIFO word 0 to its LOR
    foreach (ctx[i]) ctx[i] = '0;
    ctx[0] = rc_word(OP_ADD, SRC_FIFO, 6'd0, SRC_LOR, 6'd0);
    ctx[W_LOR] = 32'h0000_1234;
    load_ctx(ctx, 1'b0);
    @(negedge clk); swap = 1;
    @(negedge clk); swap = 0; act_layer = 0;
    checks++;
    if (lor_out[0][0] !== 16'h1234) begin failures++; $display("LOR init not loaded: %h", lor_out[0][0]); end
    fifo_row = '0; fifo_row[15:0] = 16'h0101; en = 1;
    @(negedge clk); en = 0;
    checks++;
    if (pe_out[0][0] !== 16'h1335) begin failures++; $display("LOR operand: got %h", pe_out[0][0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
