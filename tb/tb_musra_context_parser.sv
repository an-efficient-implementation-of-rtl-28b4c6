// tb_musra_context_parser: checks loading and execution control.
//
// Two random contexts are stored in a context memory. The test issues the
// first, and while it runs issues the second, so the second loads behind
// execution. It checks every configuration, GRF and LOR write against the
// stored words (address decoding and target layer), that the swap waits
// until the running context has finished, the DMA start values, and during
// execution that exactly N rows are popped and N results pushed, each result
// exactly out_row+1 advancing cycles after its input row was popped, with
// random input starvation and output back-pressure (stalls). A third context
// takes three input rows and gives two output rows per iteration: its rows
// must be popped back to back, iterations must start three advancing cycles
// apart, and outputs must come from rows 4 and 5 at their due cycles.
module tb_musra_context_parser;
  import musra_pkg::*;

  localparam int NCTX = 4, RW = 10;
  localparam int AW = $clog2(NCTX * CTX_WORDS);
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  logic [1:0] cmd_ctx = 0;
  logic cm_re; logic [AW-1:0] cm_addr; logic [31:0] cm_rdata;
  logic h_we = 0; logic [AW-1:0] h_waddr = 0; logic [31:0] h_wdata = 0, h_rdata;
  logic cfg_we, cfg_lor_we, cfg_layer, act_layer, swap;
  logic [2:0] cfg_row, cfg_col, out_row;
  rc_cfg_t cfg_word; logic [31:0] cfg_lor;
  logic grf_we; logic [3:0] grf_pair; logic [31:0] grf_data;
  logic dma_start, out_dma_done = 0; logic [RW-1:0] in_row, out_row_addr; logic [15:0] in_count, out_count;
  logic in_empty = 1, in_pop, out_full = 0, out_push, rca_en;
  logic loading, pending, running, done;
  logic [15:0] n_done, n_stall_in, n_stall_out, n_swap, n_preload;
  logic [31:0] ctx [NCTX][CTX_WORDS];
  int checks = 0, failures = 0;

  musra_context_parser #(.NCTX(NCTX), .RW(RW)) dut (.*);
  musra_context_mem #(.NCTX(NCTX)) u_cm (
    .clk, .h_we, .h_waddr, .h_wdata, .h_re(1'b0), .h_raddr('0), .h_rdata,
    .p_re(cm_re), .p_addr(cm_addr), .p_rdata(cm_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s at %0t", what, $time); end
  endtask

  // decoded writes are checked against the context being loaded
  int cur = 0, n_cfg = 0, n_lor = 0, n_grf = 0;
  always @(posedge clk) if (rst_n) begin
    if (cfg_we) begin
      n_cfg++;
      chk("cfg word", 32'(cfg_word) == ctx[cur][int'(cfg_row) * 8 + int'(cfg_col)]);
      chk("cfg layer", cfg_layer == !act_layer);
    end
    if (cfg_lor_we) begin
      n_lor++;
      chk("lor col even", cfg_col[0] == 1'b0);
      chk("lor word", cfg_lor == ctx[cur][W_LOR + int'(cfg_row) * 4 + int'(cfg_col) / 2]);
    end
    if (grf_we) begin
      n_grf++;
      chk("grf word", grf_data == ctx[cur][W_GRF + int'(grf_pair)]);
    end
  end

  // execution model: the first pop of an iteration (on advancing cycle e)
  // queues its N_O results, output k due on cycle e + first + k + 1 from row
  // first + k; the pops of one iteration are on successive advancing cycles
  // and iterations start max(N_I, N_O) advancing cycles apart
  int en_cnt = 0, pops = 0, pushes = 0;
  int ni = 1, no = 1, orow = 0, last_first = -1, last_pop = -1;
  int q_t [$], q_r [$];
  always @(posedge clk) if (rst_n) begin
    if (in_pop) begin
      chk("pop when empty", !in_empty);
      if (pops % ni == 0) begin
        if (last_first >= 0)
          chk("issue interval", en_cnt - last_first == ((ni > no) ? ni : no));
        last_first = en_cnt;
        for (int k = 0; k < no; k++) begin
          q_t.push_back(en_cnt + orow + k + 1); q_r.push_back(orow + k);
        end
      end else
        chk("iteration rows back to back", en_cnt == last_pop + 1);
      last_pop = en_cnt;
      pops++;
    end
    if (out_push) begin
      chk("push when full", !out_full);
      chk("result timing", q_t.size() > 0 && en_cnt == q_t[0] && int'(out_row) == q_r[0]);
      if (q_t.size() > 0 && (en_cnt != q_t[0] || int'(out_row) != q_r[0]))
        $display("push at %0d row %0d, expected %0d row %0d", en_cnt, out_row, q_t[0], q_r[0]);
      if (q_t.size() > 0) begin void'(q_t.pop_front()); void'(q_r.pop_front()); end
      pushes++;
    end
    if (rca_en) en_cnt++;
  end

  task automatic run_ctx(input int n);
    pops = 0; pushes = 0; last_first = -1;
    while (pushes < n * no) begin
      @(negedge clk);
      in_empty = $urandom_range(0, 3) == 0;
      out_full = $urandom_range(0, 4) == 0;
    end
    @(negedge clk);
    in_empty = 1; out_full = 0;
    repeat (3) @(negedge clk);
    chk("pops == N * N_I", pops == n * ni);
    chk("no extra push", pushes == n * no);
    out_dma_done = 1;
    @(negedge clk);
    out_dma_done = 0;
  endtask

  initial begin
    int n0, n1;
    n0 = 150; n1 = 25;
    for (int c = 0; c < NCTX; c++)
      for (int w = 0; w < CTX_WORDS; w++) ctx[c][w] = $urandom;
    ctx[1][W_CTRL] = {13'd0, 3'd5, 16'(n0)};
    ctx[2][W_CTRL] = {13'd0, 3'd2, 16'(n1)};
    ctx[3][W_CTRL] = {7'd0, 3'd1, 3'd2, 3'd4, 16'(n1)};   // N_O = 2, N_I = 3, rows 4 and 5
    for (int c = 0; c < NCTX; c++) begin
      ctx[c][W_INADDR] = 32'(10 * c); ctx[c][W_OUTADDR] = 32'(500 + c);
    end
    for (int c = 0; c < NCTX; c++)
      for (int w = 0; w < CTX_WORDS; w++) begin
        @(negedge clk); h_we = 1; h_waddr = AW'(c * CTX_WORDS + w); h_wdata = ctx[c][w];
      end
    @(negedge clk); h_we = 0;
    rst_n = 1;
    // first context
    @(negedge clk); cmd_valid = 1; cmd_ctx = 2'd1; cur = 1; orow = 5;
    @(negedge clk); cmd_valid = 0;
    while (!swap) @(negedge clk);
    chk("dma start", dma_start && in_row == 10 && out_row_addr == 501 && in_count == 16'(n0) && out_count == 16'(n0));
    chk("writes decoded", n_cfg == 64 && n_lor == 32 && n_grf == 16);
    @(negedge clk);
    chk("running", running && act_layer == 1'b1);
    // second context loads behind the first
    cmd_valid = 1; cmd_ctx = 2'd2; cur = 2;
    @(negedge clk); cmd_valid = 0;
    fork
      run_ctx(n0);
      begin
        while (!pending) @(negedge clk);
        chk("second load finished while first runs", running);
      end
    join
    while (!swap) @(negedge clk);
    chk("swap after done", n_done == 16'd1 && dma_start && in_count == 16'(n1));
    @(negedge clk);
    chk("layer flipped back", act_layer == 1'b0 && out_row == 3'd2);
    orow = 2;
    run_ctx(n1);
    @(negedge clk);
    chk("two done", n_done == 16'd2 && !running && n_swap == 16'd2);
    // multi-row iterations: three input rows and two output rows each
    cmd_valid = 1; cmd_ctx = 2'd3; cur = 3;
    @(negedge clk); cmd_valid = 0;
    while (!swap) @(negedge clk);
    chk("multi-row DMA counts", in_count == 16'(3 * n1) && out_count == 16'(2 * n1));
    @(negedge clk);
    ni = 3; no = 2; orow = 4;
    run_ctx(n1);
    @(negedge clk);
    chk("three done", n_done == 16'd3 && !running);
    chk("stalls counted", n_stall_in > 0 && n_stall_out > 0);
    chk("overlap counted", n_preload == 16'd1);
    chk("multi-row context ran", pops == 3 * n1 && pushes == 2 * n1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
