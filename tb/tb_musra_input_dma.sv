// tb_musra_input_dma: runs the input DMA against a data-memory model that
// refuses requests at random and a FIFO drained at random, and checks that
// rows arrive in order from the requested start row, that the FIFO is never
// overrun, and that busy/done end the transfer after exactly `count` rows.
module tb_musra_input_dma;
  import musra_pkg::*;

  localparam int RW = 10;
  logic clk = 0, rst_n = 0, start = 0;
  logic [RW-1:0] src_row = 0;
  logic [15:0] count = 0;
  logic busy, done, rd_req, rd_gnt, fifo_push, pop = 0;
  logic [RW-1:0] rd_row;
  fifo_row_t rd_data, fifo_data, head;
  logic empty, full;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;
  int checks = 0, failures = 0, n_done = 0, expect_row = 0, n_pushed = 0, n_refused = 0;
  bit gnt_rand;

  musra_input_dma #(.RW(RW)) dut (.*);
  musra_fifo #(.WIDTH($bits(fifo_row_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(fifo_push), .wr_data(fifo_data), .pop, .rd_data(head),
    .empty, .full, .count(fifo_count));

  always #5 clk = ~clk;

  // memory model: row r holds r in every word; one-cycle read latency
  function automatic fifo_row_t row_val(int r); return {32{16'(r)}}; endfunction
  assign rd_gnt = rd_req && gnt_rand;
  always_ff @(posedge clk) if (rd_req && rd_gnt) rd_data <= row_val(int'(rd_row));
  always @(negedge clk) gnt_rand = $urandom_range(0, 3) != 0;

  always @(posedge clk) if (rst_n) begin
    if (rd_req && !rd_gnt) n_refused++;
    if (done) n_done++;
    if (fifo_push) begin
      checks++;
      if (full && !pop) begin failures++; $display("FIFO overrun"); end
      n_pushed++;
    end
    if (pop && !empty) begin
      checks++;
      if (head !== row_val(expect_row)) begin failures++; $display("row %0d wrong", expect_row); end
      expect_row++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      int n;
      n = 20 + 17 * run;
      @(negedge clk);
      start = 1; src_row = RW'(100 * run + 3); count = 16'(n);
      expect_row = 100 * run + 3; n_pushed = 0;
      @(negedge clk);
      start = 0;
      checks++;
      if (!busy) failures++;
      while (busy || !empty) begin
        pop = ((run % 2 == 0) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0)) && !empty;
        @(negedge clk);
      end
      pop = 0;
      checks += 2;
      if (n_pushed != n) begin failures++; $display("pushed %0d of %0d", n_pushed, n); end
      if (n_done != run + 1) begin failures++; $display("done pulses %0d", n_done); end
    end
    checks++;
    if (n_refused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
