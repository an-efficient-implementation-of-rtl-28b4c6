// tb_musra_output_dma: fills a FIFO with numbered rows at random times,
// lets the output DMA drain it into a memory model that refuses writes at
// random, and checks that each row lands at dst_row + its number, that
// exactly `count` rows are written and that busy/done end the transfer:
// done must pulse on the clock after the last write, with busy already low.
module tb_musra_output_dma;
  import musra_pkg::*;

  localparam int RW = 10;
  logic clk = 0, rst_n = 0, start = 0, push = 0;
  logic [RW-1:0] dst_row = 0;
  logic [15:0] count = 0;
  logic busy, done, fifo_pop, wr_req, wr_gnt, empty, full;
  logic [RW-1:0] wr_row;
  fifo_row_t fifo_data, wr_data, push_data = '0;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fcount;
  int checks = 0, failures = 0, n_written = 0, n_done = 0, base = 0, n_refused = 0;
  bit gnt_rand;

  musra_output_dma #(.RW(RW)) dut (.*, .fifo_empty(empty));
  musra_fifo #(.WIDTH($bits(fifo_row_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push, .wr_data(push_data), .pop(fifo_pop), .rd_data(fifo_data),
    .empty, .full, .count(fcount));

  always #5 clk = ~clk;
  assign wr_gnt = wr_req && gnt_rand;
  always @(negedge clk) gnt_rand = $urandom_range(0, 2) != 0;

  always @(posedge clk) if (rst_n) begin
    if (wr_req && !wr_gnt) n_refused++;
    if (done) begin
      n_done++;
      checks++;
      if (n_written != int'(count) || busy) begin
        failures++; $display("done with %0d of %0d rows written", n_written, count);
      end
    end
    if (wr_req && wr_gnt) begin
      checks++;
      if (int'(wr_row) != base + int'(wr_data[15:0])) begin
        failures++; $display("row %0d carries item %0d", wr_row, wr_data[15:0]);
      end
      n_written++;
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
    for (int run = 0; run < 3; run++) begin
      int n, sent;
      n = 30 + 11 * run; sent = 0;
      @(negedge clk);
      start = 1; base = 200 * run + 5; dst_row = RW'(base); count = 16'(n); n_written = 0;
      @(negedge clk);
      start = 0;
      while (sent < n) begin
        push = !full && $urandom_range(0, 1) == 0;
        push_data = {32{16'(sent)}};
        @(negedge clk);
        if (push) sent++;
      end
      push = 0;
      while (busy) @(negedge clk);
      @(negedge clk);
      checks += 3;
      if (n_written != n) begin failures++; $display("wrote %0d of %0d", n_written, n); end
      if (!empty) failures++;
      if (n_done != run + 1) begin failures++; $display("done pulses %0d", n_done); end
    end
    checks++;
    if (n_refused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
