// tb_musra_fifo: drives the 512-bit x 8 FIFO with random pushes and pops
// (including push and pop together when full) and compares every popped row,
// the fill level and the empty/full flags with a queue model.
module tb_musra_fifo;
  import musra_pkg::*;

  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  fifo_row_t wr_data = '0, rd_data;
  logic empty, full;
  logic [$clog2(FIFO_DEPTH+1)-1:0] count;
  fifo_row_t q [$];
  int checks = 0, failures = 0, n_full = 0, n_both_full = 0;

  musra_fifo #(.WIDTH($bits(fifo_row_t)), .DEPTH(FIFO_DEPTH)) dut (.*);

  always #5 clk = ~clk;

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
    for (int t = 0; t < 3000; t++) begin
      int bias;
      bias = (t / 300) % 2;          // alternate filling and draining phases
      @(negedge clk);
      checks += 3;
      if (count !== 4'(q.size())) failures++;
      if (empty !== (q.size() == 0)) failures++;
      if (full !== (q.size() == FIFO_DEPTH)) failures++;
      if (full) n_full++;
      push = ($urandom_range(0, 9) < (bias ? 3 : 7)) && (!full || 1'b1);
      pop  = ($urandom_range(0, 9) < (bias ? 7 : 3)) && !empty;
      if (full && !pop) push = 0;
      if (full && push && pop) n_both_full++;
      wr_data = {16{$urandom}};
      if (pop) begin
        checks++;
        if (rd_data !== q[0]) begin failures++; if (failures < 10) $display("pop mismatch at %0d", t); end
      end
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wr_data);
    end
    @(negedge clk); push = 0; pop = 0;
    checks++;
    if (n_full == 0 || n_both_full == 0) begin failures++; $display("full cases not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
