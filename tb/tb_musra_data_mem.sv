// tb_musra_data_mem: mixes host word writes/reads with DMA row writes/reads
// on the data memory and checks the data against a model, including the
// rule that a host access on a port refuses the DMA request on that port.
module tb_musra_data_mem;
  import musra_pkg::*;

  localparam int ROWS_T = 64;   // the memory is exercised over its first rows
  localparam int RW = 10;
  logic clk = 0, rst_n = 0;
  logic h_we = 0, h_re = 0, rd_req = 0, wr_req = 0, rd_gnt, wr_gnt;
  logic [RW+3:0] h_waddr = 0, h_raddr = 0;
  logic [31:0] h_wdata = 0, h_rdata;
  logic [RW-1:0] rd_row = 0, wr_row = 0;
  fifo_row_t rd_data, wr_data = '0;
  fifo_row_t model [ROWS_T];
  int checks = 0, failures = 0, n_refused = 0;

  musra_data_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // initialise with DMA row writes
    for (int r = 0; r < ROWS_T; r++) begin
      @(negedge clk);
      wr_req = 1; wr_row = RW'(r); wr_data = {16{$urandom}}; model[r] = wr_data;
    end
    @(negedge clk); wr_req = 0;
    for (int t = 0; t < 4000; t++) begin
      logic hw, hr, dw, dr;
      logic [3:0] hword_q;
      @(negedge clk);
      hw = $urandom_range(0, 3) == 0; hr = $urandom_range(0, 3) == 0;
      dw = $urandom_range(0, 1) == 0; dr = $urandom_range(0, 1) == 0;
      h_we = hw; h_waddr = {RW'($urandom_range(0, ROWS_T - 1)), 4'($urandom)}; h_wdata = $urandom;
      h_re = hr; h_raddr = {RW'($urandom_range(0, ROWS_T - 1)), 4'($urandom)};
      wr_req = dw; wr_row = RW'($urandom_range(0, ROWS_T - 1)); wr_data = {16{$urandom}};
      rd_req = dr; rd_row = RW'($urandom_range(0, ROWS_T - 1));
      if (hw && wr_row == h_waddr[RW+3:4]) wr_row = RW'((int'(wr_row) + 1) % ROWS_T);
      #1;
      checks += 2;
      if (wr_gnt !== (dw && !hw)) failures++;
      if (rd_gnt !== (dr && !hr)) failures++;
      if ((dw && hw) || (dr && hr)) n_refused++;
      @(posedge clk);
      // read data refer to the contents before this edge's write
      #1;
      if (hr) begin
        checks++;
        if (h_rdata !== model[h_raddr[RW+3:4]][h_raddr[3:0]*32 +: 32]) failures++;
      end
      if (dr && !hr) begin
        checks++;
        if (rd_data !== model[rd_row]) failures++;
      end
      if (hw) model[h_waddr[RW+3:4]][h_waddr[3:0]*32 +: 32] = h_wdata;
      if (dw && !hw) model[wr_row] = wr_data;
    end
    @(negedge clk); h_we = 0; h_re = 0; wr_req = 0; rd_req = 0;
    checks++;
    if (n_refused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
