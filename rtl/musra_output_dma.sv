// musra_output_dma: drains OUT_FIFO into the data memory.
//
// On `start` it takes a first row (dst_row) and a row count (count); then,
// whenever OUT_FIFO holds a row, it requests a row write of the FIFO head to
// the data memory and pops the FIFO in the cycle the write is granted, so
// rows land at dst_row, dst_row+1, ... `busy` stays high until all rows are
// written; `done` pulses for one cycle on the clock after the last write.
// A start while busy is ignored. The block's place between OUT_FIFO and the
// data memory is the architecture's; its control interface is this design's.
module musra_output_dma
  import musra_pkg::*;
#(
  parameter int unsigned RW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [RW-1:0] dst_row,
  input  logic [15:0]   count,
  output logic          busy,
  output logic          done,
  // OUT_FIFO read side
  input  logic          fifo_empty,
  input  fifo_row_t     fifo_data,
  output logic          fifo_pop,
  // data memory write port
  output logic          wr_req,
  output logic [RW-1:0] wr_row,
  output fifo_row_t     wr_data,
  input  logic          wr_gnt
);

  logic [RW-1:0] row_q;
  logic [15:0]   left_q;

  assign busy     = left_q != 0;
  assign wr_req   = busy && !fifo_empty;
  assign wr_row   = row_q;
  assign wr_data  = fifo_data;
  assign fifo_pop = wr_req && wr_gnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q  <= '0;
      left_q <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        row_q  <= dst_row;
        left_q <= count;
      end else if (fifo_pop) begin
        row_q  <= row_q + 1'b1;
        left_q <= left_q - 1'b1;
        if (left_q == 16'd1) done <= 1'b1;
      end
    end
  end

endmodule
