// musra_input_dma: streams rows of the data memory into IN_FIFO.
//
// On `start` it takes a first row (src_row) and a row count (count) and then
// reads rows src_row, src_row+1, ... from the data memory, one per cycle as
// long as IN_FIFO has room, pushing each row into the FIFO on the cycle its
// read data return. Room is judged from the FIFO fill level plus the read in
// flight, so the FIFO is never overrun. A refused request (the host holds the
// memory port) is repeated. `busy` stays high until all rows are pushed;
// `done` pulses for one cycle then. A start while busy is ignored.
// The block's place between data memory and IN_FIFO is the architecture's;
// its control interface is this design's.
module musra_input_dma
  import musra_pkg::*;
#(
  parameter int unsigned RW = 10,
  parameter int unsigned FIFO_DEPTH_P = FIFO_DEPTH
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [RW-1:0] src_row,
  input  logic [15:0]   count,
  output logic          busy,
  output logic          done,
  // data memory read port
  output logic          rd_req,
  output logic [RW-1:0] rd_row,
  input  logic          rd_gnt,
  input  fifo_row_t     rd_data,
  // IN_FIFO write side
  input  logic [$clog2(FIFO_DEPTH_P+1)-1:0] fifo_count,
  output logic          fifo_push,
  output fifo_row_t     fifo_data
);

  logic [RW-1:0] row_q;
  logic [15:0]   left_rd_q, left_push_q;
  logic          inflight_q;
  logic          room;

  assign room      = (32'(fifo_count) + 32'(inflight_q)) < FIFO_DEPTH_P;
  assign rd_req    = busy && left_rd_q != 0 && room;
  assign rd_row    = row_q;
  assign fifo_push = inflight_q;
  assign fifo_data = rd_data;
  assign busy      = left_push_q != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q       <= '0;
      left_rd_q   <= '0;
      left_push_q <= '0;
      inflight_q  <= 1'b0;
      done        <= 1'b0;
    end else begin
      done       <= 1'b0;
      inflight_q <= rd_req && rd_gnt;
      if (start && !busy) begin
        row_q       <= src_row;
        left_rd_q   <= count;
        left_push_q <= count;
      end else begin
        if (rd_req && rd_gnt) begin
          row_q     <= row_q + 1'b1;
          left_rd_q <= left_rd_q - 1'b1;
        end
        if (inflight_q) begin
          left_push_q <= left_push_q - 1'b1;
          if (left_push_q == 16'd1) done <= 1'b1;
        end
      end
    end
  end

endmodule
