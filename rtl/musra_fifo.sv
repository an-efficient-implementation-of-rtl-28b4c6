// musra_fifo: synchronous FIFO used for IN_FIFO and OUT_FIFO.
//
// WIDTH bits wide and DEPTH rows deep; the architecture's FIFOs are 512 bits
// (sixty-four bytes, thirty-two 16-bit words) by 8 rows, so one whole row is
// loaded or stored per cycle. The head row is read combinationally from the
// storage (rd_data is valid whenever !empty), so a row pushed on one edge can
// be popped and consumed by the array on the next. A push and a pop in the
// same cycle are allowed, also when full (the pop frees the slot).
// Pushing into a full FIFO (without a pop) or popping an empty one is a
// protocol error, flagged by assertions. Pointers reset to empty.
module musra_fifo #(
  parameter int unsigned WIDTH = 512,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem_q [DEPTH];
  logic [AW-1:0]    wp_q, rp_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;
  logic             do_push, do_pop;

  assign empty   = (cnt_q == 0);
  assign full    = (cnt_q == CW'(DEPTH));
  assign count   = cnt_q;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign rd_data = mem_q[rp_q];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem_q[wp_q] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wp_q <= incr(wp_q);
      if (do_pop)  rp_q <= incr(rp_q);
      cnt_q <= cnt_q + CW'(do_push) - CW'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
