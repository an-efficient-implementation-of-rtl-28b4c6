// musra_ahb_if: AHB-Lite slave port between the system bus and MUSRA.
//
// The host processor reaches everything in the array through this port:
// the context memory (to store contexts, including run-time constants), the
// data memory (to place input data and collect results) and a few control
// and status registers. Address map (byte addresses, 32-bit accesses only):
//   HADDR[21:20] = 0  registers: 0x00 CMD    write: start context WDATA[7:0]
//                                0x04 STATUS read: [0] command not yet taken
//                                     by the parser or context waiting to run,
//                                     [1] array running, [2] parser loading,
//                                     [31:16] contexts completed
//                                0x08 stall cycles: [15:0] input, [31:16] output
//                                0x0C [15:0] layer swaps, [31:16] loads that
//                                     overlapped execution
//   HADDR[21:20] = 1  context memory, word HADDR[19:2]
//   HADDR[21:20] = 2  data memory, word HADDR[19:2] (row = word / 16)
// Timing: zero wait states (HREADYOUT always high, HRESP always OKAY).
// Memory reads are issued in the address phase so the synchronous memories
// return the data in the data phase; writes are performed in the data phase
// with HWDATA. A read whose address phase meets the data phase of a write to
// the same word gets the written data forwarded, so back-to-back transfers
// see memory in program order. A CMD write is held until the parser accepts
// it; the host polls STATUS[0] before writing the next command.
// The bus and the interface block are the architecture's (AMBA AHB); the
// register map is this design's.
module musra_ahb_if
  import musra_pkg::*;
#(
  parameter int unsigned NCTX    = 16,
  parameter int unsigned DM_ROWS = 1024,
  localparam int unsigned CAW    = $clog2(NCTX * CTX_WORDS),
  localparam int unsigned DAW    = $clog2(DM_ROWS) + 4
) (
  input  logic             hclk,
  input  logic             hresetn,
  input  logic             hsel,
  input  logic [31:0]      haddr,
  input  logic [1:0]       htrans,
  input  logic             hwrite,
  input  logic [2:0]       hsize,
  input  logic [31:0]      hwdata,
  input  logic             hready,
  output logic             hreadyout,
  output logic             hresp,
  output logic [31:0]      hrdata,
  // context memory host port
  output logic             cm_we,
  output logic [CAW-1:0]   cm_waddr,
  output logic [31:0]      cm_wdata,
  output logic             cm_re,
  output logic [CAW-1:0]   cm_raddr,
  input  logic [31:0]      cm_rdata,
  // data memory host port
  output logic             dm_we,
  output logic [DAW-1:0]   dm_waddr,
  output logic [31:0]      dm_wdata,
  output logic             dm_re,
  output logic [DAW-1:0]   dm_raddr,
  input  logic [31:0]      dm_rdata,
  // parser command and status
  output logic             cmd_valid,
  output logic [7:0]       cmd_ctx,
  input  logic             cmd_ready,
  input  logic [31:0]      status,
  input  logic [31:0]      stat_stall,
  input  logic [31:0]      stat_sched
);

  logic        act, wr_q, rd_q;
  logic [1:0]  reg_q;      // region of the data phase
  logic [17:0] word_q;     // word address of the data phase
  logic        cmd_v_q;
  logic        fwd_q;      // data phase read returns the forwarded write data
  logic [31:0] fwd_d_q;
  logic [7:0]  cmd_c_q;

  assign act       = hsel && htrans[1] && hready;
  assign hreadyout = 1'b1;
  assign hresp     = 1'b0;

  // reads issued in the address phase
  assign cm_re    = act && !hwrite && haddr[21:20] == 2'd1;
  assign cm_raddr = CAW'(haddr[19:2]);
  assign dm_re    = act && !hwrite && haddr[21:20] == 2'd2;
  assign dm_raddr = DAW'(haddr[19:2]);

  // writes performed in the data phase
  assign cm_we    = wr_q && reg_q == 2'd1;
  assign cm_waddr = CAW'(word_q);
  assign cm_wdata = hwdata;
  assign dm_we    = wr_q && reg_q == 2'd2;
  assign dm_waddr = DAW'(word_q);
  assign dm_wdata = hwdata;

  always_comb begin
    hrdata = '0;
    if (rd_q && fwd_q) begin
      hrdata = fwd_d_q;
    end else if (rd_q) begin
      unique case (reg_q)
        2'd1: hrdata = cm_rdata;
        2'd2: hrdata = dm_rdata;
        2'd0: unique case (word_q[1:0])
                2'd1:    hrdata = status;
                2'd2:    hrdata = stat_stall;
                2'd3:    hrdata = stat_sched;
                default: hrdata = {24'd0, cmd_c_q};
              endcase
        default: hrdata = '0;
      endcase
    end
  end

  assign cmd_valid = cmd_v_q;
  assign cmd_ctx   = cmd_c_q;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      wr_q    <= 1'b0;
      rd_q    <= 1'b0;
      reg_q   <= '0;
      word_q  <= '0;
      cmd_v_q <= 1'b0;
      cmd_c_q <= '0;
      fwd_q   <= 1'b0;
      fwd_d_q <= '0;
    end else begin
      if (hready) begin
        fwd_q   <= act && !hwrite && wr_q && reg_q != 2'd0
                   && reg_q == haddr[21:20] && word_q == haddr[19:2];
        fwd_d_q <= hwdata;
      end
      if (hready) begin
        wr_q   <= act && hwrite;
        rd_q   <= act && !hwrite;
        reg_q  <= haddr[21:20];
        word_q <= haddr[19:2];
      end
      if (cmd_v_q && cmd_ready) cmd_v_q <= 1'b0;
      if (wr_q && reg_q == 2'd0 && word_q[1:0] == 2'd0) begin
        cmd_v_q <= 1'b1;
        cmd_c_q <= hwdata[7:0];
      end
    end
  end

  a_word_only: assert property (@(posedge hclk) disable iff (!hresetn) act |-> hsize == 3'd2);
  a_cmd_hold:  assert property (@(posedge hclk) disable iff (!hresetn)
                                cmd_v_q && !cmd_ready |=> cmd_v_q && $stable(cmd_c_q));

endmodule
