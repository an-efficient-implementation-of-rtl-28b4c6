// tb_musra_ahb_if: AHB-Lite slave test with the interface connected to real
// context and data memories. Random single writes and reads to both memory
// regions are checked against a model (reads return the last value written,
// with zero wait states); pipelined back-to-back transfers are used too. The
// CMD register must raise cmd_valid and hold it until cmd_ready; the status
// registers must read back the values presented to the interface.
module tb_musra_ahb_if;
  import musra_pkg::*;

  localparam int NCTX = 16, DM_ROWS = 1024;
  localparam int CAW = $clog2(NCTX * CTX_WORDS), DAW = $clog2(DM_ROWS) + 4;
  logic hclk = 0, hresetn = 0, hsel = 0, hwrite = 0, hready;
  logic [31:0] haddr = 0, hwdata = 0, hrdata;
  logic [1:0] htrans = 0;
  logic [2:0] hsize = 3'd2;
  logic hreadyout, hresp;
  logic cm_we, cm_re, dm_we, dm_re;
  logic [CAW-1:0] cm_waddr, cm_raddr;
  logic [DAW-1:0] dm_waddr, dm_raddr;
  logic [31:0] cm_wdata, cm_rdata, dm_wdata, dm_rdata;
  logic cmd_valid, cmd_ready = 0;
  logic [7:0] cmd_ctx;
  logic [31:0] status = 32'h0003_0002, stat_stall = 32'h1111_2222, stat_sched = 32'h3333_4444;
  logic [31:0] model [logic [31:0]];
  int checks = 0, failures = 0;

  assign hready = hreadyout;

  musra_ahb_if #(.NCTX(NCTX), .DM_ROWS(DM_ROWS)) dut (.*);
  musra_context_mem #(.NCTX(NCTX)) u_cm (
    .clk(hclk), .h_we(cm_we), .h_waddr(cm_waddr), .h_wdata(cm_wdata),
    .h_re(cm_re), .h_raddr(cm_raddr), .h_rdata(cm_rdata),
    .p_re(1'b0), .p_addr('0), .p_rdata());
  musra_data_mem #(.DM_ROWS(DM_ROWS)) u_dm (
    .clk(hclk), .rst_n(hresetn),
    .h_we(dm_we), .h_waddr(dm_waddr), .h_wdata(dm_wdata),
    .h_re(dm_re), .h_raddr(dm_raddr), .h_rdata(dm_rdata),
    .rd_req(1'b0), .rd_row('0), .rd_gnt(), .rd_data(),
    .wr_req(1'b0), .wr_row('0), .wr_data('0), .wr_gnt());

  always #5 hclk = ~hclk;

  initial begin
    repeat (50000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; if (failures < 10) $display("%s: got %h expected %h", what, got, exp); end
  endtask

  function automatic logic [31:0] rnd_addr();
    if ($urandom_range(0, 1)) return 32'h0010_0000 | (32'($urandom_range(0, NCTX * CTX_WORDS - 1)) << 2);
    else return 32'h0020_0000 | (32'($urandom_range(0, 255)) << 2);
  endfunction

  // pipelined sequence: address of transfer i+1 overlaps data of transfer i
  task automatic burst(input logic [31:0] a [], input bit w [], input logic [31:0] d []);
    for (int i = 0; i <= a.size(); i++) begin
      @(negedge hclk);
      // data phase of i-1
      if (i > 0) begin
        if (w[i-1]) hwdata = d[i-1];
        else begin
          logic [31:0] e = model.exists(a[i-1]) ? model[a[i-1]] : 32'hx;
          if (model.exists(a[i-1])) chk($sformatf("read %h", a[i-1]), hrdata, e);
        end
        if (w[i-1]) model[a[i-1]] = d[i-1];
      end
      // address phase of i
      if (i < a.size()) begin hsel = 1; htrans = 2'b10; hwrite = w[i]; haddr = a[i]; end
      else begin hsel = 0; htrans = 2'b00; hwrite = 0; end
    end
  endtask

  initial begin
    logic [31:0] a [], d [];
    bit w [];
    repeat (2) @(negedge hclk);
    hresetn = 1;
    // fill a set of addresses, then mixed pipelined traffic over them
    a = new[200]; w = new[200]; d = new[200];
    for (int i = 0; i < 200; i++) begin a[i] = (i >= 100) ? a[i - 100] : rnd_addr(); w[i] = 1; d[i] = $urandom; end
    burst(a, w, d);
    for (int k = 0; k < 20; k++) begin
      for (int i = 0; i < 200; i++) begin
        w[i] = $urandom_range(0, 2) == 0; d[i] = $urandom;
      end
      a.shuffle();
      burst(a, w, d);
    end
    chk("hresp", {31'd0, hresp}, 32'd0);
    // registers
    burst('{32'h4, 32'h8, 32'hC}, '{0, 0, 0}, '{0, 0, 0});
    begin
      logic [31:0] r;
      @(negedge hclk); hsel = 1; htrans = 2'b10; hwrite = 0; haddr = 32'h8;
      @(negedge hclk); hsel = 0; htrans = 0; r = hrdata; chk("stat_stall", r, stat_stall);
      @(negedge hclk); hsel = 1; htrans = 2'b10; haddr = 32'hC;
      @(negedge hclk); hsel = 0; htrans = 0; r = hrdata; chk("stat_sched", r, stat_sched);
      @(negedge hclk); hsel = 1; htrans = 2'b10; haddr = 32'h4;
      @(negedge hclk); hsel = 0; htrans = 0; r = hrdata; chk("status", r, status);
    end
    // command register: held until accepted
    @(negedge hclk); hsel = 1; htrans = 2'b10; hwrite = 1; haddr = 32'h0;
    @(negedge hclk); hsel = 0; htrans = 0; hwrite = 0; hwdata = 32'h5;
    @(negedge hclk);
    chk("cmd_valid raised", {31'd0, cmd_valid}, 32'd1);
    chk("cmd_ctx", {24'd0, cmd_ctx}, 32'd5);
    repeat (4) @(negedge hclk);
    chk("cmd_valid held", {31'd0, cmd_valid}, 32'd1);
    cmd_ready = 1;
    @(negedge hclk); cmd_ready = 0;
    chk("cmd_valid cleared", {31'd0, cmd_valid}, 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
