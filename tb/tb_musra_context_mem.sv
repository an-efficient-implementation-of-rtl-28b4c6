// tb_musra_context_mem: fills the context memory through the host port,
// then reads it back through both read ports (host and parser) in random
// order and checks each word one clock after its request.
module tb_musra_context_mem;
  import musra_pkg::*;

  localparam int NCTX = 16;
  localparam int AW = $clog2(NCTX * CTX_WORDS);
  logic clk = 0, h_we = 0, h_re = 0, p_re = 0;
  logic [AW-1:0] h_waddr = 0, h_raddr = 0, p_addr = 0;
  logic [31:0] h_wdata = 0, h_rdata, p_rdata;
  logic [31:0] model [NCTX * CTX_WORDS];
  int checks = 0, failures = 0;

  musra_context_mem #(.NCTX(NCTX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < NCTX * CTX_WORDS; a++) begin
      @(negedge clk);
      h_we = 1; h_waddr = AW'(a); h_wdata = $urandom; model[a] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      h_re = 1; p_re = 1;
      h_raddr = AW'($urandom); p_addr = AW'($urandom);
      @(negedge clk);
      h_re = 0; p_re = 0;
      checks += 2;
      if (h_rdata !== model[h_raddr]) failures++;
      if (p_rdata !== model[p_addr]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
