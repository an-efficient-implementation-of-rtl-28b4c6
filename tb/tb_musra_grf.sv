// tb_musra_grf: writes random constants into both banks of the GRF in pairs
// and checks that the active bank shows exactly its own contents, that
// writing the inactive bank leaves the visible values alone, and that
// switching banks exposes the other set.
module tb_musra_grf;
  import musra_pkg::*;

  logic clk = 0, rst_n = 0, wr_en = 0, wr_bank = 0, act_bank = 0;
  logic [$clog2(GRF_N)-2:0] wr_pair = 0;
  logic [31:0] wr_data = 0;
  word_t [GRF_N-1:0] rd_data;
  word_t model [2][GRF_N];
  int checks = 0, failures = 0;

  musra_grf dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < GRF_N; i++) begin
      checks++;
      if (rd_data[i] !== model[act_bank][i]) begin
        failures++;
        if (failures < 10) $display("bank %0d entry %0d: got %h expected %h", act_bank, i, rd_data[i], model[act_bank][i]);
      end
    end
  endtask

  initial begin
    for (int b = 0; b < 2; b++) for (int i = 0; i < GRF_N; i++) model[b][i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare();
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      wr_en = 1; wr_bank = 1'($urandom); wr_pair = 4'($urandom); wr_data = $urandom;
      @(negedge clk);
      wr_en = 0;
      model[wr_bank][2*wr_pair] = wr_data[15:0];
      model[wr_bank][2*wr_pair+1] = wr_data[31:16];
      if (t % 10 == 0) act_bank = !act_bank;
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
