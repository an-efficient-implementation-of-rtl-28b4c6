// tb_musra_crossbar: checks that every output of the crossbar switch carries
// the source its select names, for random sources and selects on all three
// operand outputs of all columns.
module tb_musra_crossbar;
  import musra_pkg::*;

  word_t [XSRC-1:0]      src;
  logic  [COLS-1:0][5:0] sel_a, sel_b, sel_l;
  word_t [COLS-1:0]      out_a, out_b, out_l;
  int checks = 0, failures = 0;

  musra_crossbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < XSRC; k++) src[k] = word_t'($urandom);
      for (int c = 0; c < COLS; c++) begin
        sel_a[c] = 6'($urandom_range(0, XSRC - 1));
        sel_b[c] = 6'($urandom_range(0, XSRC - 1));
        sel_l[c] = 6'($urandom_range(0, XSRC - 1));
      end
      #1;
      for (int c = 0; c < COLS; c++) begin
        checks += 3;
        if (out_a[c] !== src[sel_a[c]]) failures++;
        if (out_b[c] !== src[sel_b[c]]) failures++;
        if (out_l[c] !== src[sel_l[c]]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
