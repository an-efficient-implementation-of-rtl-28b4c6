// tb_musra_rc: self-checking test of one reconfigurable cell.
//
// For several hundred random configurations it writes a layer, swaps to it
// and applies random operands, then compares OUT_REG one clock later with a
// reference computed here in integer arithmetic (all opcodes, all operand
// sources). It also checks the LOR paths (load from FIFO, crossbar and PE
// result, hold), the LOR initial value loaded on a swap, the C bypass, and
// that nothing changes while ENABLE is low.
module tb_musra_rc;
  import musra_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic cfg_we = 0, cfg_lor_we = 0, cfg_layer = 0, act_layer = 0, swap = 0;
  rc_cfg_t cfg_word = '0;
  word_t cfg_lor = 0, pre_a = 0, pre_b = 0, pre_l = 0;
  fifo_row_t fifo_row = '0;
  word_t [GRF_N-1:0] grf;
  logic [5:0] xsel_a, xsel_b, xsel_l;
  word_t pe_out, lor_out;
  int checks = 0, failures = 0;

  musra_rc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t fw(int i); return fifo_row[i*16 +: 16]; endfunction

  function automatic word_t model(op_e op, word_t a, word_t b, word_t c, word_t hold);
    int sa = $signed(a), sb = $signed(b), sh = b % 16;
    case (op)
      OP_NOP:   return hold;
      OP_PASSA: return a;
      OP_ADD:   return word_t'(int'(a) + int'(b));
      OP_SUB:   return word_t'(int'(a) - int'(b));
      OP_MUL:   return word_t'(int'(a) * int'(b));
      OP_MULS:  return word_t'(sa * sb);
      OP_MAC:   return word_t'(int'(a) * int'(b) + int'(c));
      OP_AND:   return a & b;
      OP_OR:    return a | b;
      OP_XOR:   return a ^ b;
      OP_NOT:   return ~a;
      OP_SLL:   return word_t'(int'(a) * (1 << sh));
      OP_SRL:   return word_t'(int'(a) / (1 << sh));
      OP_SRA:   return word_t'($floor(real'(sa) / real'(1 << sh)));
      OP_SRND:  return word_t'($floor((real'(sa) + ((sh == 0) ? 0.0 : real'(1 << (sh - 1)))) / real'(1 << sh)));
      OP_ABSD:  return word_t'((int'(a) > int'(b)) ? int'(a) - int'(b) : int'(b) - int'(a));
      OP_ADD3:  return word_t'(int'(a) + int'(b) + int'(c));
      OP_XOR3:  return a ^ b ^ c;
      OP_MIN:   return (sa < sb) ? a : b;
      OP_MAX:   return (sa > sb) ? a : b;
      OP_ADD8:  return {8'(a[15:8] + b[15:8]), 8'(a[7:0] + b[7:0])};
      OP_SUB8:  return {8'(a[15:8] - b[15:8]), 8'(a[7:0] - b[7:0])};
      default:  return hold;
    endcase
  endfunction

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_and_swap(input rc_cfg_t w, input word_t lor_init);
    @(negedge clk);
    cfg_we = 1; cfg_lor_we = 1; cfg_layer = !act_layer; cfg_word = w; cfg_lor = lor_init;
    @(negedge clk);
    cfg_we = 0; cfg_lor_we = 0; swap = 1;
    @(negedge clk);
    swap = 0; act_layer = !act_layer;
    #1;
  endtask

  initial begin
    for (int i = 0; i < GRF_N; i++) grf[i] = word_t'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      rc_cfg_t w;
      word_t a, b, c, init, hold;
      w = '0;
      w.op    = op_e'($urandom_range(0, 21));
      w.a_src = src_e'($urandom_range(0, 3));
      w.b_src = src_e'($urandom_range(0, 3));
      w.a_idx = 6'($urandom_range(0, 31));
      w.b_idx = 6'($urandom_range(0, 31));
      w.lor_src = LOR_HOLD;
      init = word_t'($urandom);
      if (t % 7 == 0) init = 16'h8000 | word_t'($urandom_range(0, 255));
      load_and_swap(w, init);
      check("lor init", lor_out, init);
      check("xsel_a", 16'(xsel_a), 16'(w.a_idx));
      fifo_row = {16{$urandom}};
      pre_a = word_t'($urandom); pre_b = word_t'($urandom);
      if (t % 5 == 0) begin pre_b = word_t'($urandom_range(0, 15)); fifo_row[w.b_idx[4:0]*16 +: 16] = word_t'($urandom_range(0, 15)); end
      a = (w.a_src == SRC_FIFO) ? fw(w.a_idx[4:0]) : (w.a_src == SRC_PRE) ? pre_a : (w.a_src == SRC_GRF) ? grf[w.a_idx[4:0]] : init;
      b = (w.b_src == SRC_FIFO) ? fw(w.b_idx[4:0]) : (w.b_src == SRC_PRE) ? pre_b : (w.b_src == SRC_GRF) ? grf[w.b_idx[4:0]] : init;
      c = init;
      hold = pe_out;
      en = 1;
      @(negedge clk);
      en = 0;
      check($sformatf("op %s", w.op.name()), pe_out, model(w.op, a, b, c, hold));
      check("lor hold", lor_out, init);
    end
    // LOR paths: FIFO, crossbar, PE result; C bypass on MAC
    begin
      rc_cfg_t w;
      w = '0; w.op = OP_MAC; w.a_src = SRC_FIFO; w.a_idx = 6'd1; w.b_src = SRC_FIFO; w.b_idx = 6'd2;
      w.lor_src = LOR_FIFO; w.lor_idx = 6'd3; w.c_byp = 1'b1;
      load_and_swap(w, 16'h0);
      fifo_row = '0; fifo_row[16 +: 16] = 16'd3; fifo_row[32 +: 16] = 16'd5; fifo_row[48 +: 16] = 16'd7;
      en = 1; @(negedge clk); en = 0;
      check("mac with bypassed C", pe_out, 16'd22);
      check("lor from fifo", lor_out, 16'd7);
      w.c_byp = 1'b0; w.lor_src = LOR_PRE; w.lor_idx = 6'd9;
      load_and_swap(w, 16'd100);
      pre_l = 16'h0ABC;
      en = 1; @(negedge clk); en = 0;
      check("mac with LOR C", pe_out, 16'd115);
      check("lor from crossbar", lor_out, 16'h0ABC);
      check("xsel_l", 16'(xsel_l), 16'd9);
      w.lor_src = LOR_SELF; w.op = OP_ADD;
      load_and_swap(w, 16'd0);
      en = 1; @(negedge clk);
      check("lor from PE", lor_out, 16'd8);
      // stall: nothing moves while en is low
      en = 0; fifo_row[16 +: 16] = 16'd50;
      repeat (3) @(negedge clk);
      check("stall out", pe_out, 16'd8);
      check("stall lor", lor_out, 16'd8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
