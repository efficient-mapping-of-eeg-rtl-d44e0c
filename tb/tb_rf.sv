// tb_rf: self-checking test of the register file against a reference array:
// random writes and reads, with en = 0 cycles that must change nothing.
module tb_rf;
  import blocks_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0, en = 0;
  instr_t instr;
  word_t a, out, exp_v;
  word_t model [D];
  int checks = 0, failures = 0;

  rf #(.DEPTH(D)) dut (.clk, .rst_n, .en, .instr, .a, .out);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = '0; a = '0; exp_v = '0;
    for (int i = 0; i < D; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom_range(0, D - 1);
      instr = '0;
      instr.op = OPW'($urandom_range(0, 2));
      instr.imm = 16'(r);
      a = $urandom;
      en = ($urandom_range(0, 7) != 0);
      if (en && instr.op == OPW'(RF_RD)) exp_v = model[r];
      if (en && instr.op == OPW'(RF_WR)) model[r] = a;
      @(negedge clk);
      checks++;
      if (out !== exp_v) begin
        failures++;
        if (failures < 10) $display("RF got %h exp %h", out, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
