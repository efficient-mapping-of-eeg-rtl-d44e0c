// tb_imm: self-checking test of the immediate unit: sign extension of LDI,
// upper-half load of LDH, and hold on NOP and on en = 0.
module tb_imm;
  import blocks_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  instr_t instr;
  word_t out, exp_v;
  int checks = 0, failures = 0;

  imm dut (.clk, .rst_n, .en, .instr, .out);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = '0;
    exp_v = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      instr = '0;
      instr.op = OPW'($urandom_range(0, 2));
      instr.imm = 16'($urandom);
      en = ($urandom_range(0, 7) != 0);
      if (en) begin
        case (imm_op_e'(instr.op))
          IMM_LDI: exp_v = {{16{instr.imm[15]}}, instr.imm};
          IMM_LDH: exp_v = {instr.imm, exp_v[15:0]};
          default: ;
        endcase
      end
      @(negedge clk);
      checks++;
      if (out !== exp_v) begin
        failures++;
        if (failures < 10) $display("IMM op %0d imm %h got %h exp %h", instr.op, instr.imm, out, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
