// tb_abu: self-checking test of the accumulate-branch unit. Runs a counted
// loop with DBNZ and checks the number of iterations and the PC sequence,
// then JMP, BNZ taken and not taken, ACC, stall (en = 0) and HALT.
module tb_abu;
  import blocks_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, start = 0;
  instr_t instr;
  word_t a, out;
  logic [5:0] pc;
  logic halt, taken;
  int checks = 0, failures = 0;

  abu #(.PCW(6)) dut (.clk, .rst_n, .start, .en, .instr, .a, .out, .pc, .halt, .taken);
  always #5 clk = ~clk;

  task automatic step(abu_op_e op, logic [15:0] imm_v, word_t a_v);
    instr = '0; instr.op = op; instr.imm = imm_v; a = a_v;
    @(negedge clk);
  endtask

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("ABU check failed: %s (pc=%0d acc=%0d)", what, pc, out);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int iters;
    instr = '0; a = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    start = 1; @(negedge clk); start = 0;
    chk(pc == 0 && out == 0 && !halt, "start state");
    en = 1;
    step(ABU_SET, 16'd5, '0);            // pc 0 -> 1
    chk(out == 5 && pc == 1, "SET");
    // loop body at pc 1..2: pc1 NOP, pc2 DBNZ -> 1
    iters = 0;
    for (int g = 0; g < 20; g++) begin
      step(ABU_NOP, 16'd0, '0);
      chk(pc == 2, "NOP advances");
      step(ABU_DBNZ, 16'd1, '0);
      iters++;
      if (pc != 1) break;
    end
    chk(iters == 5, "DBNZ iteration count");
    chk(pc == 3 && out == 0, "loop exit");
    step(ABU_JMP, 16'd40, '0);
    chk(pc == 40, "JMP");
    instr = '0; instr.op = ABU_BNZ; instr.imm = 16'd10; a = 32'd7;
    #1 chk(taken == 1, "BNZ taken flag");
    @(negedge clk);
    chk(pc == 10, "BNZ taken");
    step(ABU_BNZ, 16'd20, 32'd0);
    chk(pc == 11, "BNZ not taken");
    step(ABU_ACC, 16'd0, 32'd100);
    step(ABU_ACC, 16'd0, -32'sd30);
    chk(out == 70, "ACC");
    en = 0;
    step(ABU_JMP, 16'd50, '0);
    chk(pc == 13, "stall holds pc");
    en = 1;
    step(ABU_HALT, 16'd0, '0);
    chk(halt && pc == 13, "HALT");
    step(ABU_NOP, 16'd0, '0);
    chk(halt, "halt held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
