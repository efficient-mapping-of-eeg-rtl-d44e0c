// tb_alu: self-checking test of the ALU. Random operands and opcodes are
// applied; each result is compared one cycle later with a reference computed
// here. Also checks that NOP and en = 0 hold the output.
module tb_alu;
  import blocks_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  instr_t instr;
  word_t a, b, out, exp_v, prev;
  int checks = 0, failures = 0;

  alu dut (.clk, .rst_n, .en, .instr, .a, .b, .out);
  always #5 clk = ~clk;

  function automatic word_t ref_alu(alu_op_e op, word_t x, word_t y, word_t old);
    word_t xs = {{16{x[15]}}, x[15:0]};
    word_t ys = {{16{y[15]}}, y[15:0]};
    case (op)
      ALU_ADD:    return x + y;
      ALU_SUB:    return x - y;
      ALU_ADD_SE: return xs + ys;
      ALU_SUB_SE: return xs - ys;
      ALU_AND:    return x & y;
      ALU_OR:     return x | y;
      ALU_XOR:    return x ^ y;
      ALU_SHR1:   return {x[31], x[31:1]};
      ALU_SHR4:   return {{4{x[31]}}, x[31:4]};
      ALU_SHL1:   return {x[30:0], 1'b0};
      ALU_PASS:   return x;
      ALU_LT:     return (int'(x) < int'(y)) ? 32'd1 : 32'd0;
      ALU_EQ:     return (x == y) ? 32'd1 : 32'd0;
      default:    return old;
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = '0; a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (out !== 0) failures++;
    for (int i = 0; i < 3000; i++) begin
      alu_op_e op;
      op = alu_op_e'($urandom_range(0, 13));
      a = $urandom; b = $urandom;
      if (i % 7 == 0) b = a;
      en = ($urandom_range(0, 9) != 0);
      instr = '0; instr.op = op;
      prev = out;
      exp_v = en ? ref_alu(op, a, b, prev) : prev;
      @(negedge clk);
      checks++;
      if (out !== exp_v) begin
        failures++;
        if (failures < 10) $display("ALU op %s a=%h b=%h en=%b got %h exp %h", op.name(), a, b, en, out, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
