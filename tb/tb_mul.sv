// tb_mul: self-checking test of the multiplier. Random signed operands,
// including the scaling and splitting uses (multiply by 1 and shift by 16,
// coefficients scaled by 256 and shifted by 8).
module tb_mul;
  import blocks_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  instr_t instr;
  word_t a, b, out, exp_v;
  int checks = 0, failures = 0;

  mul dut (.clk, .rst_n, .en, .instr, .a, .b, .out);
  always #5 clk = ~clk;

  function automatic word_t ref_mul(mul_op_e op, word_t x, word_t y, word_t old);
    longint p = longint'(int'(x)) * longint'(int'(y));
    longint unsigned u = {32'd0, x} * {32'd0, y};
    case (op)
      MUL_MUL:    return p[31:0];
      MUL_SHR8:   return 32'(p >>> 8);
      MUL_SHR16:  return 32'(p >>> 16);
      MUL_SHR24:  return 32'(p >>> 24);
      MULU_SHR16: return 32'(u >> 16);
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
    // split a 32-bit word: upper half by unsigned multiply by 1, shift 16
    en = 1; instr = '0; instr.op = MULU_SHR16; a = 32'hBEEF_1234; b = 32'd1;
    @(negedge clk); checks++; if (out !== 32'h0000_BEEF) failures++;
    // fixed-point scaling: -389 * 1000 >>> 8
    instr.op = MUL_SHR8; a = -32'sd389; b = 32'd1000;
    @(negedge clk); checks++; if (out !== 32'(-389000 >>> 8)) failures++;
    for (int i = 0; i < 3000; i++) begin
      mul_op_e op;
      op = mul_op_e'($urandom_range(0, 5));
      a = $urandom; b = (i % 3 == 0) ? $urandom_range(0, 2047) - 1024 : $urandom;
      en = ($urandom_range(0, 9) != 0);
      instr = '0; instr.op = op;
      exp_v = en ? ref_mul(op, a, b, out) : out;
      @(negedge clk);
      checks++;
      if (out !== exp_v) begin
        failures++;
        if (failures < 10) $display("MUL op %s a=%h b=%h got %h exp %h", op.name(), a, b, out, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
