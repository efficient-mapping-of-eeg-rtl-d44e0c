// alu: arithmetic and logic functional unit of the Blocks array.
//
// Each cycle in which the array advances (en = 1) the ALU executes the
// opcode its instruction decoder presents on the operands A and B routed to
// it by the switch box, and registers the result; the result stays on the
// output until the next operation, so later stages read it directly without
// going through a register file. NOP keeps the output.
//
// Operations taken from the architecture description: add, add_se/sub_se
// (sign-extend two 16-bit inputs, then add or subtract), AND, and arithmetic
// shifts right by 1 and by 4 bits. Sub, OR, XOR, shift left by 1, pass, and the
// LT/EQ compares are this design's additions to make a usable set.
//
// Timing: one-cycle latency, one operation per cycle. Reset clears the output.
module alu
  import blocks_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,      // array advances this cycle
  input  instr_t instr,
  input  word_t  a,
  input  word_t  b,
  output word_t  out
);

  alu_op_e op;
  word_t   a_se, b_se, res;
  logic    wr;

  assign op   = alu_op_e'(instr.op);
  assign a_se = word_t'(signed'(a[15:0]));
  assign b_se = word_t'(signed'(b[15:0]));

  always_comb begin
    wr  = 1'b1;
    res = out;
    unique case (op)
      ALU_ADD:    res = a + b;
      ALU_SUB:    res = a - b;
      ALU_ADD_SE: res = a_se + b_se;
      ALU_SUB_SE: res = a_se - b_se;
      ALU_AND:    res = a & b;
      ALU_OR:     res = a | b;
      ALU_XOR:    res = a ^ b;
      ALU_SHR1:   res = word_t'($signed(a) >>> 1);
      ALU_SHR4:   res = word_t'($signed(a) >>> 4);
      ALU_SHL1:   res = a << 1;
      ALU_PASS:   res = a;
      ALU_LT:     res = word_t'($signed(a) < $signed(b));
      ALU_EQ:     res = word_t'(a == b);
      default:    wr  = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        out <= '0;
    else if (en && wr) out <= res;
  end

endmodule
