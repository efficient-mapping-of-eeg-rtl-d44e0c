// mul: multiplier functional unit of the Blocks array.
//
// Signed 32x32 multiplication with the result optionally shifted right, as
// the array has no barrel shifter: the shifted forms are how the array scales
// fixed-point results (shift by 8 after 11-bit filter coefficients scaled by
// 256) and how it splits a 32-bit word (upper half by an unsigned multiply by
// 1 shifted right by 16). The shift amounts 8, 16 and 24 and the
// mul_shr16/mulu_sh16 operations follow the architecture description; the
// full 64-bit product and arithmetic (signed) shifting are this design's
// choice.
//
// Timing: one-cycle latency, registered output held until the next operation.
// Reset clears the output.
module mul
  import blocks_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  instr_t instr,
  input  word_t  a,
  input  word_t  b,
  output word_t  out
);

  mul_op_e           op;
  logic signed [63:0] ps;
  logic        [63:0] pu;
  word_t             res;
  logic              wr;

  assign op = mul_op_e'(instr.op);
  assign ps = $signed(a) * $signed(b);
  assign pu = {32'd0, a} * {32'd0, b};

  always_comb begin
    wr  = 1'b1;
    res = out;
    unique case (op)
      MUL_MUL:    res = ps[31:0];
      MUL_SHR8:   res = ps[39:8];
      MUL_SHR16:  res = ps[47:16];
      MUL_SHR24:  res = ps[55:24];
      MULU_SHR16: res = pu[47:16];
      default:    wr  = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        out <= '0;
    else if (en && wr) out <= res;
  end

endmodule
