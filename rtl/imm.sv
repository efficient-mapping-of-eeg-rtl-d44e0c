// imm: immediate functional unit of the Blocks array.
//
// Puts a constant from its instruction on the switch box, for example a
// filter coefficient or a lifting coefficient. LDI loads the sign-extended
// 16-bit immediate; LDH replaces the upper half so that a full 32-bit
// constant takes two instructions. NOP keeps the previous value, so a constant
// loaded once stays available to later cycles. The unit itself is named by
// the architecture description; the two operations are this design's choice.
//
// Timing: one-cycle latency. Reset clears the output.
module imm
  import blocks_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  instr_t instr,
  output word_t  out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else if (en) begin
      unique case (imm_op_e'(instr.op))
        IMM_LDI: out <= word_t'(signed'(instr.imm));
        IMM_LDH: out <= {instr.imm, out[15:0]};
        default: ;
      endcase
    end
  end

endmodule
