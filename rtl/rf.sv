// rf: register-file functional unit of the Blocks array.
//
// A small register file with one write and one read per cycle. WR stores
// operand A at the register named by the immediate; RD places that register
// on the unit's output, where it stays until the next read. Kernels use it to
// keep previous samples and loop variables. The depth (16 registers) and the
// single read port are this design's choice; the architecture description
// gives only the unit's name and use.
//
// Timing: one-cycle latency. Reset clears the output and all registers.
module rf
  import blocks_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  instr_t instr,
  input  word_t  a,
  output word_t  out
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t            regs [DEPTH];
  logic [AW-1:0]    idx;

  assign idx = instr.imm[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out <= '0;
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (en) begin
      unique case (rf_op_e'(instr.op))
        RF_WR:   regs[idx] <= a;
        RF_RD:   out       <= regs[idx];
        default: ;
      endcase
    end
  end

endmodule
