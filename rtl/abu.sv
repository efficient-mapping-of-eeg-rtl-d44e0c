// abu: accumulate-branch unit of the Blocks array.
//
// Holds the program counter shared by all instruction decoders and an
// accumulator used as loop counter. Every cycle the array advances, the PC
// moves to the next instruction or, on a taken branch, to the immediate.
// DBNZ (decrement and branch if not zero) closes a counted loop in one
// instruction; BNZ branches on a value computed elsewhere (operand A); HALT
// stops the array and raises `halt`. The unit keeping the program counter
// follows the architecture description; its operation set is this design's.
//
// Timing: the PC and accumulator update at the clock edge of an advancing
// cycle. `start` restarts at PC 0 with the accumulator cleared.
module abu
  import blocks_pkg::*;
#(
  parameter int unsigned PCW = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           en,
  input  instr_t         instr,
  input  word_t          a,
  output word_t          out,     // accumulator
  output logic [PCW-1:0] pc,
  output logic           halt,    // HALT reached (held until start)
  output logic           taken    // a branch is taken this cycle
);

  abu_op_e        op;
  word_t          acc_dec;
  logic [PCW-1:0] target;

  assign op      = abu_op_e'(instr.op);
  assign acc_dec = out - 1'b1;
  assign target  = instr.imm[PCW-1:0];

  always_comb begin
    unique case (op)
      ABU_DBNZ: taken = (acc_dec != '0);
      ABU_JMP:  taken = 1'b1;
      ABU_BNZ:  taken = (a != '0);
      default:  taken = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out  <= '0;
      pc   <= '0;
      halt <= 1'b0;
    end else if (start) begin
      out  <= '0;
      pc   <= '0;
      halt <= 1'b0;
    end else if (en) begin
      pc <= taken ? target : pc + 1'b1;
      unique case (op)
        ABU_SET:  out  <= word_t'(signed'(instr.imm));
        ABU_ACC:  out  <= out + a;
        ABU_DBNZ: out  <= acc_dec;
        ABU_HALT: begin
          halt <= 1'b1;
          pc   <= pc;
        end
        default:  ;
      endcase
    end
  end

endmodule
