// lsu: load-store unit of the Blocks array.
//
// Each LSU owns a local memory (256 words of 32 bit) and has a port to the
// shared data memory through the memory arbiter. An address counter with a
// programmable stride generates addresses on its own: after every access that
// uses the counter, the stride is added to it, so a kernel streams through an
// array without spending an ALU on address arithmetic. Indexed local accesses
// take the address from operand B instead (for tables such as twiddle
// factors). Global half-word loads are zero-extended: the unit does not
// sign-extend, and kernels use add_se/sub_se in an ALU for that.
//
// Follows the architecture description: local memory size, the stride
// register added after each access, a separate path to the shared memory, and
// no sign extension on load. This design's choices: one counter shared by
// local (word index) and global (byte address) accesses, little-endian
// half-words (bit 1 of the byte address selects the upper half), byte
// enables that mark the bytes an access uses, loads included (the arbiter
// counts bus transactions from them), and the opcode set in blocks_pkg.
//
// Timing: local accesses take one cycle. A global access raises gm_req while
// the instruction is presented; the arbiter stalls the whole array until the
// access is done and the operation completes in the cycle en = 1, when
// gm_rdata holds the word read.
module lsu
  import blocks_pkg::*;
#(
  parameter int unsigned LM_DEPTH = 256,
  parameter int unsigned GAW      = 16     // global byte-address width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,        // array advances this cycle
  input  logic           active,    // array is running (instruction valid)
  input  instr_t         instr,
  input  word_t          a,         // store data
  input  word_t          b,         // local address for indexed accesses
  output word_t          out,
  // shared data memory request
  output logic           gm_req,
  output logic           gm_we,
  output logic [GAW-1:0] gm_addr,
  output word_t          gm_wdata,
  output logic [3:0]     gm_be,
  input  word_t          gm_rdata
);

  localparam int unsigned LAW = $clog2(LM_DEPTH);

  lsu_op_e          op;
  logic [15:0]      addr, stride;
  logic [LAW-1:0]   laddr_cnt, laddr_idx;
  word_t            lm [LM_DEPTH];
  logic             upper;

  assign op        = lsu_op_e'(instr.op);
  assign laddr_cnt = addr[LAW-1:0];
  assign laddr_idx = b[LAW-1:0];
  assign upper     = addr[1];

  // global request
  always_comb begin
    gm_req   = active && (op inside {LSU_LD_GW, LSU_ST_GW, LSU_LD_GH, LSU_ST_GH});
    gm_we    = op inside {LSU_ST_GW, LSU_ST_GH};
    gm_addr  = addr[GAW-1:0];
    gm_wdata = (op == LSU_ST_GH) ? {a[15:0], a[15:0]} : a;
    if (op inside {LSU_LD_GH, LSU_ST_GH}) gm_be = upper ? 4'b1100 : 4'b0011;
    else                 gm_be = 4'b1111;
  end

  // local memory: one access per cycle
  always_ff @(posedge clk) begin
    if (en) begin
      if (op == LSU_ST_L)  lm[laddr_cnt] <= a;
      if (op == LSU_ST_LB) lm[laddr_idx] <= a;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out    <= '0;
      addr   <= '0;
      stride <= 16'd1;
    end else if (en) begin
      unique case (op)
        LSU_SET_ADDR:   addr   <= instr.imm;
        LSU_SET_STRIDE: stride <= instr.imm;
        LSU_LD_L: begin
          out  <= lm[laddr_cnt];
          addr <= addr + stride;
        end
        LSU_LD_LB:      out <= lm[laddr_idx];
        LSU_ST_L, LSU_ST_GW, LSU_ST_GH:
                        addr <= addr + stride;
        LSU_LD_GW: begin
          out  <= gm_rdata;
          addr <= addr + stride;
        end
        LSU_LD_GH: begin
          out  <= {16'd0, upper ? gm_rdata[31:16] : gm_rdata[15:0]};
          addr <= addr + stride;
        end
        default: ;
      endcase
    end
  end

endmodule
