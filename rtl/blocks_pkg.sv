// blocks_pkg: types and constants shared by the functional units (FUs) of the
// Blocks coarse-grain reconfigurable array (CGRA).
//
// The array follows the template sized for the EEG kernels (FFT, lifting
// wavelet transform, cascaded second-order-section filter): 13 instruction
// decoders, 4 load-store units, 8 ALUs, 4 multipliers, 1 accumulate-branch
// unit, 2 immediate units and 2 register files on a 32-bit datapath. Those
// counts, the 32-bit datapath and the 256-word local memory per LSU come from
// the architecture description; the instruction word layout, the opcode
// encodings and the ordering of the FUs on the switch box are this design's
// own choices.
//
// Instruction word (32 bit): [31:27] opcode, [26:16] unused, [15:0] immediate.
// Every FU type decodes the 5-bit opcode with its own enum below.
package blocks_pkg;

  localparam int unsigned DW       = 32;   // datapath width
  localparam int unsigned IW       = 32;   // instruction width
  localparam int unsigned OPW      = 5;    // opcode width
  localparam int unsigned IMMW     = 16;   // immediate field width

  typedef logic [DW-1:0] word_t;

  typedef struct packed {
    logic [OPW-1:0]  op;
    logic [10:0]     unused;
    logic [IMMW-1:0] imm;
  } instr_t;

  // ALU operations. add_se/sub_se sign-extend both 16-bit operands first.
  typedef enum logic [OPW-1:0] {
    ALU_NOP    = 5'd0,
    ALU_ADD    = 5'd1,
    ALU_SUB    = 5'd2,
    ALU_ADD_SE = 5'd3,
    ALU_SUB_SE = 5'd4,
    ALU_AND    = 5'd5,
    ALU_OR     = 5'd6,
    ALU_XOR    = 5'd7,
    ALU_SHR1   = 5'd8,   // arithmetic shift right by 1
    ALU_SHR4   = 5'd9,   // arithmetic shift right by 4
    ALU_SHL1   = 5'd10,
    ALU_PASS   = 5'd11,  // copy operand A
    ALU_LT     = 5'd12,  // signed A < B
    ALU_EQ     = 5'd13
  } alu_op_e;

  // Multiplier operations: signed product, optionally shifted right.
  typedef enum logic [OPW-1:0] {
    MUL_NOP       = 5'd0,
    MUL_MUL       = 5'd1,   // low 32 bits of A*B
    MUL_SHR8      = 5'd2,   // (A*B) >>> 8
    MUL_SHR16     = 5'd3,   // (A*B) >>> 16
    MUL_SHR24     = 5'd4,   // (A*B) >>> 24
    MULU_SHR16    = 5'd5    // unsigned (A*B) >> 16
  } mul_op_e;

  // Load-store unit operations. "_L" work on the local memory (word index),
  // "_G" on the shared data memory (byte address). The address counter moves
  // by the stride after every access that uses it.
  typedef enum logic [OPW-1:0] {
    LSU_NOP        = 5'd0,
    LSU_SET_ADDR   = 5'd1,
    LSU_SET_STRIDE = 5'd2,
    LSU_LD_L       = 5'd3,   // out <= lm[addr]; addr += stride
    LSU_ST_L       = 5'd4,   // lm[addr] <= A;   addr += stride
    LSU_LD_LB      = 5'd5,   // out <= lm[B]
    LSU_ST_LB      = 5'd6,   // lm[B] <= A
    LSU_LD_GW      = 5'd7,   // out <= gm word at addr; addr += stride
    LSU_ST_GW      = 5'd8,
    LSU_LD_GH      = 5'd9,   // out <= zero-extended gm half-word at addr
    LSU_ST_GH      = 5'd10
  } lsu_op_e;

  typedef enum logic [OPW-1:0] {
    RF_NOP = 5'd0,
    RF_WR  = 5'd1,   // rf[imm] <= A
    RF_RD  = 5'd2    // out <= rf[imm]
  } rf_op_e;

  typedef enum logic [OPW-1:0] {
    IMM_NOP = 5'd0,
    IMM_LDI = 5'd1,  // out <= sign-extended imm
    IMM_LDH = 5'd2   // out[31:16] <= imm
  } imm_op_e;

  typedef enum logic [OPW-1:0] {
    ABU_NOP  = 5'd0,
    ABU_SET  = 5'd1,  // acc <= sign-extended imm
    ABU_ACC  = 5'd2,  // acc <= acc + A
    ABU_DBNZ = 5'd3,  // acc <= acc - 1; branch to imm if the new acc != 0
    ABU_JMP  = 5'd4,  // branch to imm
    ABU_BNZ  = 5'd5,  // branch to imm if A != 0
    ABU_HALT = 5'd6   // stop the array
  } abu_op_e;

  // Switch-box source numbering: 0 is a constant zero, then the FU outputs.
  localparam int unsigned N_LSU = 4;
  localparam int unsigned N_ALU = 8;
  localparam int unsigned N_MUL = 4;
  localparam int unsigned N_RF  = 2;
  localparam int unsigned N_IMM = 2;
  localparam int unsigned N_ABU = 1;
  localparam int unsigned N_ID  = 13;
  localparam int unsigned N_FU  = N_LSU + N_ALU + N_MUL + N_RF + N_IMM + N_ABU;
  localparam int unsigned N_SRC = N_FU + 1;
  localparam int unsigned SELW  = $clog2(N_SRC);
  localparam int unsigned IDSW  = $clog2(N_ID);

  localparam int unsigned SRC_ZERO = 0;
  localparam int unsigned FU_LSU0  = 0;
  localparam int unsigned FU_ALU0  = FU_LSU0 + N_LSU;
  localparam int unsigned FU_MUL0  = FU_ALU0 + N_ALU;
  localparam int unsigned FU_RF0   = FU_MUL0 + N_MUL;
  localparam int unsigned FU_IMM0  = FU_RF0 + N_RF;
  localparam int unsigned FU_ABU0  = FU_IMM0 + N_IMM;

  // Source index of FU number f on the switch box.
  function automatic int unsigned src_of_fu(int unsigned f);
    return f + 1;
  endfunction

  // Host configuration spaces.
  typedef enum logic [1:0] {
    CFG_IM   = 2'd0,   // instruction memory of decoder cfg_addr[15:8], word cfg_addr[7:0]
    CFG_SWB  = 2'd1,   // source select of FU input: cfg_addr = {fu, port}
    CFG_BIND = 2'd2    // decoder that drives FU cfg_addr
  } cfg_space_e;

endpackage
