// id: instruction decoder of the Blocks array, with its instruction memory.
//
// Each decoder holds the instruction stream of the FUs bound to it. All
// decoders read the word at the shared program counter, so together they form
// one very-long-instruction word; several FUs bound to one decoder execute the
// same operation in lock step (SIMD). The host writes the instruction memory
// when a kernel is loaded, which is the cost of loading a kernel.
//
// The decoder-plus-memory pairing and the free binding of decoders to FUs
// follow the architecture description. The memory depth (64 words) and the
// instruction word layout (blocks_pkg::instr_t) are this design's choices;
// the description gives neither. While the array is idle the decoder outputs
// a NOP.
//
// Timing: the instruction at `pc` is read combinationally and is executed in
// the same cycle. A write takes effect on the next clock edge.
module id
  import blocks_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned PCW   = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           active,
  input  logic [PCW-1:0] pc,
  input  logic           wr_en,
  input  logic [PCW-1:0] wr_addr,
  input  logic [IW-1:0]  wr_data,
  output instr_t         instr
);

  logic [IW-1:0] im [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) im[wr_addr] <= wr_data;
  end

  assign instr = active ? instr_t'(im[pc]) : '0;

endmodule
