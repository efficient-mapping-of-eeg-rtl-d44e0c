// data_mem: global data memory shared by the host core and the Blocks array.
//
// 32-bit words with byte enables, addressed in bytes (word = addr / 4), as in
// the memory layout where two 16-bit channels share one word. Single port
// with a combinational read; the arbiter and the host take turns on it. The
// memory itself is named by the platform description; its size
// (4096 words = 16 KiB) and port timing are this design's choices.
module data_mem
  import blocks_pkg::*;
#(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned GAW   = 16
) (
  input  logic           clk,
  input  logic           en,
  input  logic           we,
  input  logic [GAW-1:0] addr,
  input  word_t          wdata,
  input  logic [3:0]     be,
  output word_t          rdata
);

  localparam int unsigned WAW = $clog2(WORDS);

  word_t          mem [WORDS];
  logic [WAW-1:0] waddr;

  assign waddr = addr[WAW+1:2];
  assign rdata = mem[waddr];

  always_ff @(posedge clk) begin
    if (en && we) begin
      for (int b = 0; b < 4; b++) begin
        if (be[b]) mem[waddr][8*b +: 8] <= wdata[8*b +: 8];
      end
    end
  end

endmodule
