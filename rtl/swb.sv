// swb: switch box of the Blocks array.
//
// The interconnect that makes the array reconfigurable: every FU input port
// takes its operand from one source, chosen by a select register written
// when a kernel is loaded. Source 0 is a constant zero; source f+1 is the
// registered output of FU f. Because the routing is held in registers and not
// in the instruction stream, FUs that share one instruction decoder still
// read different operands, which is what lets one decoder drive several FUs
// as SIMD lanes.
//
// The architecture description names the switch boxes and says they allow
// reconfiguration at run time; a full crossbar, one select per input port
// and loading through the host configuration port are this design's choices.
//
// Timing: the data path is combinational (FU output register to FU input).
// A select write takes effect on the next clock edge.
module swb
  import blocks_pkg::*;
#(
  parameter int unsigned NSRC  = N_SRC,
  parameter int unsigned NSINK = 2 * N_FU,
  parameter int unsigned SW    = $clog2(NSRC)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic [$clog2(NSINK)-1:0] cfg_sink,
  input  logic [SW-1:0]            cfg_sel,
  input  word_t                    src  [NSRC],
  output word_t                    sink [NSINK]
);

  logic [SW-1:0] sel [NSINK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSINK; i++) sel[i] <= '0;
    end else if (cfg_we) begin
      sel[cfg_sink] <= cfg_sel;
    end
  end

  always_comb begin
    for (int i = 0; i < NSINK; i++) begin
      sink[i] = (32'(sel[i]) < NSRC) ? src[sel[i]] : '0;
    end
  end

endmodule
