// mem_arbiter: access arbiter between the LSUs and the shared data memory.
//
// The LSUs reach the shared data memory over one bus of BUS_W bits (8, 16 or
// 32; 32 by default). Every bus transaction costs 3 cycles: one to issue it
// and two added by the bus interface. A 32-bit bus moves any access in one
// transaction; a narrower bus needs one transaction per BUS_W-bit lane that
// the access's byte enables touch (a word over an 8-bit bus: 4 transactions,
// 12 cycles). While any LSU has a global access outstanding the whole array
// stalls (`stall` = 1, no FU or PC updates). Requests issued in the same
// instruction conflict and are served one after another, lowest LSU number
// first; the instruction completes (stall = 0) in the cycle the last access
// is done, so on the 32-bit bus an instruction with k global accesses takes
// 3k cycles.
//
// The selectable bus width, the 32-bit default, the 3-cycle transaction and
// the stalling of the array on a conflict follow the architecture
// description. Fixed priority, serving conflicting requests in turn, counting
// narrow-bus transactions from the byte enables and performing the whole
// access in its last cycle (the memory side stays 32 bits wide, so BUS_W sets
// timing only) are this design's choices.
//
// Memory side: single-port, combinational read. The access is performed in
// its last cycle (the third on the 32-bit bus) with mem_en = 1; a read word is delivered on rdata[i] in
// that cycle and held there until the instruction completes.
module mem_arbiter
  import blocks_pkg::*;
#(
  parameter int unsigned NREQ   = N_LSU,
  parameter int unsigned GAW    = 16,
  parameter int unsigned ACCESS = 3,     // cycles per bus transaction
  parameter int unsigned BUS_W  = 32     // bus width: 8, 16 or 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req   [NREQ],
  input  logic           we    [NREQ],
  input  logic [GAW-1:0] addr  [NREQ],
  input  word_t          wdata [NREQ],
  input  logic [3:0]     be    [NREQ],
  output word_t          rdata [NREQ],
  output logic           stall,
  output logic           conflict,       // more than one request in an instruction
  // memory port
  output logic           mem_en,
  output logic           mem_we,
  output logic [GAW-1:0] mem_addr,
  output word_t          mem_wdata,
  output logic [3:0]     mem_be,
  input  word_t          mem_rdata
);

  localparam int unsigned LANES = DW / BUS_W;          // transactions per word
  localparam int unsigned LB    = BUS_W / 8;           // bytes per transaction
  localparam int unsigned CW    = $clog2(ACCESS * LANES);

  // Transactions needed for one access: lanes with an enabled byte, at least 1.
  function automatic logic [CW-1:0] beats(logic [3:0] b);
    logic [CW-1:0] n;
    n = '0;
    for (int l = 0; l < LANES; l++) n = n + CW'(|b[l*LB +: LB]);
    return (n == '0) ? CW'(1) : n;
  endfunction

  logic [NREQ-1:0]            done, pending;
  logic [$clog2(NREQ)-1:0]    cur;
  logic                       any;
  logic [CW-1:0]              cnt;
  logic                       fin;        // access of `cur` performed this cycle
  logic                       last;       // it is the last one outstanding
  word_t                      held [NREQ];
  logic [$clog2(NREQ+1)-1:0]  nreq;

  always_comb begin
    nreq = '0;
    for (int i = 0; i < NREQ; i++) begin
      pending[i] = req[i] && !done[i];
      nreq       = nreq + {{($clog2(NREQ+1)-1){1'b0}}, req[i]};
    end
    any = |pending;
    cur = '0;
    for (int i = NREQ - 1; i >= 0; i--) begin
      if (pending[i]) cur = i[$clog2(NREQ)-1:0];
    end
  end

  logic [CW-1:0] dur;                     // cycles of the current access
  assign dur      = CW'(ACCESS) * beats(be[cur]);
  assign fin      = any && (cnt == dur - 1'b1);
  assign last     = fin && ((pending & ~(NREQ'(1) << cur)) == '0);
  assign stall    = any && !last;
  assign conflict = nreq > 1;

  assign mem_en    = fin;
  assign mem_we    = we[cur];
  assign mem_addr  = addr[cur];
  assign mem_wdata = wdata[cur];
  assign mem_be    = be[cur];

  always_comb begin
    for (int i = 0; i < NREQ; i++) begin
      rdata[i] = (fin && cur == i[$clog2(NREQ)-1:0]) ? mem_rdata : held[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      done <= '0;
      for (int i = 0; i < NREQ; i++) held[i] <= '0;
    end else begin
      if (!any) begin
        cnt <= '0;
      end else if (fin) begin
        cnt <= '0;
        held[cur] <= mem_rdata;
        done      <= last ? '0 : (done | (NREQ'(1) << cur));
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // A request may not change while it waits: the instruction is held.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n) (stall && req[cur]) |=> req[$past(cur)];
  endproperty
  assert property (p_req_stable);

endmodule
