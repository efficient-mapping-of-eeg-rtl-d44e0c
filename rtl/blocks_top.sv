// blocks_top: an instance of the Blocks coarse-grain reconfigurable array
// together with the shared data memory it works on.
//
// Blocks separates control from data: functional units (FUs) compute, the
// switch box routes FU outputs to FU inputs, and instruction decoders (IDs)
// issue operations. Any ID can drive any set of FUs, so one program can use
// some IDs as scalar VLIW slots and others as SIMD decoders for several lanes.
// This instance has the FU counts proposed for the EEG kernels (FFT, lifting
// wavelet, cascaded second-order-section filter): 13 IDs, 4 load-store units
// (each with a 256-word local memory), 8 ALUs, 4 multipliers, 1
// accumulate-branch unit (program counter), 2 immediate units and 2 register
// files, on a 32-bit datapath. All LSUs share one bus to the data memory
// (BUS_W = 8, 16 or 32 bits, 32 by default). Each bus transaction costs 3
// cycles and stalls the array; accesses issued in the same cycle are served
// in turn.
//
// Those counts, widths, the memory sizes per LSU and the bus timing follow
// the architecture description. Its figure of the instance is not reproduced
// here: the full-crossbar switch box, the instruction format, the host
// configuration port and the host/array sharing of the memory are this
// design's choices. The host core of the platform is not part of the design;
// its place is taken by the host ports.
//
// Interface:
//   cfg_*   : while the array is idle, the host writes instruction memories
//             (CFG_IM: addr[15:8] = decoder, addr[7:0] = word), switch-box
//             selects (CFG_SWB: addr = 2*FU + port, data = source) and the
//             decoder bound to each FU (CFG_BIND: addr = FU, data = decoder).
//   host_*  : host access to the data memory (byte address, 32-bit words,
//             combinational read); writes are taken only while the array is
//             idle.
//   start   : one-cycle pulse; the array runs from PC 0 until an ABU HALT,
//             then raises `done` (held until the next start).
//   stall, conflict, branch : per-cycle status for observation.
//
// FU numbering on the switch box (source = FU + 1, source 0 = zero):
//   LSU 0-3, ALU 4-11, MUL 12-15, RF 16-17, IMM 18-19, ABU 20.
module blocks_top
  import blocks_pkg::*;
#(
  parameter int unsigned IM_DEPTH = 64,
  parameter int unsigned LM_DEPTH = 256,
  parameter int unsigned GM_WORDS = 4096,
  parameter int unsigned RF_DEPTH = 16,
  parameter int unsigned GAW      = 16,
  parameter int unsigned BUS_W    = 32     // shared-bus width: 8, 16 or 32
) (
  input  logic           clk,
  input  logic           rst_n,
  // configuration (kernel loading)
  input  logic           cfg_we,
  input  cfg_space_e     cfg_space,
  input  logic [15:0]    cfg_addr,
  input  logic [31:0]    cfg_data,
  // host access to the shared data memory
  input  logic           host_we,
  input  logic [GAW-1:0] host_addr,
  input  word_t          host_wdata,
  input  logic [3:0]     host_be,
  output word_t          host_rdata,
  // control and status
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           stall,
  output logic           conflict,
  output logic           branch
);

  localparam int unsigned PCW   = $clog2(IM_DEPTH);
  localparam int unsigned NSINK = 2 * N_FU;
  localparam int unsigned SW    = $clog2(N_SRC);

  // ---------------------------------------------------------------- control
  logic           run, en, halt;
  logic [PCW-1:0] pc;
  instr_t               id_instr [N_ID];
  logic [IDSW-1:0]      bind_q   [N_FU];
  instr_t               fu_instr [N_FU];

  assign en   = run && !stall;
  assign busy = run;
  assign done = halt && !run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       run <= 1'b0;
    else if (start && !run)           run <= 1'b1;
    else if (en && fu_instr[FU_ABU0].op == OPW'(ABU_HALT)) run <= 1'b0;
  end

  // ---------------------------------------------------- instruction decoders

  for (genvar d = 0; d < N_ID; d++) begin : g_id
    id #(.DEPTH(IM_DEPTH)) u_id (
      .clk     (clk),
      .active  (run),
      .pc      (pc),
      .wr_en   (cfg_we && !run && cfg_space == CFG_IM && cfg_addr[15:8] == 8'(d)),
      .wr_addr (cfg_addr[PCW-1:0]),
      .wr_data (cfg_data),
      .instr   (id_instr[d])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < N_FU; f++) bind_q[f] <= '0;
    end else if (cfg_we && !run && cfg_space == CFG_BIND && 32'(cfg_addr) < N_FU) begin
      bind_q[cfg_addr[$clog2(N_FU)-1:0]] <= cfg_data[IDSW-1:0];
    end
  end

  always_comb begin
    for (int f = 0; f < N_FU; f++) begin
      fu_instr[f] = (32'(bind_q[f]) < N_ID) ? id_instr[bind_q[f]] : '0;
    end
  end

  // ------------------------------------------------------------- switch box
  word_t src  [N_SRC];
  word_t sink [NSINK];
  word_t fu_out [N_FU];

  always_comb begin
    src[0] = '0;
    for (int f = 0; f < N_FU; f++) src[f + 1] = fu_out[f];
  end

  swb #(.NSRC(N_SRC), .NSINK(NSINK)) u_swb (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_we   (cfg_we && !run && cfg_space == CFG_SWB),
    .cfg_sink (cfg_addr[$clog2(NSINK)-1:0]),
    .cfg_sel  (cfg_data[SW-1:0]),
    .src      (src),
    .sink     (sink)
  );

  // --------------------------------------------------------- load-store units
  logic           gm_req   [N_LSU];
  logic           gm_we    [N_LSU];
  logic [GAW-1:0] gm_addr  [N_LSU];
  word_t          gm_wdata [N_LSU];
  logic [3:0]     gm_be    [N_LSU];
  word_t          gm_rdata [N_LSU];

  for (genvar i = 0; i < N_LSU; i++) begin : g_lsu
    localparam int unsigned F = FU_LSU0 + i;
    lsu #(.LM_DEPTH(LM_DEPTH), .GAW(GAW)) u_lsu (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (en),
      .active   (run),
      .instr    (fu_instr[F]),
      .a        (sink[2*F]),
      .b        (sink[2*F+1]),
      .out      (fu_out[F]),
      .gm_req   (gm_req[i]),
      .gm_we    (gm_we[i]),
      .gm_addr  (gm_addr[i]),
      .gm_wdata (gm_wdata[i]),
      .gm_be    (gm_be[i]),
      .gm_rdata (gm_rdata[i])
    );
  end

  for (genvar i = 0; i < N_ALU; i++) begin : g_alu
    localparam int unsigned F = FU_ALU0 + i;
    alu u_alu (
      .clk (clk), .rst_n (rst_n), .en (en), .instr (fu_instr[F]),
      .a (sink[2*F]), .b (sink[2*F+1]), .out (fu_out[F])
    );
  end

  for (genvar i = 0; i < N_MUL; i++) begin : g_mul
    localparam int unsigned F = FU_MUL0 + i;
    mul u_mul (
      .clk (clk), .rst_n (rst_n), .en (en), .instr (fu_instr[F]),
      .a (sink[2*F]), .b (sink[2*F+1]), .out (fu_out[F])
    );
  end

  for (genvar i = 0; i < N_RF; i++) begin : g_rf
    localparam int unsigned F = FU_RF0 + i;
    rf #(.DEPTH(RF_DEPTH)) u_rf (
      .clk (clk), .rst_n (rst_n), .en (en), .instr (fu_instr[F]),
      .a (sink[2*F]), .out (fu_out[F])
    );
  end

  for (genvar i = 0; i < N_IMM; i++) begin : g_imm
    localparam int unsigned F = FU_IMM0 + i;
    imm u_imm (
      .clk (clk), .rst_n (rst_n), .en (en), .instr (fu_instr[F]),
      .out (fu_out[F])
    );
  end

  abu #(.PCW(PCW)) u_abu (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start && !run),
    .en    (en),
    .instr (fu_instr[FU_ABU0]),
    .a     (sink[2*FU_ABU0]),
    .out   (fu_out[FU_ABU0]),
    .pc    (pc),
    .halt  (halt),
    .taken (branch)
  );

  // ------------------------------------------------- shared memory and bus
  logic           mem_en, mem_we;
  logic [GAW-1:0] mem_addr;
  word_t          mem_wdata, mem_rdata;
  logic [3:0]     mem_be;

  mem_arbiter #(.NREQ(N_LSU), .GAW(GAW), .BUS_W(BUS_W)) u_arb (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (gm_req),
    .we        (gm_we),
    .addr      (gm_addr),
    .wdata     (gm_wdata),
    .be        (gm_be),
    .rdata     (gm_rdata),
    .stall     (stall),
    .conflict  (conflict),
    .mem_en    (mem_en),
    .mem_we    (mem_we),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata),
    .mem_be    (mem_be),
    .mem_rdata (mem_rdata)
  );

  logic           dm_en, dm_we;
  logic [GAW-1:0] dm_addr;
  word_t          dm_wdata;
  logic [3:0]     dm_be;

  always_comb begin
    if (run) begin
      dm_en = mem_en;  dm_we = mem_we;  dm_addr = mem_addr;
      dm_wdata = mem_wdata;  dm_be = mem_be;
    end else begin
      dm_en = host_we; dm_we = host_we; dm_addr = host_addr;
      dm_wdata = host_wdata; dm_be = host_be;
    end
  end

  data_mem #(.WORDS(GM_WORDS), .GAW(GAW)) u_dm (
    .clk   (clk),
    .en    (dm_en),
    .we    (dm_we),
    .addr  (dm_addr),
    .wdata (dm_wdata),
    .be    (dm_be),
    .rdata (mem_rdata)
  );

  assign host_rdata = mem_rdata;

  // The array's memory accesses happen only while it runs.
  assert property (@(posedge clk) disable iff (!rst_n) mem_en |-> run);

endmodule
