// tb_blocks_top: end-to-end test of the Blocks array at its default size.
//
// The host loads a kernel and a 256-sample epoch, starts the array and checks
// the result against a reference model computed here. The kernel is one
// second-order section (SOS) of the 10th-order Butterworth band-pass filter in
// Direct Form I, with coefficients quantised to 11 bits and scaled by 256:
//   y[n] = x[n] + 2 x[n-1] + x[n-2] + ((-445 y[n-1] - 212 y[n-2]) >>> 8)
// (b = 1, 2, 1; feedback -1.73828125 and -0.828125). Multiplications by 1 are
// left out and the factor 2 and the final scaling use shift-by-multiply,
// as the array has no general shifter.
//
// Mapping (13 decoders, all FUs bound):
//   ID0 ABU: loop counter and branches      ID7  MUL0,MUL1 (SIMD): feedback products
//   ID1 LSU0: load x (half-word, stride 2)   ID8  MUL2,MUL3 (SIMD, >>8): P>>8 and 2*x[n-1]
//   ID2 LSU1: store y (half-word, stride 2)  ID9  IMM0, ID10 IMM1: constants
//   ID3 LSU2: y into local memory, read back ID11 RF0,RF1 (SIMD): constants 512, -212
//   ID4 ALU0: sign-extend x (add_se)         ID12 LSU3: store local copy as words
//   ID5 ALU1,ALU2,ALU4 (SIMD): delay lines x[n-1], x[n-2], y[n-2]
//   ID6 ALU3,ALU5,ALU6,ALU7 (SIMD add): x0+x2, sum, P, y
// The load of x[n] and the store of y[n-1] are issued in the same instruction,
// so every sample has one memory conflict (6 stall-inclusive cycles) and the
// loop takes 10 cycles per sample. After the loop the local-memory copy of y
// is read back and written out as 32-bit words. Expected run time:
// 14*N + 8 busy cycles.
//
// Counted mechanisms (each must occur): stalls on the shared bus, memory
// conflicts, taken branches, SIMD issue, sign extension of negative samples,
// local-memory reads, register-file reads.
module tb_blocks_top;
  import blocks_pkg::*;

  localparam int N      = 256;
  localparam int X_BASE = 0;
  localparam int Y_BASE = 1024;
  localparam int Z_BASE = 2048;
  localparam int IMD    = 64;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  cfg_space_e cfg_space;
  logic [15:0] cfg_addr;
  logic [31:0] cfg_data;
  logic host_we = 0;
  logic [15:0] host_addr;
  word_t host_wdata, host_rdata;
  logic [3:0] host_be;
  logic start = 0, busy, done, stall, conflict, branch;

  blocks_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] prog [N_ID][IMD];
  int x [N];
  int y [N];

  // mechanism counters
  int n_busy = 0, n_stall = 0, n_conflict = 0, n_branch = 0, n_simd = 0, n_negse = 0, n_ldl = 0, n_rfrd = 0;

  always @(posedge clk) if (rst_n && busy) begin
    n_busy++;
    if (stall) n_stall++;
    if (conflict && stall) n_conflict++;
    if (!stall) begin
      if (branch) n_branch++;
      if (dut.fu_instr[FU_ALU0 + 1].op != 0 && dut.fu_instr[FU_ALU0 + 2].op == dut.fu_instr[FU_ALU0 + 1].op)
        n_simd++;
      if (dut.fu_instr[FU_ALU0].op == OPW'(ALU_ADD_SE) && dut.sink[2 * FU_ALU0][15]) n_negse++;
      if (dut.fu_instr[FU_LSU0 + 2].op == OPW'(LSU_LD_L)) n_ldl++;
      if (dut.fu_instr[FU_RF0].op == OPW'(RF_RD)) n_rfrd++;
    end
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("TOP check failed: %s", what);
    end
  endtask

  task automatic put(int d, int pc, logic [4:0] op, int imm_v);
    prog[d][pc] = {op, 11'd0, 16'(imm_v)};
  endtask

  task automatic cfg(cfg_space_e s, int a, int v);
    @(negedge clk);
    cfg_we = 1; cfg_space = s; cfg_addr = 16'(a); cfg_data = 32'(v);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic route(int fu, int port, int src_fu);
    cfg(CFG_SWB, 2 * fu + port, src_fu < 0 ? 0 : src_fu + 1);
  endtask

  task automatic host_write(int a, word_t v, logic [3:0] b);
    @(negedge clk);
    host_we = 1; host_addr = 16'(a); host_wdata = v; host_be = b;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic host_read(input int a, output word_t v);
    host_addr = 16'(a);
    #1 v = host_rdata;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int ALU0 = FU_ALU0, MUL0 = FU_MUL0, RF0 = FU_RF0, IMM0 = FU_IMM0, ABU = FU_ABU0;

  initial begin
    int cycles;
    cfg_space = CFG_IM; cfg_addr = '0; cfg_data = '0;
    host_addr = '0; host_wdata = '0; host_be = '0;
    for (int d = 0; d < N_ID; d++) for (int p = 0; p < IMD; p++) prog[d][p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ------------------------------------------------------------ program
    // prologue
    put(9, 0, IMM_LDI, 512);          put(10, 0, IMM_LDI, -212);
    put(1, 0, LSU_SET_ADDR, X_BASE);  put(2, 0, LSU_SET_ADDR, Y_BASE - 2);
    put(3, 0, LSU_SET_ADDR, 255);     put(0, 0, ABU_SET, N);
    put(11, 1, RF_WR, 0);
    put(1, 1, LSU_SET_STRIDE, 2);     put(2, 1, LSU_SET_STRIDE, 2);
    put(3, 1, LSU_SET_STRIDE, 1);     put(12, 1, LSU_SET_ADDR, Z_BASE);
    put(11, 2, RF_RD, 0);
    put(9, 2, IMM_LDI, -445);         put(10, 2, IMM_LDI, 1);
    put(12, 2, LSU_SET_STRIDE, 4);
    // sample loop, pc 3..7
    put(1, 3, LSU_LD_GH, 0);          put(2, 3, LSU_ST_GH, 0);
    put(3, 3, LSU_ST_L, 0);           put(5, 3, ALU_PASS, 0);
    put(7, 3, MUL_MUL, 0);
    put(4, 4, ALU_ADD_SE, 0);
    for (int p = 4; p <= 7; p++) put(6, p, ALU_ADD, 0);
    for (int p = 4; p <= 6; p++) put(8, p, MUL_SHR8, 0);
    put(0, 7, ABU_DBNZ, 3);
    // epilogue: last store, then copy the local memory out
    put(2, 8, LSU_ST_GH, 0);          put(3, 8, LSU_ST_L, 0);
    put(0, 8, ABU_SET, N);
    put(3, 9, LSU_SET_ADDR, 0);
    put(3, 10, LSU_LD_L, 0);
    put(12, 11, LSU_ST_GW, 0);        put(0, 11, ABU_DBNZ, 10);
    put(0, 12, ABU_HALT, 0);

    // ------------------------------------------------------------ load kernel
    for (int d = 0; d < N_ID; d++)
      for (int p = 0; p < IMD; p++) cfg(CFG_IM, (d << 8) | p, prog[d][p]);
    // decoder binding
    cfg(CFG_BIND, ABU, 0);
    cfg(CFG_BIND, FU_LSU0 + 0, 1);  cfg(CFG_BIND, FU_LSU0 + 1, 2);
    cfg(CFG_BIND, FU_LSU0 + 2, 3);  cfg(CFG_BIND, FU_LSU0 + 3, 12);
    cfg(CFG_BIND, ALU0 + 0, 4);
    cfg(CFG_BIND, ALU0 + 1, 5);     cfg(CFG_BIND, ALU0 + 2, 5);  cfg(CFG_BIND, ALU0 + 4, 5);
    cfg(CFG_BIND, ALU0 + 3, 6);     cfg(CFG_BIND, ALU0 + 5, 6);
    cfg(CFG_BIND, ALU0 + 6, 6);     cfg(CFG_BIND, ALU0 + 7, 6);
    cfg(CFG_BIND, MUL0 + 0, 7);     cfg(CFG_BIND, MUL0 + 1, 7);
    cfg(CFG_BIND, MUL0 + 2, 8);     cfg(CFG_BIND, MUL0 + 3, 8);
    cfg(CFG_BIND, IMM0 + 0, 9);     cfg(CFG_BIND, IMM0 + 1, 10);
    cfg(CFG_BIND, RF0 + 0, 11);     cfg(CFG_BIND, RF0 + 1, 11);
    // switch box
    route(FU_LSU0 + 1, 0, ALU0 + 7);
    route(FU_LSU0 + 2, 0, ALU0 + 7);
    route(FU_LSU0 + 3, 0, FU_LSU0 + 2);
    route(ALU0 + 0, 0, FU_LSU0);      route(ALU0 + 0, 1, -1);
    route(ALU0 + 1, 0, ALU0 + 0);
    route(ALU0 + 2, 0, ALU0 + 1);
    route(ALU0 + 3, 0, ALU0 + 0);     route(ALU0 + 3, 1, ALU0 + 2);
    route(ALU0 + 4, 0, ALU0 + 7);
    route(ALU0 + 5, 0, ALU0 + 3);     route(ALU0 + 5, 1, MUL0 + 3);
    route(ALU0 + 6, 0, MUL0 + 0);     route(ALU0 + 6, 1, MUL0 + 1);
    route(ALU0 + 7, 0, ALU0 + 5);     route(ALU0 + 7, 1, MUL0 + 2);
    route(MUL0 + 0, 0, ALU0 + 7);     route(MUL0 + 0, 1, IMM0 + 0);
    route(MUL0 + 1, 0, ALU0 + 4);     route(MUL0 + 1, 1, RF0 + 1);
    route(MUL0 + 2, 0, ALU0 + 6);     route(MUL0 + 2, 1, IMM0 + 1);
    route(MUL0 + 3, 0, ALU0 + 1);     route(MUL0 + 3, 1, RF0 + 0);
    route(RF0 + 0, 0, IMM0 + 0);
    route(RF0 + 1, 0, IMM0 + 1);

    // ------------------------------------------------------------ data
    for (int i = 0; i < N; i++) x[i] = $urandom_range(0, 200) - 100;
    for (int i = 0; i < N; i += 2)
      host_write(X_BASE + 2 * i, {16'(x[i + 1]), 16'(x[i])}, 4'hF);
    host_write(Y_BASE - 4, 32'hFFFF_FFFF, 4'hF);
    // reference
    for (int n = 0; n < N; n++) begin
      int x1, x2, y1, y2, p;
      x1 = (n >= 1) ? x[n - 1] : 0;  x2 = (n >= 2) ? x[n - 2] : 0;
      y1 = (n >= 1) ? y[n - 1] : 0;  y2 = (n >= 2) ? y[n - 2] : 0;
      p = -445 * y1 - 212 * y2;
      y[n] = x[n] + 2 * x1 + x2 + (p >>> 8);
    end

    // ------------------------------------------------------------ run
    @(negedge clk);
    chk(!busy && !done, "idle before start");
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    cycles = n_busy;
    $display("SOS kernel, %0d samples: %0d cycles (expected %0d)", N, cycles, 14 * N + 8);
    chk(cycles == 14 * N + 8, "cycle count");

    // ------------------------------------------------------------ results
    for (int n = 0; n < N; n++) begin
      word_t w;
      logic [15:0] h;
      host_read(Y_BASE + 2 * n, w);
      h = n[0] ? w[31:16] : w[15:0];
      chk(h == 16'(y[n]), $sformatf("y[%0d] half-word: got %0d exp %0d", n, $signed(h), y[n]));
      host_read(Z_BASE + 4 * n, w);
      chk(w == 32'(y[n]), $sformatf("local copy y[%0d]: got %0d exp %0d", n, $signed(w), y[n]));
    end
    begin
      word_t w;
      host_read(Y_BASE - 4, w);
      chk(w == 32'h0000_FFFF, "first store writes the initial zero into the half-word before y[0]");
    end

    $display("mechanisms: stall=%0d conflict=%0d branch=%0d simd=%0d neg_sign_ext=%0d local_loads=%0d rf_reads=%0d",
             n_stall, n_conflict, n_branch, n_simd, n_negse, n_ldl, n_rfrd);
    chk(n_stall > 0, "stall occurred");
    chk(n_conflict > 0, "conflict occurred");
    chk(n_branch > 0, "branch occurred");
    chk(n_simd > 0, "SIMD issue occurred");
    chk(n_negse > 0, "sign extension of a negative sample occurred");
    chk(n_ldl > 0, "local memory read occurred");
    chk(n_rfrd > 0, "register file read occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
