// tb_sos_cascade: the cascaded 10th-order Butterworth band-pass filter (five
// second-order sections, SOS) run on the Blocks array at its default size,
// over a two-channel 256-sample epoch.
//
// The epoch is stored packed, two 16-bit channels per 32-bit word (channel 0
// in bits 15:0, channel 1 in bits 31:16). Each run filters one channel
// through one pass of one kernel. The host rewrites a few constants and
// switch-box selects between runs and ping-pongs between two buffers, so
// every pass reads the previous pass's 16-bit output. The coefficients are
// the 11-bit quantised ones, all exact multiples of 1/256 (b = feed-forward,
// c = feedback, y[n] = sum b x + sum c y):
//   section 1: b = (0.5390625, 1.08203125, 0.54296875), c = (-1.51953125, -0.59765625)
//   section 2: b = (1,  2,  1), c = (-1.73828125, -0.828125)
//   section 3: b = (1,  0, -1), c = ( 0.21484375,  0.6796875)
//   section 4: b = (1, -2,  1), c = ( 1.8984375,  -0.90234375)
//   section 5: b = (1, -2,  1), c = ( 1.95703125, -0.9609375)
// Integer form, coefficients x 256:
//   y[n] = x[n] + b1 x[n-1] + b2 x[n-2] + ((256c1 y[n-1] + 256c2 y[n-2]) >>> 8)
//
// The kernel is the one of tb_blocks_top, and three routings of it are used:
//   NORM  (sections 2, 4, 5): MUL3 forms (x[n-1] * 256 b1) >>> 8, and ALU3
//         adds x[n] + x[n-2].
//   NEGX2 (section 3): b1 = 0 and b2 = -1. MUL3 is rerouted to x[n-2] with
//         the constant -256, and ALU3 takes zero instead of x[n-2].
//   FIR   (section 1, first pass): section 1 has three non-unit feed-forward
//         taps, one more multiply than the kernel has free. It is split as in
//         a direct-form-I structure: first the feed-forward part, with MUL0,
//         MUL1 and MUL3 on x and the feedback adders left idle, then a
//         feedback-only pass (NEGX2 routing with the constant 0).
// Other changes per run:
//   - The input and output address counters start at the channel's half-word
//     and step by 4 bytes.
//   - The FU output registers still hold the previous run's filter state, so
//     a fourth prologue cycle clears the delay lines and y[n-1]. The loop
//     moves down by one instruction.
// Each run takes 14*N + 9 busy cycles, which is checked. The reference model
// keeps y at full precision in the recursion and truncates to 16 bits where
// a value is stored, as the array does.
module tb_sos_cascade;
  import blocks_pkg::*;

  localparam int N      = 256;
  localparam int BUF_A  = 64;     // byte address of ping-pong buffer A
  localparam int BUF_B  = 2048;   // byte address of ping-pong buffer B
  localparam int Z_BASE = 3200;   // local-memory copy of the last run's output
  localparam int IMD    = 64;
  localparam int NPASS  = 6;

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
  int x   [2][N];          // input epoch per channel
  int ref_y [2][N];        // reference output of the current section
  int n_busy = 0, n_stall = 0, n_conflict = 0, n_branch = 0;

  // Pass table. Modes: NORM  y = x0 + (k0 x1 >>> 8) + x2 + ((k2 y1 + k1 y2) >>> 8)
  //                   NEGX2 y = x0 + (k0 x2 >>> 8)      + ((k2 y1 + k1 y2) >>> 8)
  //                   FIR   y = (k0 x0 >>> 8) + ((k2 x1 + k1 x2) >>> 8)
  // k0 is loaded into RF0, k1 into RF1 and k2 into IMM0 (all x 256).
  typedef enum int {NORM, NEGX2, FIR} mode_e;
  string pass_name [NPASS] = '{"1 (feed-forward)", "1 (feedback)", "2", "3", "4", "5"};
  mode_e pass_mode [NPASS] = '{FIR, NEGX2, NORM, NEGX2, NORM, NORM};
  int    pass_k0   [NPASS] = '{138, 0, 512, -256, -512, -512};
  int    pass_k1   [NPASS] = '{139, -153, -212, 174, -231, -246};
  int    pass_k2   [NPASS] = '{277, -389, -445, 55, 486, 501};

  always @(posedge clk) if (rst_n && busy) begin
    n_busy++;
    if (stall) n_stall++;
    if (conflict && stall) n_conflict++;
    if (!stall && branch) n_branch++;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("SOS check failed: %s", what);
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

  task automatic load_word(int d, int pc);
    cfg(CFG_IM, (d << 8) | pc, prog[d][pc]);
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

  function automatic int s16(int v);
    return int'($signed(16'(v)));
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int ALU0 = FU_ALU0, MUL0 = FU_MUL0, RF0 = FU_RF0, IMM0 = FU_IMM0, ABU = FU_ABU0;

  initial begin
    int runs = 0;
    cfg_space = CFG_IM; cfg_addr = '0; cfg_data = '0;
    host_addr = '0; host_wdata = '0; host_be = '0;
    for (int d = 0; d < N_ID; d++) for (int p = 0; p < IMD; p++) prog[d][p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ------------------------------------------------------------ kernel
    // pc 0..3 prologue (constants, address counters, cleared state), pc 4..8
    // sample loop, pc 9 last store, pc 10..12 copy of the local memory,
    // pc 13 halt.
    // Words marked "per run" are rewritten before every run.
    put(9, 0, IMM_LDI, 512);          put(10, 0, IMM_LDI, -212);     // per run
    put(1, 0, LSU_SET_ADDR, BUF_A);   put(2, 0, LSU_SET_ADDR, BUF_B); // per run
    put(3, 0, LSU_SET_ADDR, 255);     put(0, 0, ABU_SET, N);
    put(11, 1, RF_WR, 0);
    put(1, 1, LSU_SET_STRIDE, 4);     put(2, 1, LSU_SET_STRIDE, 4);
    put(3, 1, LSU_SET_STRIDE, 1);     put(12, 1, LSU_SET_ADDR, Z_BASE);
    put(11, 2, RF_RD, 0);
    put(9, 2, IMM_LDI, 445);          put(10, 2, IMM_LDI, 1);        // per run
    put(12, 2, LSU_SET_STRIDE, 4);
    // filter state from the previous run lives in the FU output registers:
    // clear the delay lines (AND with the zero source) and pass a zero down
    // the adder chain ALU0 -> ALU3 -> ALU5 -> ALU7 (y[n-1])
    put(4, 0, ALU_AND, 0);            put(5, 0, ALU_AND, 0);
    for (int p = 1; p <= 3; p++) put(6, p, ALU_PASS, 0);
    put(1, 4, LSU_LD_GH, 0);          put(2, 4, LSU_ST_GH, 0);
    put(3, 4, LSU_ST_L, 0);           put(5, 4, ALU_PASS, 0);
    put(7, 4, MUL_MUL, 0);
    put(4, 5, ALU_ADD_SE, 0);
    for (int p = 5; p <= 8; p++) put(6, p, ALU_ADD, 0);
    for (int p = 5; p <= 7; p++) put(8, p, MUL_SHR8, 0);
    put(0, 8, ABU_DBNZ, 4);
    put(2, 9, LSU_ST_GH, 0);          put(3, 9, LSU_ST_L, 0);
    put(0, 9, ABU_SET, N);
    put(3, 10, LSU_SET_ADDR, 0);
    put(3, 11, LSU_LD_L, 0);
    put(12, 12, LSU_ST_GW, 0);        put(0, 12, ABU_DBNZ, 11);
    put(0, 13, ABU_HALT, 0);
    for (int d = 0; d < N_ID; d++)
      for (int p = 0; p < IMD; p++) load_word(d, p);

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
    route(FU_LSU0 + 1, 0, ALU0 + 7);
    route(FU_LSU0 + 2, 0, ALU0 + 7);
    route(FU_LSU0 + 3, 0, FU_LSU0 + 2);
    route(ALU0 + 0, 0, FU_LSU0);      route(ALU0 + 0, 1, -1);
    route(ALU0 + 1, 0, ALU0 + 0);
    route(ALU0 + 2, 0, ALU0 + 1);
    route(ALU0 + 3, 0, ALU0 + 0);
    route(ALU0 + 4, 0, ALU0 + 7);
    route(ALU0 + 5, 0, ALU0 + 3);     route(ALU0 + 5, 1, MUL0 + 3);
    route(ALU0 + 6, 0, MUL0 + 0);     route(ALU0 + 6, 1, MUL0 + 1);
    route(ALU0 + 7, 0, ALU0 + 5);     route(ALU0 + 7, 1, MUL0 + 2);
    route(MUL0 + 0, 0, ALU0 + 7);     route(MUL0 + 0, 1, IMM0 + 0);
    route(MUL0 + 1, 0, ALU0 + 4);     route(MUL0 + 1, 1, RF0 + 1);
    route(MUL0 + 2, 0, ALU0 + 6);     route(MUL0 + 2, 1, IMM0 + 1);
    route(MUL0 + 3, 1, RF0 + 0);
    route(RF0 + 0, 0, IMM0 + 0);
    route(RF0 + 1, 0, IMM0 + 1);

    // ------------------------------------------------------------ epoch
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < N; i++) x[c][i] = $urandom_range(0, 400) - 200;
    for (int i = 0; i < N; i++)
      host_write(BUF_A + 4 * i, {16'(x[1][i]), 16'(x[0][i])}, 4'hF);

    // ------------------------------------------------------------ sections
    for (int s = 0; s < NPASS; s++) begin
      automatic int src = (s % 2 == 0) ? BUF_A : BUF_B;
      automatic int dst = (s % 2 == 0) ? BUF_B : BUF_A;
      // routing of this pass's multiplier and adder inputs
      case (pass_mode[s])
        NORM: begin
          route(MUL0 + 0, 0, ALU0 + 7);   // MUL0 = y[n-1] * k2
          route(MUL0 + 1, 0, ALU0 + 4);   // MUL1 = y[n-2] * k1
          route(MUL0 + 3, 0, ALU0 + 1);   // MUL3 = (x[n-1] * k0) >>> 8
          route(ALU0 + 3, 0, ALU0 + 0);   // ALU3 = x[n] + x[n-2]
          route(ALU0 + 3, 1, ALU0 + 2);
        end
        NEGX2: begin
          route(MUL0 + 0, 0, ALU0 + 7);
          route(MUL0 + 1, 0, ALU0 + 4);
          route(MUL0 + 3, 0, ALU0 + 2);   // MUL3 = (x[n-2] * k0) >>> 8
          route(ALU0 + 3, 0, ALU0 + 0);   // ALU3 = x[n]
          route(ALU0 + 3, 1, -1);
        end
        default: begin
          // MUL0/MUL1 work in the load slot, where ALU0 and ALU1 still hold
          // x[n-1] and x[n-2]; MUL3 sees the new x[n] from the next slot on.
          route(MUL0 + 0, 0, ALU0 + 0);   // MUL0 = x[n-1] * k2
          route(MUL0 + 1, 0, ALU0 + 1);   // MUL1 = x[n-2] * k1
          route(MUL0 + 3, 0, ALU0 + 0);   // MUL3 = (x[n] * k0) >>> 8
          route(ALU0 + 3, 0, -1);         // ALU3 = 0
          route(ALU0 + 3, 1, -1);
        end
      endcase
      for (int c = 0; c < 2; c++) begin
        automatic int cyc0;
        put(9, 0, IMM_LDI, pass_k0[s]);
        put(10, 0, IMM_LDI, pass_k1[s]);
        put(9, 2, IMM_LDI, pass_k2[s]);
        put(1, 0, LSU_SET_ADDR, src + 2 * c);
        put(2, 0, LSU_SET_ADDR, dst + 2 * c - 4);
        load_word(9, 0); load_word(10, 0); load_word(9, 2);
        load_word(1, 0); load_word(2, 0);

        // reference for this channel and section
        for (int n = 0; n < N; n++) begin
          automatic int x1 = (n >= 1) ? x[c][n - 1] : 0;
          automatic int x2 = (n >= 2) ? x[c][n - 2] : 0;
          automatic int y1 = (n >= 1) ? ref_y[c][n - 1] : 0;
          automatic int y2 = (n >= 2) ? ref_y[c][n - 2] : 0;
          case (pass_mode[s])
            NORM:    ref_y[c][n] = x[c][n] + ((pass_k0[s] * x1) >>> 8) + x2
                                   + ((pass_k2[s] * y1 + pass_k1[s] * y2) >>> 8);
            NEGX2:   ref_y[c][n] = x[c][n] + ((pass_k0[s] * x2) >>> 8)
                                   + ((pass_k2[s] * y1 + pass_k1[s] * y2) >>> 8);
            default: ref_y[c][n] = ((pass_k0[s] * x[c][n]) >>> 8)
                                   + ((pass_k2[s] * x1 + pass_k1[s] * x2) >>> 8);
          endcase
        end

        cyc0 = n_busy;
        @(negedge clk);
        start = 1;
        @(negedge clk);
        start = 0;
        while (!done) @(negedge clk);
        runs++;
        chk(n_busy - cyc0 == 14 * N + 9,
            $sformatf("section %s ch %0d: %0d cycles, expected %0d",
                      pass_name[s], c, n_busy - cyc0, 14 * N + 9));

        for (int n = 0; n < N; n++) begin
          word_t w;
          logic [15:0] h;
          host_read(dst + 4 * n, w);
          h = c ? w[31:16] : w[15:0];
          chk(h == 16'(ref_y[c][n]),
              $sformatf("section %s ch %0d y[%0d]: got %0d exp %0d",
                        pass_name[s], c, n, $signed(h), s16(ref_y[c][n])));
          // channel 0's result, already in x[0], must survive channel 1's run
          if (c == 1)
            chk(w[15:0] == 16'(x[0][n]),
                $sformatf("section %s: channel 0 half of word %0d overwritten", pass_name[s], n));
          host_read(Z_BASE + 4 * n, w);
          chk(w == 32'(ref_y[c][n]),
              $sformatf("section %s ch %0d local copy y[%0d]", pass_name[s], c, n));
        end
        // next section's input is this section's stored 16-bit output
        for (int n = 0; n < N; n++) x[c][n] = s16(ref_y[c][n]);
      end
    end

    $display("cascade of 5 sections (%0d passes) x 2 channels: %0d runs, %0d busy cycles", NPASS, runs, n_busy);
    begin
      int nz = 0, mx = 0;
      for (int c = 0; c < 2; c++)
        for (int n = 0; n < N; n++) begin
          if (x[c][n] != 0) nz++;
          if (x[c][n] > mx) mx = x[c][n];
          if (-x[c][n] > mx) mx = -x[c][n];
        end
      $display("filtered epoch: %0d non-zero samples, peak magnitude %0d", nz, mx);
      chk(nz > N, "filtered epoch is not trivially zero");
    end
    $display("mechanisms: stall=%0d conflict=%0d branch=%0d", n_stall, n_conflict, n_branch);
    chk(runs == 2 * NPASS, "all runs completed");
    chk(n_stall > 0 && n_conflict > 0 && n_branch > 0, "stall, conflict and branch occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
