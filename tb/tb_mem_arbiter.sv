// tb_mem_arbiter: self-checking test of the shared-memory arbiter at the three
// bus widths (32, 16 and 8 bits), one arbiter instance each with its own
// memory. The same random test runs on each in turn. Sets of LSU requests
// (reads and writes, random byte enables) are held until the arbiter releases
// the stall. The test checks:
//   - the cycle count: 3 cycles per bus transaction, where one access needs
//     one transaction on the 32-bit bus, one per touched 16-bit half on the
//     16-bit bus and one per enabled byte on the 8-bit bus (at least one), so
//     k accesses on the 32-bit bus take exactly 3k cycles;
//   - that every LSU gets its own read word;
//   - that writes land with their byte enables;
//   - the conflict flag.
module tb_mem_arbiter;
  import blocks_pkg::*;
  localparam int N = 4, GAW = 10, NW = 3;
  localparam int WIDTHS [NW] = '{32, 16, 8};

  logic clk = 0, rst_n = 0;
  logic req [NW][N], we [NW][N];
  logic [GAW-1:0] addr [NW][N];
  word_t wdata [NW][N], rdata [NW][N];
  logic [3:0] be [NW][N];
  logic stall [NW], conflict [NW], mem_en [NW], mem_we [NW];
  logic [GAW-1:0] mem_addr [NW];
  word_t mem_wdata [NW], mem_rdata [NW];
  logic [3:0] mem_be [NW];
  word_t mem [NW][256];
  word_t model [NW][256];
  int checks = 0, failures = 0, conflicts_seen = 0;

  for (genvar g = 0; g < NW; g++) begin : g_dut
    mem_arbiter #(.NREQ(N), .GAW(GAW), .BUS_W(WIDTHS[g])) dut (
      .clk, .rst_n, .req(req[g]), .we(we[g]), .addr(addr[g]), .wdata(wdata[g]), .be(be[g]),
      .rdata(rdata[g]), .stall(stall[g]), .conflict(conflict[g]), .mem_en(mem_en[g]),
      .mem_we(mem_we[g]), .mem_addr(mem_addr[g]), .mem_wdata(mem_wdata[g]), .mem_be(mem_be[g]),
      .mem_rdata(mem_rdata[g]));

    assign mem_rdata[g] = mem[g][mem_addr[g][GAW-1:2]];
    always_ff @(posedge clk)
      if (mem_en[g] && mem_we[g])
        for (int k = 0; k < 4; k++)
          if (mem_be[g][k]) mem[g][mem_addr[g][GAW-1:2]][8*k +: 8] <= mem_wdata[g][8*k +: 8];
  end
  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("ARB check failed: %s", what); end
  endtask

  // transactions for one access on a bus of w bits
  function automatic int transactions(int w, logic [3:0] b);
    int n = 0;
    for (int l = 0; l < 32 / w; l++)
      if ((b >> (l * w / 8)) & ((1 << (w / 8)) - 1)) n++;
    return n == 0 ? 1 : n;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < NW; g++) begin
      for (int i = 0; i < 256; i++) begin mem[g][i] = $urandom; model[g][i] = mem[g][i]; end
      for (int i = 0; i < N; i++) begin
        req[g][i] = 0; we[g][i] = 0; addr[g][i] = '0; wdata[g][i] = '0; be[g][i] = '0;
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < NW; g++) begin
      for (int n = 0; n < 300; n++) begin
        automatic int k = 0, cyc = 0, exp_cyc = 0;
        automatic int widx [N];
        automatic word_t exp_rd [N];
        // distinct word addresses so reads and writes of one instruction do not overlap
        for (int i = 0; i < N; i++) begin
          req[g][i] = $urandom_range(0, 1);
          we[g][i] = $urandom_range(0, 1);
          widx[i] = 64 * i + $urandom_range(0, 63);
          addr[g][i] = GAW'(4 * widx[i]);
          wdata[g][i] = $urandom;
          be[g][i] = 4'($urandom);
          if (req[g][i]) begin
            k++;
            exp_cyc += 3 * transactions(WIDTHS[g], be[g][i]);
          end
          exp_rd[i] = model[g][widx[i]];
          if (req[g][i] && we[g][i])
            for (int b = 0; b < 4; b++)
              if (be[g][i][b]) model[g][widx[i]][8*b +: 8] = wdata[g][i][8*b +: 8];
        end
        if (WIDTHS[g] == 32 && k > 0) chk(exp_cyc == 3 * k, "32-bit bus: one transaction per access");
        #1;
        chk(conflict[g] == (k > 1), "conflict flag");
        if (conflict[g]) conflicts_seen++;
        // wait for release: the cycle with stall = 0 is the completing one
        while (stall[g]) begin @(negedge clk); cyc++; end
        cyc++;
        if (k == 0) chk(cyc == 1, "no request, no stall");
        else        chk(cyc == exp_cyc, $sformatf("%0d-bit bus: %0d accesses took %0d cycles, expected %0d",
                                                   WIDTHS[g], k, cyc, exp_cyc));
        for (int i = 0; i < N; i++)
          if (req[g][i] && !we[g][i]) chk(rdata[g][i] == exp_rd[i], "read data per LSU");
        @(negedge clk);
        for (int i = 0; i < N; i++) req[g][i] = 0;
        @(negedge clk);
      end
      for (int i = 0; i < 256; i++) chk(mem[g][i] == model[g][i], "memory contents");
    end
    chk(conflicts_seen > 0, "conflicts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
