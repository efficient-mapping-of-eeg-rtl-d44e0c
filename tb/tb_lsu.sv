// tb_lsu: self-checking test of the load-store unit. A behavioural memory
// answers global requests (standing in for the arbiter) and a reference
// model tracks the local memory and the address counter. Covers stride
// address generation, local and indexed accesses, zero-extended half-word
// loads of both halves, half-word and word stores with byte enables, and that
// a global access completes only in the cycle en = 1.
module tb_lsu;
  import blocks_pkg::*;
  localparam int GAW = 12;
  logic clk = 0, rst_n = 0, en = 0, active = 0;
  instr_t instr;
  word_t a, b, out;
  logic gm_req, gm_we;
  logic [GAW-1:0] gm_addr;
  word_t gm_wdata, gm_rdata;
  logic [3:0] gm_be;
  word_t gmem [1024];
  word_t lmodel [256];
  int checks = 0, failures = 0;

  lsu #(.LM_DEPTH(256), .GAW(GAW)) dut (.clk, .rst_n, .en, .active, .instr, .a, .b, .out,
    .gm_req, .gm_we, .gm_addr, .gm_wdata, .gm_be, .gm_rdata);
  always #5 clk = ~clk;
  assign gm_rdata = gmem[gm_addr[GAW-1:2]];

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("LSU check failed: %s out=%h", what, out); end
  endtask

  logic [3:0] last_be = '0;   // byte enables of the last global access

  task automatic issue(lsu_op_e op, logic [15:0] imm_v, word_t a_v, word_t b_v);
    instr = '0; instr.op = op; instr.imm = imm_v; a = a_v; b = b_v; en = 1;
    #1;
    if (gm_req) begin
      last_be = gm_be;
      // two stall cycles as the bus would add, then complete
      en = 0; @(negedge clk); @(negedge clk); en = 1;
      if (gm_we) for (int k = 0; k < 4; k++)
        if (gm_be[k]) gmem[gm_addr[GAW-1:2]][8*k +: 8] = gm_wdata[8*k +: 8];
    end
    @(negedge clk);
    en = 0; instr = '0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = '0; a = '0; b = '0;
    for (int i = 0; i < 1024; i++) gmem[i] = {16'(i * 3 + 16'h8000), 16'(i * 2 + 1)};
    repeat (2) @(negedge clk);
    rst_n = 1; active = 1;
    // strided local stores then loads
    issue(LSU_SET_ADDR, 16'd10, '0, '0);
    issue(LSU_SET_STRIDE, 16'd3, '0, '0);
    for (int i = 0; i < 20; i++) begin
      automatic word_t v = $urandom;
      lmodel[10 + 3 * i] = v;
      issue(LSU_ST_L, 16'd0, v, '0);
    end
    issue(LSU_SET_ADDR, 16'd10, '0, '0);
    for (int i = 0; i < 20; i++) begin
      issue(LSU_LD_L, 16'd0, '0, '0);
      chk(out == lmodel[10 + 3 * i], "strided local load");
    end
    // indexed accesses
    for (int i = 0; i < 30; i++) begin
      automatic int idx = $urandom_range(100, 255);
      automatic word_t v = $urandom;
      lmodel[idx] = v;
      issue(LSU_ST_LB, 16'd0, v, word_t'(idx));
      issue(LSU_LD_LB, 16'd0, '0, word_t'(idx));
      chk(out == v, "indexed local load");
    end
    // global half-word loads, stride 2 bytes: lower then upper half
    issue(LSU_SET_ADDR, 16'd16, '0, '0);
    issue(LSU_SET_STRIDE, 16'd2, '0, '0);
    for (int i = 0; i < 8; i++) begin
      automatic word_t w = gmem[(16 + 2 * i) / 4];
      issue(LSU_LD_GH, 16'd0, '0, '0);
      chk(out == {16'd0, (i % 2) ? w[31:16] : w[15:0]}, "half-word load zero-extended");
      chk(last_be == ((i % 2) ? 4'b1100 : 4'b0011), "half-word load byte enables");
    end
    // global half-word stores into both halves
    issue(LSU_SET_ADDR, 16'd400, '0, '0);
    issue(LSU_ST_GH, 16'd0, 32'hFFFF_ABCD, '0);
    issue(LSU_ST_GH, 16'd0, 32'h0000_1357, '0);
    chk(gmem[100] == 32'h1357_ABCD, "half-word stores with byte enables");
    // word store/load with stride 4
    issue(LSU_SET_ADDR, 16'd800, '0, '0);
    issue(LSU_SET_STRIDE, 16'd4, '0, '0);
    issue(LSU_ST_GW, 16'd0, 32'hCAFE_F00D, '0);
    issue(LSU_ST_GW, 16'd0, 32'h1234_5678, '0);
    issue(LSU_SET_ADDR, 16'd800, '0, '0);
    issue(LSU_LD_GW, 16'd0, '0, '0);
    chk(out == 32'hCAFE_F00D, "word load 1");
    chk(last_be == 4'b1111, "word load byte enables");
    issue(LSU_LD_GW, 16'd0, '0, '0);
    chk(out == 32'h1234_5678, "word load 2 (stride)");
    // no request while idle
    active = 0; instr.op = LSU_LD_GW; #1;
    chk(!gm_req, "no request while inactive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
