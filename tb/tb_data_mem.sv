// tb_data_mem: self-checking test of the shared data memory: random word and
// byte-enable writes against a reference array, read back.
module tb_data_mem;
  import blocks_pkg::*;
  localparam int W = 256;
  logic clk = 0, en = 0, we = 0;
  logic [15:0] addr;
  word_t wdata, rdata;
  logic [3:0] be;
  word_t model [W];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(W), .GAW(16)) dut (.clk, .en, .we, .addr, .wdata, .be, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0; wdata = '0; be = '0;
    @(negedge clk);
    for (int i = 0; i < W; i++) begin
      en = 1; we = 1; be = 4'hF; addr = 16'(4 * i); wdata = $urandom; model[i] = wdata;
      @(negedge clk);
    end
    for (int n = 0; n < 2000; n++) begin
      automatic int i = $urandom_range(0, W - 1);
      en = ($urandom_range(0, 3) != 0); we = $urandom_range(0, 1);
      be = 4'($urandom); addr = 16'(4 * i + $urandom_range(0, 3)); wdata = $urandom;
      if (en && we) for (int k = 0; k < 4; k++) if (be[k]) model[i][8*k +: 8] = wdata[8*k +: 8];
      @(negedge clk);
      en = 0; we = 0; addr = 16'(4 * i); #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        if (failures < 10) $display("DM word %0d got %h exp %h", i, rdata, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
