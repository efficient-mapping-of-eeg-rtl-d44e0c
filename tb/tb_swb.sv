// tb_swb: self-checking test of the switch box: random select programs, each
// sink compared with the source it was set to (out-of-range selects give 0).
module tb_swb;
  import blocks_pkg::*;
  localparam int NS = 22, NK = 42;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [$clog2(NK)-1:0] cfg_sink;
  logic [4:0] cfg_sel;
  word_t src [NS];
  word_t sink [NK];
  int sel_model [NK];
  int checks = 0, failures = 0;

  swb #(.NSRC(NS), .NSINK(NK)) dut (.clk, .rst_n, .cfg_we, .cfg_sink, .cfg_sel, .src, .sink);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_sink = '0; cfg_sel = '0;
    for (int k = 0; k < NK; k++) sel_model[k] = 0;
    for (int s = 0; s < NS; s++) src[s] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      for (int n = 0; n < 30; n++) begin
        automatic int k = $urandom_range(0, NK - 1);
        automatic int s = $urandom_range(0, 31);
        cfg_we = 1; cfg_sink = k[$clog2(NK)-1:0]; cfg_sel = s[4:0];
        sel_model[k] = s;
        @(negedge clk);
      end
      cfg_we = 0;
      for (int s = 0; s < NS; s++) src[s] = $urandom;
      #1;
      for (int k = 0; k < NK; k++) begin
        automatic word_t e = (sel_model[k] < NS) ? src[sel_model[k]] : '0;
        checks++;
        if (sink[k] !== e) begin
          failures++;
          if (failures < 10) $display("SWB sink %0d sel %0d got %h exp %h", k, sel_model[k], sink[k], e);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
