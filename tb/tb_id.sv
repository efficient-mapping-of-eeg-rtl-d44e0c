// tb_id: self-checking test of the instruction decoder: fill the instruction
// memory, read it back at random program counters, and check NOP output
// while inactive.
module tb_id;
  import blocks_pkg::*;
  logic clk = 0, active = 0, wr_en = 0;
  logic [5:0] pc, wr_addr;
  logic [31:0] wr_data;
  instr_t instr;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  id #(.DEPTH(64)) dut (.clk, .active, .pc, .wr_en, .wr_addr, .wr_data, .instr);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc = '0; wr_addr = '0; wr_data = '0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      model[i] = $urandom;
      wr_en = 1; wr_addr = 6'(i); wr_data = model[i];
      @(negedge clk);
    end
    wr_en = 0;
    active = 1;
    for (int n = 0; n < 500; n++) begin
      pc = 6'($urandom);
      #1;
      checks++;
      if (instr !== instr_t'(model[pc])) begin
        failures++;
        if (failures < 10) $display("ID pc %0d got %h exp %h", pc, instr, model[pc]);
      end
      checks++;
      if (instr.op !== model[pc][31:27] || instr.imm !== model[pc][15:0]) failures++;
      @(negedge clk);
    end
    active = 0; #1;
    checks++; if (instr !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
