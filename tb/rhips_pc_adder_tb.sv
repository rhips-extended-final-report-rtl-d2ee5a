// rhips_pc_adder_tb: checks newPC = PC + 1 for corner and random PC values.
//
// Follows the design's PC + 1 adder; the wrap-around check is this design's own.
module rhips_pc_adder_tb;
  import rhips_pkg::*;
  logic  clk = 0;
  word_t pc, new_pc;
  int    checks = 0, failures = 0;

  rhips_pc_adder dut (.pc, .new_pc);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input word_t v);
    pc = v; #1; checks++;
    if (new_pc !== word_t'(32'(v) + 1)) begin failures++; $display("FAIL %h -> %h", v, new_pc); end
  endtask

  initial begin
    t(16'h0000); t(16'h00FF); t(16'h0FFF); t(16'hFFFF); t(16'h7FFF);
    for (int i = 0; i < 500; i++) t(word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
