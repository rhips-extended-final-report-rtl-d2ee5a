// rhips_memman_tb: memory manager test. For PCs across the whole 16-bit range
// it checks the fetch source (instruction memory below 256, kernel page from
// 256 to 511), the addresses handed to each memory and the invalid flag.
//
// The address split and invalid flag checked here are this design's own choices.
module rhips_memman_tb;
  import rhips_pkg::*;
  logic       clk = 0, from_kernel, invalid;
  word_t      pc;
  logic [7:0] imem_addr;
  logic [8:0] kmem_addr;
  int         checks = 0, failures = 0;

  rhips_memman dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input int v);
    pc = word_t'(v); #1; checks++;
    if (from_kernel !== (v >= 256) || invalid !== (v >= 512) ||
        (v < 256 && imem_addr !== 8'(v)) || (v >= 256 && v < 512 && kmem_addr !== 9'(v))) begin
      failures++; $display("FAIL pc=%h fk=%b inv=%b", v, from_kernel, invalid);
    end
  endtask

  initial begin
    for (int v = 0; v < 1024; v++) t(v);
    t('h0FFF); t('h1000); t('hFFFF);
    for (int i = 0; i < 300; i++) t(int'($urandom_range(0, 65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
