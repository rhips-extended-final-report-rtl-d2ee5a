// rhips_mem_subsys_tb: memory section test. Loads the instruction memory,
// stores data through the data port in user and kernel mode, and checks that
// loads see {mode, IR[7:0]} addressing, that a fetch below 256 returns the
// instruction memory, a fetch from 256-511 returns the kernel page word at
// the PC, and that higher PCs are flagged invalid.
//
// Data addressing follows the design; kernel-page fetch and the invalid flag
// are this design's own choices.
module rhips_mem_subsys_tb;
  import rhips_pkg::*;
  logic       clk = 0, kmode, dat_write, fetch_invalid, prog_we;
  word_t      pc, ir, wdata, inst, mem_rdata, prog_data;
  memsrc_t    mem_src;
  logic [7:0] prog_addr;
  word_t      im [256], mm [512];
  int         checks = 0, failures = 0;

  rhips_mem_subsys dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_we = 0; dat_write = 0; kmode = 0; mem_src = MS_DATA; pc = 0; ir = 0; wdata = 0;
    prog_addr = 0; prog_data = 0;
    for (int i = 0; i < 256; i++) begin
      prog_we = 1; prog_addr = 8'(i); prog_data = word_t'($urandom); im[i] = prog_data;
      @(posedge clk); #1;
    end
    prog_we = 0;
    for (int i = 0; i < 512; i++) begin
      kmode = i[8]; ir = {8'hB0, 8'(i)}; wdata = word_t'($urandom); mm[i] = wdata;
      dat_write = 1; @(posedge clk); #1;
    end
    dat_write = 0;
    for (int i = 0; i < 512; i++) begin
      kmode = i[8]; ir = {8'h90, 8'(i)}; mem_src = MS_DATA; #1; checks++;
      if (mem_rdata !== mm[i]) begin failures++; $display("FAIL load %0d", i); end
    end
    for (int v = 0; v < 600; v++) begin
      pc = word_t'(v); mem_src = MS_FETCH; kmode = 0; #1; checks++;
      if (fetch_invalid !== (v >= 512) ||
          (v < 256 && inst !== im[v]) || (v >= 256 && v < 512 && inst !== mm[v])) begin
        failures++; $display("FAIL fetch %0d inst=%h", v, inst);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
