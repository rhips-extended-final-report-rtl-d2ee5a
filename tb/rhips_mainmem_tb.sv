// rhips_mainmem_tb: main memory test. Writes random data to every word of
// both pages, reads it back, and checks that we = 0 leaves a word unchanged.
//
// Page sizes follow the design's data memory map; the test is this testbench's own.
module rhips_mainmem_tb;
  logic        clk = 0, we;
  logic [8:0]  addr;
  logic [15:0] rdata, wdata;
  logic [15:0] shadow [512];
  int          checks = 0, failures = 0;

  rhips_mainmem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 512; i++) begin
      we = 1; addr = 9'(i); wdata = 16'($urandom); shadow[i] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int j = 0; j < 512; j++) begin
      int i;
      i = (j * 37) % 512;
      addr = 9'(i); #1; checks++;
      if (rdata !== shadow[i]) begin failures++; $display("FAIL %0d", i); end
    end
    for (int i = 1; i < 512; i += 100) begin
      addr = 9'(i); wdata = 16'h0000; we = 0; @(posedge clk); #1; checks++;
      if (rdata !== shadow[i]) begin failures++; $display("FAIL we=0 at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
