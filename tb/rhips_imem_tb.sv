// rhips_imem_tb: instruction memory test. Fills every word with random data
// through the load port, reads it all back, and checks that a write with
// we = 0 changes nothing (short and long addresses, as in the test plan).
//
// Follows the design's unit-test plan for memories; sizes are the defaults.
module rhips_imem_tb;
  logic        clk = 0, we;
  logic [7:0]  raddr, waddr;
  logic [15:0] rdata, wdata;
  logic [15:0] shadow [256];
  int          checks = 0, failures = 0;

  rhips_imem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      we = 1; waddr = 8'(i); wdata = 16'($urandom); shadow[i] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i); #1; checks++;
      if (rdata !== shadow[i]) begin failures++; $display("FAIL %0d", i); end
    end
    foreach (shadow[i]) if (i == 3 || i == 250) begin
      waddr = 8'(i); wdata = 16'h0000; @(posedge clk); #1;
      raddr = 8'(i); #1; checks++;
      if (rdata !== shadow[i]) begin failures++; $display("FAIL we=0 at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
