// rhips_kregfile_tb: kernel register file test. Checks the reset values
// ($ErrMask = 0xFFFF, the rest 0), writes and reads every register against a
// shadow model, checks that $00 stays 0, that $Kbr, $PC_Temp and $HOLD appear
// on their outputs, and that we = 0 holds the contents.
//
// Register meanings follow the design's kernel register table; the reset
// values are this design's own choice.
module rhips_kregfile_tb;
  import rhips_pkg::*;
  logic       clk = 0, rst, we, hold;
  logic [3:0] raddr_a, raddr_b, raddr_c, waddr;
  word_t      rdata_a, rdata_b, rdata_c, wdata, br, pc_temp;
  word_t      shadow [16];
  int         checks = 0, failures = 0;

  rhips_kregfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(input logic [3:0] a);
    return (a == 9) ? '0 : shadow[a];
  endfunction

  task automatic check_reads();
    for (int i = 0; i < 16; i++) begin
      raddr_a = 4'(i); raddr_b = 4'(i + 3); raddr_c = 4'(15 - i);
      #1; checks++;
      if (rdata_a !== model(raddr_a) || rdata_b !== model(raddr_b) || rdata_c !== model(raddr_c)) begin
        failures++; $display("FAIL read %0d: %h %h %h", i, rdata_a, rdata_b, rdata_c);
      end
    end
    checks++;
    if (br !== shadow[14] || pc_temp !== shadow[2] || hold !== shadow[7][0]) begin
      failures++; $display("FAIL special br=%h pc_temp=%h hold=%b", br, pc_temp, hold);
    end
  endtask

  initial begin
    rst = 1; we = 0; waddr = 0; wdata = 0; raddr_a = 0; raddr_b = 0; raddr_c = 0;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 16; i++) shadow[i] = '0;
    shadow[3] = 16'hFFFF;
    check_reads();
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 16; i++) begin
        we = 1; waddr = 4'(i); wdata = word_t'($urandom);
        @(posedge clk); #1;
        if (i != 9) shadow[i] = wdata;
      end
      we = 0;
      check_reads();
      waddr = 4'(r % 16); wdata = '0; @(posedge clk); #1;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
