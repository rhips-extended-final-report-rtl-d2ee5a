// rhips_regfile_tb: main register file test. Writes every register through
// the write port with random data, reads all three ports against a shadow
// model, checks that $0 and $IN ignore writes ($IN follows the input pins),
// that $OUT and $br appear on their outputs, that the mode port sets and
// clears the kernel flag in $memPage, and that we = 0 holds the contents.
//
// Register meanings follow the design's main register table; writable-but-
// readable $OUT and the mode port are this design's own choices.
module rhips_regfile_tb;
  import rhips_pkg::*;
  logic       clk = 0, rst, we, mode_we, mode_val, kmode;
  logic [3:0] raddr_a, raddr_b, raddr_c, waddr;
  word_t      rdata_a, rdata_b, rdata_c, wdata, in_port, out_port, br;
  word_t      shadow [16];
  int         checks = 0, failures = 0;

  rhips_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(input logic [3:0] a);
    if (a == 0) return '0;
    if (a == 4'hA) return in_port;
    return shadow[a];
  endfunction

  task automatic check_reads();
    for (int i = 0; i < 16; i++) begin
      raddr_a = 4'(i); raddr_b = 4'(15 - i); raddr_c = 4'(i + 5);
      #1; checks++;
      if (rdata_a !== model(raddr_a) || rdata_b !== model(raddr_b) || rdata_c !== model(raddr_c)) begin
        failures++; $display("FAIL read %0d: %h %h %h", i, rdata_a, rdata_b, rdata_c);
      end
    end
    checks++;
    if (out_port !== shadow[11] || br !== shadow[14] || kmode !== shadow[13][0]) begin
      failures++; $display("FAIL special out=%h br=%h kmode=%b", out_port, br, kmode);
    end
  endtask

  initial begin
    rst = 1; we = 0; mode_we = 0; mode_val = 0; waddr = 0; wdata = 0; in_port = 16'h1234;
    raddr_a = 0; raddr_b = 0; raddr_c = 0;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 16; i++) shadow[i] = '0;
    check_reads();
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 16; i++) begin
        we = 1; waddr = 4'(i); wdata = word_t'($urandom);
        @(posedge clk); #1;
        if (i != 0 && i != 10) shadow[i] = wdata;
      end
      we = 0;
      in_port = word_t'($urandom);
      check_reads();
      // enable low: attempt to clear must not change anything
      waddr = 4'(r % 16); wdata = '0; @(posedge clk); #1;
      check_reads();
      // mode port
      mode_we = 1; mode_val = r[0]; @(posedge clk); #1; mode_we = 0;
      shadow[13] = {15'b0, r[0]};
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
