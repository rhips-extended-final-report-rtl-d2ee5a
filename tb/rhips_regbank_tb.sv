// rhips_regbank_tb: register section test. In user mode and in kernel mode it
// writes registers through each write-address and write-data source and
// checks that the A/B/C ports and br reach the file of the current mode, that
// writes in one mode leave the other file alone, and that the B port reads
// the KD register when asked.
//
// The register-file switching follows the design; switching every port is this
// design's own reading of it.
module rhips_regbank_tb;
  import rhips_pkg::*;
  logic   clk = 0, rst, reg_write, mode_write, mode_value, hold, kmode;
  word_t  ir, pc, new_pc, result, in_port, a_data, b_data, c_data, br, pc_temp, out_port;
  baddr_t b_addr_src;
  waddr_t reg_waddr_src;
  wdata_t reg_wdata_src;
  word_t  user [16], kern [16];
  int     checks = 0, failures = 0;

  rhips_regbank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t rd(input logic k, input logic [3:0] a);
    if (k) return (a == 9) ? '0 : kern[a];
    if (a == 0) return '0;
    if (a == 10) return in_port;
    return user[a];
  endfunction

  task automatic set_mode(input logic k);
    mode_write = 1; mode_value = k; @(posedge clk); #1; mode_write = 0;
    user[13] = {15'b0, k};
  endtask

  task automatic write(input waddr_t ws, input wdata_t ds);
    logic [3:0] a;
    word_t      d;
    ir = word_t'($urandom); pc = word_t'($urandom); new_pc = pc + 1; result = word_t'($urandom);
    // keep the mode register ($memPage) out of the random user-mode writes
    if (!kmode && ir[11:8] == 4'hD) ir[11:8] = 4'h3;
    if (!kmode && ir[7:4] == 4'hD)  ir[7:4]  = 4'h3;
    case (ws)
      WA_RD:    a = ir[11:8];
      WA_OP1:   a = ir[7:4];
      WA_KD:    a = {3'b0, ir[11]};
      WA_RA:    a = 4'h2;
      WA_CAUSE: a = 4'h4;
      WA_FLAG:  a = 4'h6;
      default:  a = 4'h7;
    endcase
    case (ds)
      WD_RESULT: d = result;
      WD_NEWPC:  d = new_pc;
      WD_PC:     d = pc;
      WD_IR:     d = ir;
      WD_ZERO:   d = '0;
      default:   d = 16'd1;
    endcase
    reg_write = 1; reg_waddr_src = ws; reg_wdata_src = ds;
    @(posedge clk); #1; reg_write = 0;
    if (kmode) begin if (a != 9) kern[a] = d; end
    else if (a != 0 && a != 10) user[a] = d;
  endtask

  task automatic check();
    for (int i = 0; i < 16; i++) begin
      ir = {4'h0, 4'(i), 4'(i + 1), 4'(i + 2)};
      b_addr_src = BA_OP2;
      #1; checks++;
      if (a_data !== rd(kmode, ir[7:4]) || b_data !== rd(kmode, ir[3:0]) || c_data !== rd(kmode, ir[11:8])) begin
        failures++; $display("FAIL k=%b read ir=%h: %h %h %h", kmode, ir, a_data, b_data, c_data);
      end
      b_addr_src = BA_KD;
      #1; checks++;
      if (b_data !== rd(kmode, {3'b0, ir[11]})) begin failures++; $display("FAIL KD read"); end
    end
    checks++;
    if (br !== (kmode ? kern[14] : user[14]) || pc_temp !== kern[2] || hold !== kern[7][0] || out_port !== user[11]) begin
      failures++; $display("FAIL specials");
    end
  endtask

  initial begin
    rst = 1; reg_write = 0; mode_write = 0; mode_value = 0; b_addr_src = BA_OP2;
    reg_waddr_src = WA_RD; reg_wdata_src = WD_RESULT;
    ir = 0; pc = 0; new_pc = 1; result = 0; in_port = 16'hBEEF;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 16; i++) begin user[i] = '0; kern[i] = '0; end
    kern[3] = 16'hFFFF;
    check();
    for (int r = 0; r < 30; r++) begin
      set_mode(r[0]);
      checks++;
      if (kmode !== r[0]) begin failures++; $display("FAIL mode"); end
      for (int w = 0; w < 7; w++)
        for (int d = 0; d < 6; d++)
          write(waddr_t'(w), wdata_t'(d));
      for (int k = 0; k < 20; k++) write(WA_RD, WD_RESULT);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
