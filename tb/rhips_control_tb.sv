// rhips_control_tb: control FSM test. For every instruction class it places
// an instruction in IR, follows the FSM from fetch until it is back in fetch
// (or halted), and compares the sequence of states, and so the cycle count,
// with the expected path. In key states it also checks the control bits that
// carry the instruction's effect (register write address and data, PC source,
// memory write, mode switch). Branches are run with the zero flag both ways;
// term, start, the $HOLD halt and the invalid-fetch trap are covered too.
//
// State paths follow the design's state diagram; the added states (start,
// invalid fetch, retkern, $HOLD write) and the cycle counts they give are
// this design's own.
module rhips_control_tb;
  import rhips_pkg::*;
  logic   clk = 0, rst, zero, hold, start, fetch_invalid;
  word_t  ir;
  ctrl_t  ctrl;
  state_t state;
  int     checks = 0, failures = 0;

  rhips_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef state_t path_t [$];

  // Checks the control bits of the current state for the instruction in IR
  task automatic check_ctrl();
    logic ok;
    ok = 1;
    case (state)
      S_FETCH:   ok = fetch_invalid ? !ctrl.ir_write : (ctrl.ir_write && ctrl.mem_src == MS_FETCH);
      S_DECODE:  ok = ctrl.a_write && ctrl.b_write && ctrl.c_write && !ctrl.reg_write;
      S_WB:      ok = ctrl.reg_write && ctrl.reg_waddr_src == WA_RD && ctrl.reg_wdata_src == WD_RESULT;
      S_PCINC:   ok = hold ? !ctrl.pc_write : (ctrl.pc_write && ctrl.pc_src == PCSRC_NEWPC);
      S_L2M:     ok = ctrl.dat_write && ctrl.mem_src == MS_DATA && ctrl.b_src == BSRC_C && ctrl.alu_op == ALU_PASSB;
      S_L2R:     ok = ctrl.a_src == ASRC_MEM && ctrl.res_write && !ctrl.dat_write;
      S_BRANCH:  ok = ctrl.pc_write && ctrl.pc_src == PCSRC_BR;
      S_DOJUMP:  ok = ctrl.pc_write && ctrl.pc_src == PCSRC_RESULT;
      S_STOREJUMP: ok = ctrl.reg_write && ctrl.reg_waddr_src == WA_RA;
      S_RESTOKERNEL: ok = ctrl.reg_write && ctrl.reg_waddr_src == WA_KD;
      S_SETKERNEL, S_CMP, S_TERM, S_SYS2: ok = ctrl.mode_write && ctrl.mode_value;
      S_SETUSER, S_CMP4: ok = ctrl.mode_write && !ctrl.mode_value;
      S_CMP2:    ok = ctrl.b_write && ctrl.b_addr_src == BA_KD;
      S_CMP5:    ok = ctrl.reg_write && ctrl.reg_waddr_src == WA_OP1;
      S_PCTOZERO: ok = ctrl.pc_write && ctrl.pc_src == PCSRC_ZERO;
      S_HOLDSET: ok = ctrl.reg_write && ctrl.reg_waddr_src == WA_HOLD && ctrl.reg_wdata_src == WD_ONE;
      S_SYS3:    ok = ctrl.reg_write && ctrl.reg_waddr_src == WA_CAUSE;
      S_SYS4:    ok = ctrl.reg_write && ctrl.reg_waddr_src == WA_FLAG && ctrl.reg_wdata_src == WD_IR;
      S_SYS6:    ok = ctrl.reg_write && ctrl.reg_waddr_src == WA_RA && ctrl.reg_wdata_src == WD_PC;
      S_SYS7:    ok = ctrl.pc_write && ctrl.pc_src == PCSRC_VEC;
      S_RETKERN: ok = ctrl.pc_write && ctrl.pc_src == PCSRC_EPC && ctrl.mode_write && !ctrl.mode_value;
      S_START:   ok = ctrl.reg_write && ctrl.reg_waddr_src == WA_HOLD && ctrl.reg_wdata_src == WD_ZERO && ctrl.cause == CAUSE_START;
      S_BADADDR: ok = ctrl.res_write && ctrl.cause == CAUSE_BADADDR;
      S_EXEC:    ok = ctrl.alu_req == AC_OPCODE &&
                      ((ir[15:12] inside {4'h7, 4'h8, 4'hA}) ? (ctrl.a_src == ASRC_IMM && ctrl.b_src == BSRC_C)
                                                            : (ctrl.a_src == ASRC_A && ctrl.b_src == BSRC_B));
      default:   ok = 1;
    endcase
    checks++;
    if (!ok) begin failures++; $display("FAIL ctrl in %s ir=%h", state.name(), ir); end
  endtask

  // Runs one instruction from fetch and compares the visited states
  task automatic run(input string name, input word_t instr, input logic z, input path_t exp);
    path_t got;
    ir = instr; zero = z;
    if (state != S_FETCH) begin failures++; $display("FAIL %s: not in fetch", name); end
    for (int n = 0; n < 40; n++) begin
      got.push_back(state);
      check_ctrl();
      @(posedge clk); #1;
      if (state == S_FETCH || state == S_STALL) break;
    end
    got.push_back(state);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d states, expected %0d", name, got.size(), exp.size());
      foreach (got[i]) $display("   got %s", got[i].name());
    end
  endtask

  path_t ALU_PATH = '{S_FETCH, S_DECODE, S_EXEC, S_WB, S_PCINC, S_FETCH};

  initial begin
    rst = 1; zero = 0; hold = 0; start = 0; fetch_invalid = 0; ir = 0;
    @(posedge clk); @(posedge clk); #1;
    checks++;
    if (state != S_RESET || ctrl != '0) begin failures++; $display("FAIL reset state"); end
    rst = 0;
    @(posedge clk); #1;
    run("slt",  16'h0123, 0, ALU_PATH);
    run("add",  16'h3123, 0, ALU_PATH);
    run("and",  16'h4123, 0, ALU_PATH);
    run("or",   16'h5123, 0, ALU_PATH);
    run("sub",  16'h6123, 0, ALU_PATH);
    run("ls",   16'h7108, 0, ALU_PATH);
    run("ori",  16'h81FF, 0, ALU_PATH);
    run("addi", 16'hA1FF, 0, ALU_PATH);
    run("l2r",  16'h9105, 0, '{S_FETCH, S_DECODE, S_L2R, S_WB, S_PCINC, S_FETCH});
    run("l2m",  16'hB105, 0, '{S_FETCH, S_DECODE, S_L2M, S_PCINC, S_FETCH});
    run("beq taken",     16'h1012, 1, '{S_FETCH, S_DECODE, S_BRCMP, S_BRANCH, S_FETCH});
    run("beq not taken", 16'h1012, 0, '{S_FETCH, S_DECODE, S_BRCMP, S_PCINC, S_FETCH});
    run("bne taken",     16'h1112, 0, '{S_FETCH, S_DECODE, S_BRCMP, S_BRANCH, S_FETCH});
    run("bne not taken", 16'h1112, 1, '{S_FETCH, S_DECODE, S_BRCMP, S_PCINC, S_FETCH});
    run("j",    16'hD123, 0, '{S_FETCH, S_DECODE, S_J, S_DOJUMP, S_FETCH});
    run("jr",   16'hE200, 0, '{S_FETCH, S_DECODE, S_JR, S_DOJUMP, S_FETCH});
    run("jal",  16'hC123, 0, '{S_FETCH, S_DECODE, S_JAL, S_STOREJUMP, S_CALCJUMP, S_DOJUMP, S_FETCH});
    run("ccp",  16'h1A03, 0, '{S_FETCH, S_DECODE, S_CCP, S_SETKERNEL, S_RESTOKERNEL, S_SETUSER, S_PCINC, S_FETCH});
    run("cmp",  16'h1B30, 0, '{S_FETCH, S_DECODE, S_CMP, S_CMP2, S_CMP3, S_CMP4, S_CMP5, S_PCINC, S_FETCH});
    run("syscall", 16'h1730, 0, '{S_FETCH, S_DECODE, S_SYSCALL, S_SYS2, S_SYS3, S_SYS4, S_SYS5, S_SYS6, S_SYS7, S_FETCH});
    run("retkern", 16'h2000, 0, '{S_FETCH, S_DECODE, S_RETKERN, S_FETCH});
    run("km2mm (no-op)", 16'h1400, 0, '{S_FETCH, S_DECODE, S_PCINC, S_FETCH});
    run("opcode F (no-op)", 16'hF000, 0, '{S_FETCH, S_DECODE, S_PCINC, S_FETCH});
    run("term", 16'h1600, 0, '{S_FETCH, S_DECODE, S_TERM, S_PCTOZERO, S_HOLDSET, S_STALL});
    // halted until start
    repeat (5) begin
      @(posedge clk); #1; checks++;
      if (state != S_STALL || ctrl.pc_write) begin failures++; $display("FAIL not stalled"); end
    end
    start = 1;
    @(posedge clk); #1; start = 0;
    begin
      path_t got, exp;
      exp = '{S_START, S_SYS2, S_SYS3, S_SYS4, S_SYS5, S_SYS6, S_SYS7, S_FETCH};
      for (int n = 0; n < 8; n++) begin got.push_back(state); check_ctrl(); if (n < 7) begin @(posedge clk); #1; end end
      checks++;
      if (got != exp) begin failures++; $display("FAIL start path"); end
    end
    // $HOLD set by software: the next PC increment halts
    hold = 1;
    run("add with hold", 16'h3123, 0, '{S_FETCH, S_DECODE, S_EXEC, S_WB, S_PCINC, S_STALL});
    hold = 0;
    start = 1; @(posedge clk); #1; start = 0;
    repeat (7) @(posedge clk);
    #1;
    checks++;
    if (state != S_FETCH) begin failures++; $display("FAIL restart after hold"); end
    // invalid fetch
    fetch_invalid = 1; #1;
    begin
      path_t got, exp;
      exp = '{S_FETCH, S_BADADDR, S_SYS2, S_SYS3, S_SYS4, S_SYS5, S_SYS6, S_SYS7, S_FETCH};
      for (int n = 0; n < 9; n++) begin
        got.push_back(state); check_ctrl();
        if (n < 8) begin @(posedge clk); #1; end
        if (n == 1) fetch_invalid = 0;
      end
      checks++;
      if (got != exp) begin failures++; $display("FAIL bad address path"); foreach (got[i]) $display("  %s", got[i].name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
