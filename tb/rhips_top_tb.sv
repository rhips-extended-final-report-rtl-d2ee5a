// rhips_top_tb: end-to-end test of the RHIPS-Extended processor at its default
// sizes.
//
// Loads a small kernel and a user program (see rhips_asm_pkg) into the
// instruction memory, releases reset and checks that the idle code halts the
// processor. Then, for each run, it sets $IN, pulses start and waits for the
// processor to halt again:
//   run 1, $IN = 0: the instruction exercise; the sequence of values on
//          out_port and the final kernel state ($ErrReg = 2 after the invalid
//          jump, $ReturnCode = 1) are compared with the expected ones
//   run 2, $IN = 5040: relprime, expected 11
//   runs 3..: random $IN, expected value from a reference relprime
// It counts how often each mechanism happened (branch taken and not taken,
// jal, jr, loads, stores, ccp, cmp, syscall, start interrupt, invalid-address
// trap, retkern, fetch from kernel memory, kernel-mode cycles, signed
// overflow, halt) and counts a failure for any that never did.
//
// Instruction behaviour follows the design; the kernel, the test programs, the
// start pin and the jal return register ($ra = 0x2) are this design's own.
module rhips_top_tb;
  import rhips_pkg::*;
  import rhips_asm_pkg::program_t;

  logic       clk = 0, rst, start, prog_we, kmode, hold, overflow;
  word_t      in_port, out_port, prog_data, pc, ir;
  logic [7:0] prog_addr;
  state_t     state;
  int         checks = 0, failures = 0;
  longint     cycles = 0, instrs = 0;
  word_t      outs [$];

  rhips_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_br_taken, n_br_not, n_jal, n_jr, n_l2r, n_l2m, n_ccp, n_cmp, n_sys, n_start,
      n_bad, n_ret, n_kfetch, n_kcycles, n_ovf, n_halt, n_ls;
  state_t prev;

  always @(posedge clk) begin
    cycles++;
    prev <= state;
    if (state == S_FETCH && !rst) instrs++;
    case (state)
      S_BRANCH:  n_br_taken++;
      S_JAL:     n_jal++;
      S_JR:      n_jr++;
      S_L2R:     n_l2r++;
      S_L2M:     n_l2m++;
      S_CCP:     n_ccp++;
      S_CMP:     n_cmp++;
      S_SYSCALL: n_sys++;
      S_START:   n_start++;
      S_BADADDR: n_bad++;
      S_RETKERN: n_ret++;
      S_HOLDSET: n_halt++;
      default: ;
    endcase
    if (state == S_PCINC && prev == S_BRCMP) n_br_not++;
    if (state == S_EXEC && ir[15:12] == 4'h7) n_ls++;
    if (state == S_FETCH && pc >= 16'h100 && pc < 16'h200) n_kfetch++;
    if (kmode) n_kcycles++;
    if (overflow && state == S_EXEC) n_ovf++;
  end

  always @(posedge clk)
    if (!rst && (outs.size() == 0 || out_port != outs[$])) outs.push_back(out_port);

  function automatic int gcd(int a, int b);
    while (b != 0) begin int t = a % b; a = b; b = t; end
    return a;
  endfunction
  function automatic int relprime(int n);
    int m = 2;
    while (gcd(n, m) != 1) m++;
    return m;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  task automatic wait_halt(input int limit);
    int n = 0;
    while (!(state == S_STALL && hold) && n < limit) begin @(posedge clk); n++; end
    #1;
    check("halted", 64'((state == S_STALL && hold)), 64'(1));
  endtask

  task automatic run(input word_t n);
    longint c0, i0;
    in_port = n;
    outs.delete();
    c0 = cycles; i0 = instrs;
    start = 1; @(posedge clk); #1; start = 0;
    wait_halt(5_000_000);
    $display("run in=%0d: out=%0d, %0d instructions, %0d cycles", n, out_port, instrs - i0, cycles - c0);
  endtask

  initial begin
    program_t p;
    word_t exp_outs [$];
    p = new();
    p.build();
    rst = 1; start = 0; in_port = 0; prog_we = 0; prog_addr = 0; prog_data = 0;
    for (int i = 0; i < 256; i++) begin
      prog_we = 1; prog_addr = 8'(i); prog_data = p.mem[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    @(posedge clk); #1; rst = 0;
    // idle code at 0 halts the processor
    wait_halt(100);
    check("idle pc", 64'(pc), 64'(0));
    check("idle kernel mode", 64'(kmode), 64'(1));

    // run 1: instruction exercise
    run(16'd0);
    exp_outs = '{16'h1234, 16'h1233, 16'h1234, 16'h8000, 16'h1233, 16'h1236, 16'h0077, 16'h00FF, 16'h0000};
    check("number of outputs", 64'(outs.size()), 64'(exp_outs.size() + 1));
    foreach (exp_outs[i]) if (i + 1 < outs.size()) check($sformatf("output %0d", i), 64'(outs[i + 1]), 64'(exp_outs[i]));
    check("ErrReg", 64'(dut.u_regs.u_kern.regs[K_ERRREG]), 64'(2));
    check("ReturnCode", 64'(dut.u_regs.u_kern.regs[8]), 64'(1));
    check("FlaggedInst holds the invalid jump", 64'(dut.u_regs.u_kern.regs[K_FLAGGED]), 64'(16'hD300));
    check("kernel page word 5", 64'(dut.u_mem.u_main.mem[256 + 5]), 64'(16'h2000));
    check("user data word 5", 64'(dut.u_mem.u_main.mem[5]), 64'(16'h1233));

    // run 2: relprime(5040) = 11
    run(16'd5040);
    check("relprime(5040)", 64'(out_port), 64'(11));

    // further runs with random inputs
    for (int r = 0; r < 4; r++) begin
      int n;
      n = int'($urandom_range(2, 3000));
      run(word_t'(n));
      check($sformatf("relprime(%0d)", n), 64'(out_port), 64'(relprime(n)));
    end

    check("branch taken seen", 64'(n_br_taken > 0), 64'(1));
    check("branch not taken seen", 64'(n_br_not > 0), 64'(1));
    check("jal seen", 64'(n_jal > 0), 64'(1));
    check("jr seen", 64'(n_jr > 0), 64'(1));
    check("l2r seen", 64'(n_l2r > 0), 64'(1));
    check("l2m seen", 64'(n_l2m > 0), 64'(1));
    check("ls seen", 64'(n_ls > 0), 64'(1));
    check("ccp seen", 64'(n_ccp > 0), 64'(1));
    check("cmp seen", 64'(n_cmp > 0), 64'(1));
    check("syscall seen", 64'(n_sys > 0), 64'(1));
    check("start interrupt seen", 64'(n_start > 0), 64'(1));
    check("invalid address trap", 64'(n_bad > 0), 64'(1));
    check("retkern seen", 64'(n_ret > 0), 64'(1));
    check("kernel memory fetch", 64'(n_kfetch > 0), 64'(1));
    check("kernel mode cycles", 64'(n_kcycles > 0), 64'(1));
    check("overflow seen", 64'(n_ovf > 0), 64'(1));
    check("halt seen", 64'(n_halt > 0), 64'(1));
    $display("mechanisms: br_taken=%0d br_not=%0d jal=%0d jr=%0d l2r=%0d l2m=%0d ls=%0d ccp=%0d cmp=%0d syscall=%0d start=%0d badaddr=%0d retkern=%0d kfetch=%0d kcycles=%0d ovf=%0d halt=%0d",
             n_br_taken, n_br_not, n_jal, n_jr, n_l2r, n_l2m, n_ls, n_ccp, n_cmp, n_sys, n_start,
             n_bad, n_ret, n_kfetch, n_kcycles, n_ovf, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
