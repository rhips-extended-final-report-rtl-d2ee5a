// rhips_asm_pkg: a small assembler for RHIPS-Extended test programs.
//
// Encoders for each instruction format, and builders for the programs the
// processor-level testbench runs:
//   kernel      addresses 0..32: idle code (term) at 0, interrupt handler at
//               0x4 that dispatches on $ErrMask & $ErrReg: cause 1 (start)
//               resumes user code at USER_BASE, cause 2 (invalid address)
//               sets $ReturnCode = 1 and terminates, any other cause (syscall)
//               writes a retkern instruction into the kernel memory page,
//               advances $PC_Temp past the syscall and jumps to that word, so
//               the return runs from kernel memory
//   user code   at USER_BASE: if $IN is 0 it runs the instruction exercise
//               (ending with a count-down loop from 0xF to 0),
//               otherwise relprime($IN), the smallest m >= 2 with
//               gcd($IN, m) = 1, written to $OUT before term
// Branch targets are loaded into the branch register with and/ori before each
// beq/bne, as the instruction set requires. Programs are built in two passes
// so that labels can be used before they are defined.
//
// Instruction encodings follow the design's formats. The kernel and programs are
// this testbench's own, modelled on the design's kernel (idle code at 0,
// handler at 0x4) and its relprime example.
package rhips_asm_pkg;

  typedef logic [15:0] word_t;

  // user registers
  localparam logic [3:0] Z = 4'h0, RA = 4'h2, A0 = 4'h3, A1 = 4'h4, V0 = 4'h5, V1 = 4'h6,
                         T0 = 4'h7, T1 = 4'h8, T2 = 4'h9, IN = 4'hA, OUT = 4'hB, BR = 4'hE;
  // kernel registers
  localparam logic [3:0] K0 = 4'h0, K1 = 4'h1, PCT = 4'h2, EMASK = 4'h3, EREG = 4'h4,
                         RCODE = 4'h8, K00 = 4'h9, KBR = 4'hE;

  localparam int USER_BASE = 40;

  function automatic word_t enc_a(input logic [3:0] op, input logic [3:0] d, input logic [3:0] s1, input logic [3:0] s2);
    return {op, d, s1, s2};
  endfunction
  function automatic word_t enc_i(input logic [3:0] op, input logic [3:0] d, input logic [7:0] imm);
    return {op, d, imm};
  endfunction
  function automatic word_t enc_j(input logic [3:0] op, input logic [11:0] target);
    return {op, target};
  endfunction
  function automatic word_t enc_x(input logic kd, input logic [2:0] ext, input logic [3:0] g1, input logic [3:0] g2);
    return {4'h1, kd, ext, g1, g2};
  endfunction

  class program_t;
    word_t mem [256];
    int    pc;
    int    labels [string];
    bit    final_pass;

    function new();
      foreach (mem[i]) mem[i] = '0;   // slt $0,$0,$0 does nothing
    endfunction

    function void org(int a); pc = a; endfunction
    function void label(string n); labels[n] = pc; endfunction
    function int L(string n);
      if (labels.exists(n)) return labels[n];
      if (final_pass) $fatal(1, "undefined label %s", n);
      return 0;
    endfunction
    function void emit(word_t w); mem[pc] = w; pc++; endfunction

    function void slt (logic [3:0] d, s1, s2); emit(enc_a(4'h0, d, s1, s2)); endfunction
    function void add (logic [3:0] d, s1, s2); emit(enc_a(4'h3, d, s1, s2)); endfunction
    function void and_(logic [3:0] d, s1, s2); emit(enc_a(4'h4, d, s1, s2)); endfunction
    function void or_ (logic [3:0] d, s1, s2); emit(enc_a(4'h5, d, s1, s2)); endfunction
    function void sub (logic [3:0] d, s1, s2); emit(enc_a(4'h6, d, s1, s2)); endfunction
    function void ls  (logic [3:0] d, logic [7:0] i); emit(enc_i(4'h7, d, i)); endfunction
    function void ori (logic [3:0] d, logic [7:0] i); emit(enc_i(4'h8, d, i)); endfunction
    function void l2r (logic [3:0] d, logic [7:0] i); emit(enc_i(4'h9, d, i)); endfunction
    function void addi(logic [3:0] d, logic [7:0] i); emit(enc_i(4'hA, d, i)); endfunction
    function void l2m (logic [3:0] d, logic [7:0] i); emit(enc_i(4'hB, d, i)); endfunction
    function void jal (string t); emit(enc_j(4'hC, 12'(L(t)))); endfunction
    function void j   (string t); emit(enc_j(4'hD, 12'(L(t)))); endfunction
    function void ja  (int a);    emit(enc_j(4'hD, 12'(a))); endfunction
    function void jr  (logic [3:0] r); emit({4'hE, r, 8'h00}); endfunction
    function void ccp (logic kd, logic [3:0] src); emit(enc_x(kd, 3'd2, 4'h0, src)); endfunction
    function void cmp (logic kd, logic [3:0] dst); emit(enc_x(kd, 3'd3, dst, 4'h0)); endfunction
    function void term(); emit(enc_x(1'b0, 3'd6, 4'h0, 4'h0)); endfunction
    function void syscall(logic [3:0] r); emit(enc_x(1'b0, 3'd7, r, 4'h0)); endfunction
    function void retkern(); emit(16'h2000); endfunction
    // beq/bne with the target loaded first; br is BR in user code, KBR in the kernel
    function void beq(string t, logic [3:0] s1, s2, logic [3:0] br, logic [3:0] zr);
      and_(br, zr, zr); ori(br, 8'(L(t))); emit(enc_x(1'b0, 3'd0, s1, s2));
    endfunction
    function void bne(string t, logic [3:0] s1, s2, logic [3:0] br, logic [3:0] zr);
      and_(br, zr, zr); ori(br, 8'(L(t))); emit(enc_x(1'b0, 3'd1, s1, s2));
    endfunction

    function void kernel();
      org(0);
      term(); term(); term(); slt(Z, Z, Z);
      label("handler");                       // 0x4
      and_(K0, EMASK, EREG);
      and_(K1, K00, K00);
      bne("valid", K0, K1, KBR, K00);
      term();
      label("valid");
      and_(K1, K00, K00); ori(K1, 8'd2);
      beq("bad", K0, K1, KBR, K00);
      and_(K1, K00, K00); ori(K1, 8'd1);
      beq("start", K0, K1, KBR, K00);
      // syscall: return through a retkern placed in kernel memory
      and_(K0, K00, K00); ori(K0, 8'h20); ls(K0, 8'd8);
      l2m(K0, 8'h10);                         // kernel page word 0x110
      l2m(K0, 8'h05);                         // kernel page word 0x105
      addi(PCT, 8'd1);
      ja('h110);
      label("start");
      and_(PCT, K00, K00); ori(PCT, 8'(USER_BASE)); retkern();
      label("bad");
      and_(RCODE, K00, K00); ori(RCODE, 8'd1); term();
    endfunction

    function void user();
      org(USER_BASE);
      or_(T1, Z, IN);
      beq("exercise", T1, Z, BR, Z);
      // relprime($IN)
      and_(T0, Z, Z); ori(T0, 8'd2);
      label("loop");
      or_(A0, Z, T1); or_(A1, Z, T0);
      jal("gcd");
      and_(T2, Z, Z); ori(T2, 8'd1);
      beq("found", V0, T2, BR, Z);
      addi(T0, 8'd1);
      j("loop");
      label("found");
      or_(OUT, Z, T0);
      term();
      // gcd(a0, a1) by repeated subtraction, result in v0
      label("gcd");
      beq("gdone", A0, A1, BR, Z);
      slt(V0, A0, A1);
      bne("bsub", V0, Z, BR, Z);
      sub(A0, A0, A1);
      j("gcd");
      label("bsub");
      sub(A1, A1, A0);
      j("gcd");
      label("gdone");
      or_(V0, Z, A0);
      jr(RA);
      // instruction exercise; each 'or OUT' publishes a value
      label("exercise");
      and_(T0, Z, Z); ori(T0, 8'h12); ls(T0, 8'd8); ori(T0, 8'h34);
      or_(OUT, Z, T0);                        // 0x1234
      addi(T0, 8'hFF);                        // -1
      l2m(T0, 8'd5);
      and_(T1, Z, Z);
      l2r(T1, 8'd5);
      sub(T2, T1, T0);
      or_(OUT, Z, T1);                        // 0x1233
      slt(V0, T2, T1);
      add(V0, V0, T1);
      or_(OUT, Z, V0);                        // 0x1234
      and_(T2, Z, Z); ori(T2, 8'h7F); ls(T2, 8'd8); ori(T2, 8'hFF);
      addi(T2, 8'd1);                         // signed overflow
      or_(OUT, Z, T2);                        // 0x8000
      ccp(1'b1, T1);                          // $k1 = 0x1233
      cmp(1'b1, V1);                          // $v1 = $k1
      or_(OUT, Z, V1);                        // 0x1233
      and_(T2, Z, Z); ori(T2, 8'd3);
      syscall(T2);                            // cause 3
      l2r(V0, 8'd5);                          // user word 5 untouched by the kernel
      add(V0, V0, T2);
      or_(OUT, Z, V0);                        // 0x1236
      jal("sub1");
      or_(OUT, Z, A0);                        // 0x00FF
      // count-down loop: X = 0xF, decrement until 0
      and_(T1, Z, Z); ori(T1, 8'h0F);
      and_(T2, Z, Z); ori(T2, 8'd1);
      label("count");
      sub(T1, T1, T2);
      beq("counted", Z, T1, BR, Z);
      j("count");
      label("counted");
      or_(OUT, Z, T1);                        // 0x0000
      ja('h300);                              // invalid address
      label("sub1");
      and_(A0, Z, Z); ori(A0, 8'h77);
      or_(OUT, Z, A0);                        // 0x0077
      ori(A0, 8'h88);
      jr(RA);
    endfunction

    function void build();
      final_pass = 0; kernel(); user();
      final_pass = 1; kernel(); user();
    endfunction
  endclass

endpackage
