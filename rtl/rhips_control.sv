// rhips_control: the multicycle control FSM of RHIPS-Extended.
//
// Every instruction starts with fetch (IR <= instruction at PC) and decode
// (A, B, C <= the three register read ports), then walks a path of states
// chosen by the opcode and, for Ext-Type instructions, the extension code:
//   slt/add/and/or/sub/ls/ori/addi  EXEC -> WB -> PCINC                 (5 cycles)
//   l2r                             L2R -> WB -> PCINC                  (5)
//   l2m                             L2M -> PCINC                        (4)
//   beq/bne                         BRCMP -> BRANCH or PCINC            (4)
//   j / jr                          J or JR -> DOJUMP                   (4)
//   jal                             JAL -> STOREJUMP -> CALCJUMP -> DOJUMP (6)
//   ccp                             CCP -> SETKERNEL -> RESTOKERNEL -> SETUSER -> PCINC (7)
//   cmp                             CMP -> CMP2 -> CMP3 -> CMP4 -> CMP5 -> PCINC (8)
//   term                            TERM -> PCTOZERO -> HOLDSET -> STALL
//   syscall                         SYSCALL -> SYS2 .. SYS7             (9)
//   retkern                         RETKERN                             (3)
// STALL waits for the start input, which enters the kernel at 0x4 with cause
// 1 ($ErrReg), the same way a syscall does. A fetch from an invalid address
// enters the kernel with cause 2. PCINC halts in STALL instead of advancing
// the PC when $HOLD is set.
//
// The states, their order and the register transfers in each follow the
// processor's state diagram and multicycle RTL table. This design's own
// choices: jal saves PC+1 in register 0x2 ($ra) rather than in IR[11:8];
// beq branches when the ALU zero flag is 1 and bne when it is 0; syscall
// records register IR[7:4] as the cause; term writes $HOLD in a state of its
// own; retkern, the start input and the invalid-fetch trap are added. All
// outputs are a function of the state and the current inputs; the state
// changes on the rising clock edge and rst (synchronous) returns to S_RESET.
//
// Lint notes some IR bits as unused: the FSM decodes only the opcode and the
// extension code; the register fields go to the register section.
module rhips_control
  import rhips_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  word_t  ir,
  input  logic   zero,
  input  logic   hold,
  input  logic   start,
  input  logic   fetch_invalid,
  output ctrl_t  ctrl,
  output state_t state
);

  state_t  next;
  opcode_t opcode;
  ext_t    ext;

  always_comb begin
    opcode = opcode_t'(ir[15:12]);
    ext    = ext_t'(ir[10:8]);
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_RESET;
    else     state <= next;
  end

  always_comb begin
    ctrl = '0;
    ctrl.alu_op = ALU_NOP;
    next = state;
    unique case (state)
      S_RESET: begin
        ctrl = '0;                 // all control bits 0
        next = S_FETCH;
      end

      S_FETCH: begin
        ctrl.mem_src = MS_FETCH;
        if (fetch_invalid) begin
          next = S_BADADDR;
        end else begin
          ctrl.ir_write = 1'b1;
          next = S_DECODE;
        end
      end

      S_DECODE: begin
        ctrl.a_write = 1'b1;
        ctrl.b_write = 1'b1;
        ctrl.c_write = 1'b1;
        unique case (opcode)
          OP_SLT, OP_ADD, OP_AND, OP_OR, OP_SUB,
          OP_LS, OP_ORI, OP_ADDI:          next = S_EXEC;
          OP_L2R:                          next = S_L2R;
          OP_L2M:                          next = S_L2M;
          OP_JAL:                          next = S_JAL;
          OP_J:                            next = S_J;
          OP_JR:                           next = S_JR;
          OP_EXT2:                         next = S_RETKERN;
          OP_EXT: begin
            unique case (ext)
              EXT_BEQ, EXT_BNE: next = S_BRCMP;
              EXT_CCP:          next = S_CCP;
              EXT_CMP:          next = S_CMP;
              EXT_TERM:         next = S_TERM;
              EXT_SYSCALL:      next = S_SYSCALL;
              default:          next = S_PCINC;
            endcase
          end
          default:                         next = S_PCINC;
        endcase
      end

      // Arithmetic types use A op B, immediate types C op imm
      S_EXEC: begin
        ctrl.alu_req = AC_OPCODE;
        if (opcode inside {OP_LS, OP_ORI, OP_ADDI}) begin
          ctrl.a_src = ASRC_IMM;
          ctrl.b_src = BSRC_C;
        end else begin
          ctrl.a_src = ASRC_A;
          ctrl.b_src = BSRC_B;
        end
        ctrl.res_write = 1'b1;
        next = S_WB;
      end

      S_L2R: begin
        ctrl.mem_src   = MS_DATA;
        ctrl.a_src     = ASRC_MEM;
        ctrl.alu_op    = ALU_PASSA;
        ctrl.res_write = 1'b1;
        next = S_WB;
      end

      S_WB: begin
        ctrl.reg_write     = 1'b1;
        ctrl.reg_waddr_src = WA_RD;
        ctrl.reg_wdata_src = WD_RESULT;
        next = S_PCINC;
      end

      S_PCINC: begin
        if (hold) begin
          next = S_STALL;
        end else begin
          ctrl.pc_src   = PCSRC_NEWPC;
          ctrl.pc_write = 1'b1;
          next = S_FETCH;
        end
      end

      S_L2M: begin
        ctrl.b_src     = BSRC_C;
        ctrl.alu_op    = ALU_PASSB;
        ctrl.res_write = 1'b1;
        ctrl.mem_src   = MS_DATA;
        ctrl.dat_write = 1'b1;
        next = S_PCINC;
      end

      S_BRCMP: begin
        ctrl.a_src     = ASRC_A;
        ctrl.b_src     = BSRC_B;
        ctrl.alu_op    = ALU_SUB;
        ctrl.res_write = 1'b1;
        if ((ext == EXT_BEQ) ? zero : !zero) next = S_BRANCH;
        else                                 next = S_PCINC;
      end

      S_BRANCH: begin
        ctrl.pc_src   = PCSRC_BR;
        ctrl.pc_write = 1'b1;
        next = S_FETCH;
      end

      S_J, S_CALCJUMP: begin
        ctrl.a_src     = ASRC_PCHI;
        ctrl.b_src     = BSRC_JADDR;
        ctrl.alu_op    = ALU_OR;
        ctrl.res_write = 1'b1;
        next = S_DOJUMP;
      end

      S_JR: begin
        ctrl.b_src     = BSRC_C;
        ctrl.alu_op    = ALU_PASSB;
        ctrl.res_write = 1'b1;
        next = S_DOJUMP;
      end

      S_JAL: begin
        ctrl.a_src     = ASRC_PC;
        ctrl.b_src     = BSRC_ONE;
        ctrl.alu_op    = ALU_ADD;
        ctrl.res_write = 1'b1;
        next = S_STOREJUMP;
      end

      S_STOREJUMP: begin
        ctrl.reg_write     = 1'b1;
        ctrl.reg_waddr_src = WA_RA;
        ctrl.reg_wdata_src = WD_RESULT;
        next = S_CALCJUMP;
      end

      S_DOJUMP: begin
        ctrl.pc_src   = PCSRC_RESULT;
        ctrl.pc_write = 1'b1;
        next = S_FETCH;
      end

      S_CCP: begin
        ctrl.b_src     = BSRC_B;
        ctrl.alu_op    = ALU_PASSB;
        ctrl.res_write = 1'b1;
        next = S_SETKERNEL;
      end

      S_SETKERNEL: begin
        ctrl.mode_write = 1'b1;
        ctrl.mode_value = 1'b1;
        next = S_RESTOKERNEL;
      end

      S_RESTOKERNEL: begin
        ctrl.reg_write     = 1'b1;
        ctrl.reg_waddr_src = WA_KD;
        ctrl.reg_wdata_src = WD_RESULT;
        next = S_SETUSER;
      end

      S_SETUSER: begin
        ctrl.mode_write = 1'b1;
        ctrl.mode_value = 1'b0;
        next = S_PCINC;
      end

      S_CMP: begin
        ctrl.mode_write = 1'b1;
        ctrl.mode_value = 1'b1;
        next = S_CMP2;
      end

      S_CMP2: begin
        ctrl.b_addr_src = BA_KD;
        ctrl.b_write    = 1'b1;
        next = S_CMP3;
      end

      S_CMP3: begin
        ctrl.b_src     = BSRC_B;
        ctrl.alu_op    = ALU_PASSB;
        ctrl.res_write = 1'b1;
        next = S_CMP4;
      end

      S_CMP4: begin
        ctrl.mode_write = 1'b1;
        ctrl.mode_value = 1'b0;
        next = S_CMP5;
      end

      S_CMP5: begin
        ctrl.reg_write     = 1'b1;
        ctrl.reg_waddr_src = WA_OP1;
        ctrl.reg_wdata_src = WD_RESULT;
        next = S_PCINC;
      end

      S_TERM: begin
        ctrl.mode_write = 1'b1;
        ctrl.mode_value = 1'b1;
        next = S_PCTOZERO;
      end

      S_PCTOZERO: begin
        ctrl.pc_src   = PCSRC_ZERO;
        ctrl.pc_write = 1'b1;
        next = S_HOLDSET;
      end

      S_HOLDSET: begin
        ctrl.reg_write     = 1'b1;
        ctrl.reg_waddr_src = WA_HOLD;
        ctrl.reg_wdata_src = WD_ONE;
        next = S_STALL;
      end

      S_STALL: begin
        if (start) next = S_START;
      end

      // Start interrupt: clear $HOLD, cause 1, then the syscall entry path
      S_START: begin
        ctrl.reg_write     = 1'b1;
        ctrl.reg_waddr_src = WA_HOLD;
        ctrl.reg_wdata_src = WD_ZERO;
        ctrl.a_src         = ASRC_CAUSE;
        ctrl.cause         = CAUSE_START;
        ctrl.alu_op        = ALU_PASSA;
        ctrl.res_write     = 1'b1;
        next = S_SYS2;
      end

      S_BADADDR: begin
        ctrl.a_src     = ASRC_CAUSE;
        ctrl.cause     = CAUSE_BADADDR;
        ctrl.alu_op    = ALU_PASSA;
        ctrl.res_write = 1'b1;
        next = S_SYS2;
      end

      S_SYSCALL: begin
        ctrl.a_src     = ASRC_A;
        ctrl.alu_op    = ALU_PASSA;
        ctrl.res_write = 1'b1;
        next = S_SYS2;
      end

      S_SYS2: begin
        ctrl.mode_write = 1'b1;
        ctrl.mode_value = 1'b1;
        next = S_SYS3;
      end

      S_SYS3: begin
        ctrl.reg_write     = 1'b1;
        ctrl.reg_waddr_src = WA_CAUSE;
        ctrl.reg_wdata_src = WD_RESULT;
        next = S_SYS4;
      end

      S_SYS4: begin
        ctrl.reg_write     = 1'b1;
        ctrl.reg_waddr_src = WA_FLAG;
        ctrl.reg_wdata_src = WD_IR;
        next = S_SYS5;
      end

      S_SYS5: next = S_SYS6;

      S_SYS6: begin
        ctrl.reg_write     = 1'b1;
        ctrl.reg_waddr_src = WA_RA;
        ctrl.reg_wdata_src = WD_PC;
        next = S_SYS7;
      end

      S_SYS7: begin
        ctrl.pc_src   = PCSRC_VEC;
        ctrl.pc_write = 1'b1;
        next = S_FETCH;
      end

      S_RETKERN: begin
        ctrl.pc_src     = PCSRC_EPC;
        ctrl.pc_write   = 1'b1;
        ctrl.mode_write = 1'b1;
        ctrl.mode_value = 1'b0;
        next = S_FETCH;
      end

      default: next = S_RESET;
    endcase
  end

endmodule
