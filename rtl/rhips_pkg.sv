// rhips_pkg: shared types and constants of the RHIPS-Extended processor.
//
// RHIPS-Extended is a 16-bit multicycle load/store processor with a user
// register file and a separate kernel register file. This package holds the
// instruction encodings (4-bit opcode, 3-bit extension code), the ALU operation
// codes, the register numbers with a fixed hardware meaning, the select codes
// of the datapath multiplexers and the control word that the FSM drives.
//
// Opcodes, extension codes, ALU operation codes and register numbers follow the
// processor's instruction set tables. The numbering of the multiplexer selects
// is this design's own, though the PC select keeps the order of the datapath
// drawing (Result, newPC, 0, branch register, 0x4) and appends PC_Temp.
//
// Some register-number constants are listed for reference and not used by
// every module; lint reports them as unused parameters.
package rhips_pkg;

  typedef logic [15:0] word_t;

  // Primary opcodes, IR[15:12]
  typedef enum logic [3:0] {
    OP_SLT  = 4'h0,
    OP_EXT  = 4'h1,   // Ext-Type: beq, bne, ccp, cmp, term, syscall
    OP_EXT2 = 4'h2,   // second Ext-Type opcode: retkern
    OP_ADD  = 4'h3,
    OP_AND  = 4'h4,
    OP_OR   = 4'h5,
    OP_SUB  = 4'h6,
    OP_LS   = 4'h7,
    OP_ORI  = 4'h8,
    OP_L2R  = 4'h9,
    OP_ADDI = 4'hA,
    OP_L2M  = 4'hB,
    OP_JAL  = 4'hC,
    OP_J    = 4'hD,
    OP_JR   = 4'hE,
    OP_NONE = 4'hF
  } opcode_t;

  // Extension codes, IR[10:8] of an Ext-Type instruction
  typedef enum logic [2:0] {
    EXT_BEQ     = 3'd0,
    EXT_BNE     = 3'd1,
    EXT_CCP     = 3'd2,
    EXT_CMP     = 3'd3,
    EXT_KM2MM   = 3'd4,   // withdrawn, executes as no-op
    EXT_MM2KM   = 3'd5,   // withdrawn, executes as no-op
    EXT_TERM    = 3'd6,
    EXT_SYSCALL = 3'd7
  } ext_t;

  // ALU operation codes (ALU Control table)
  typedef enum logic [3:0] {
    ALU_SHL   = 4'h0,
    ALU_AND   = 4'h1,
    ALU_OR    = 4'h2,
    ALU_ADD   = 4'h3,
    ALU_SUB   = 4'h4,
    ALU_PASSA = 4'h7,
    ALU_PASSB = 4'h8,
    ALU_NOP   = 4'h9,
    ALU_SLT   = 4'hA
  } alu_op_t;

  // What the FSM asks of the ALU control: a fixed operation, or the one the
  // opcode of the instruction in IR calls for.
  typedef enum logic [1:0] {
    AC_FIXED  = 2'd0,
    AC_OPCODE = 2'd1
  } alu_req_t;

  // Main register numbers with a hardware meaning
  localparam logic [3:0] R_ZERO    = 4'h0;
  localparam logic [3:0] R_RA      = 4'h2;
  localparam logic [3:0] R_IN      = 4'hA;
  localparam logic [3:0] R_OUT     = 4'hB;
  localparam logic [3:0] R_MEMPAGE = 4'hD;
  localparam logic [3:0] R_BR      = 4'hE;

  // Kernel register numbers with a hardware meaning
  localparam logic [3:0] K_PCTEMP  = 4'h2;
  localparam logic [3:0] K_ERRMASK = 4'h3;
  localparam logic [3:0] K_ERRREG  = 4'h4;
  localparam logic [3:0] K_FLAGGED = 4'h6;
  localparam logic [3:0] K_HOLD    = 4'h7;
  localparam logic [3:0] K_ZERO    = 4'h9;
  localparam logic [3:0] K_BR      = 4'hE;

  // Fixed addresses
  localparam word_t RESET_PC   = 16'h0000;
  localparam word_t HANDLER_PC = 16'h0004;

  // Interrupt causes written to $ErrReg by the hardware
  localparam logic [3:0] CAUSE_START   = 4'd1;
  localparam logic [3:0] CAUSE_BADADDR = 4'd2;

  // ALU A-input select
  typedef enum logic [2:0] {
    ASRC_A     = 3'd0,   // A register
    ASRC_MEM   = 3'd1,   // main memory read data
    ASRC_IMM   = 3'd2,   // extended IR[7:0]
    ASRC_PC    = 3'd3,   // PC
    ASRC_PCHI  = 3'd4,   // {PC[15:12], 12'b0}
    ASRC_CAUSE = 3'd5    // interrupt cause from the control
  } asrc_t;

  // ALU B-input select
  typedef enum logic [1:0] {
    BSRC_B     = 2'd0,   // B register
    BSRC_C     = 2'd1,   // C register
    BSRC_ONE   = 2'd2,   // constant 1
    BSRC_JADDR = 2'd3    // zero-extended IR[11:0]
  } bsrc_t;

  // PC input select
  typedef enum logic [2:0] {
    PCSRC_RESULT = 3'd0,
    PCSRC_NEWPC  = 3'd1,
    PCSRC_ZERO   = 3'd2,
    PCSRC_BR     = 3'd3,
    PCSRC_VEC    = 3'd4,  // 0x4, interrupt handler
    PCSRC_EPC    = 3'd5   // $PC_Temp, return from kernel
  } pcsrc_t;

  // Register write address select
  typedef enum logic [2:0] {
    WA_RD   = 3'd0,   // IR[11:8]
    WA_OP1  = 3'd1,   // IR[7:4]
    WA_KD   = 3'd2,   // {3'b0, IR[11]}
    WA_RA   = 3'd3,   // 0x2 ($ra, or $PC_Temp in kernel mode)
    WA_CAUSE= 3'd4,   // 0x4 $ErrReg
    WA_FLAG = 3'd5,   // 0x6 $FlaggedInst
    WA_HOLD = 3'd6    // 0x7 $HOLD
  } waddr_t;

  // Register write data select
  typedef enum logic [2:0] {
    WD_RESULT = 3'd0,
    WD_NEWPC  = 3'd1,
    WD_PC     = 3'd2,
    WD_IR     = 3'd3,
    WD_ZERO   = 3'd4,
    WD_ONE    = 3'd5
  } wdata_t;

  // Register-bank B read address select
  typedef enum logic {
    BA_OP2 = 1'b0,    // IR[3:0]
    BA_KD  = 1'b1     // {3'b0, IR[11]}
  } baddr_t;

  // Main memory address select
  typedef enum logic {
    MS_DATA  = 1'b0,  // {page, IR[7:0]}
    MS_FETCH = 1'b1   // instruction fetch through the memory manager
  } memsrc_t;

  // Control word driven by the FSM in every state
  typedef struct packed {
    logic     ir_write;
    logic     pc_write;
    pcsrc_t   pc_src;
    logic     a_write;
    logic     b_write;
    logic     c_write;
    baddr_t   b_addr_src;
    asrc_t    a_src;
    bsrc_t    b_src;
    alu_req_t alu_req;
    alu_op_t  alu_op;
    logic     res_write;
    logic     reg_write;
    waddr_t   reg_waddr_src;
    wdata_t   reg_wdata_src;
    logic     mode_write;     // write $memPage (user register 0xD)
    logic     mode_value;     // 1 = kernel mode
    memsrc_t  mem_src;
    logic     dat_write;
    logic [3:0] cause;        // cause code for ASRC_CAUSE
  } ctrl_t;

  // States of the control FSM. Names follow the processor's state diagram
  // where it has one; S_START, S_BADADDR, S_RETKERN and S_HOLDSET are this
  // design's additions for the start interrupt, the invalid-fetch trap, the
  // return from the kernel and the separate write of $HOLD.
  typedef enum logic [5:0] {
    S_RESET, S_FETCH, S_DECODE,
    S_EXEC, S_L2R, S_WB, S_PCINC, S_L2M,
    S_BRCMP, S_BRANCH,
    S_J, S_JR, S_JAL, S_STOREJUMP, S_CALCJUMP, S_DOJUMP,
    S_CCP, S_SETKERNEL, S_RESTOKERNEL, S_SETUSER,
    S_CMP, S_CMP2, S_CMP3, S_CMP4, S_CMP5,
    S_TERM, S_PCTOZERO, S_HOLDSET, S_STALL,
    S_SYSCALL, S_SYS2, S_SYS3, S_SYS4, S_SYS5, S_SYS6, S_SYS7,
    S_START, S_BADADDR, S_RETKERN
  } state_t;

endpackage
