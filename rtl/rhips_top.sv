// rhips_top: the RHIPS-Extended processor, a 16-bit multicycle load/store CPU
// with a user mode and a kernel mode.
//
// The processor is the control FSM plus three sections and the PC logic:
//   memory section    instruction memory, main memory (user data page and
//                     kernel page), memory manager
//   register section  user and kernel register files, switched by the
//                     kernel-mode flag
//   execution section A, B, C registers, operand multiplexers, ALU, Result
//   PC logic          PC register, PC+1 adder, PC source multiplexer
//                     (Result, PC+1, 0, branch register, 0x4, $PC_Temp)
// and the instruction register IR.
//
// Interface: rst is synchronous and active high; after it the processor
// fetches from address 0, where the kernel's idle code (term) halts it. A
// one-cycle or longer pulse on start then enters the kernel at 0x4 with cause
// 1. in_port is read as register $IN (0xA), out_port is register $OUT (0xB).
// prog_we/prog_addr/prog_data write the instruction memory (one word per
// clock). pc, ir, state, kmode, hold and overflow are status outputs: hold is
// 1 while the program has terminated, overflow is the ALU's signed overflow
// flag of the current cycle.
//
// Timing: one state per clock; most instructions take 4 to 9 clocks (see
// rhips_control). The partition into sections, the register transfers and the
// memory map follow the processor's description; the status outputs, the
// start input and the program-load port are this design's choices.
module rhips_top
  import rhips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned MAIN_WORDS = 512,
  parameter int unsigned IAW        = $clog2(IMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  word_t          in_port,
  output word_t          out_port,
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  word_t          prog_data,
  output word_t          pc,
  output word_t          ir,
  output state_t         state,
  output logic           kmode,
  output logic           hold,
  output logic           overflow
);

  ctrl_t ctrl;
  word_t new_pc, pc_next, inst, mem_rdata, alu_out, result;
  word_t a_data, b_data, c_data, br, pc_temp;
  logic  zero, fetch_invalid;

  rhips_control u_ctrl (
    .clk, .rst, .ir, .zero, .hold, .start, .fetch_invalid, .ctrl, .state
  );

  // PC logic
  rhips_pc_adder u_pc_add (.pc, .new_pc);

  rhips_mux #(.W(16), .N(6)) u_pc_mux (
    .in  ({pc_temp, HANDLER_PC, br, RESET_PC, new_pc, result}),
    .sel (ctrl.pc_src),
    .y   (pc_next)
  );

  rhips_reg #(.W(16), .RESET_VAL(RESET_PC)) u_pc (
    .clk, .rst, .en(ctrl.pc_write), .d(pc_next), .q(pc)
  );

  rhips_reg u_ir (.clk, .rst, .en(ctrl.ir_write), .d(inst), .q(ir));

  rhips_mem_subsys #(.IMEM_WORDS(IMEM_WORDS), .MAIN_WORDS(MAIN_WORDS)) u_mem (
    .clk, .pc, .ir, .kmode,
    .mem_src   (ctrl.mem_src),
    .dat_write (ctrl.dat_write),
    .wdata     (alu_out),
    .inst, .mem_rdata, .fetch_invalid,
    .prog_we, .prog_addr, .prog_data
  );

  rhips_regbank u_regs (
    .clk, .rst, .ir, .pc, .new_pc, .result,
    .b_addr_src    (ctrl.b_addr_src),
    .reg_write     (ctrl.reg_write),
    .reg_waddr_src (ctrl.reg_waddr_src),
    .reg_wdata_src (ctrl.reg_wdata_src),
    .mode_write    (ctrl.mode_write),
    .mode_value    (ctrl.mode_value),
    .in_port,
    .a_data, .b_data, .c_data, .br, .pc_temp, .hold, .kmode, .out_port
  );

  rhips_exec_unit u_exec (
    .clk, .rst, .ctrl, .ir, .pc, .a_data, .b_data, .c_data, .mem_rdata,
    .alu_out, .result, .zero, .overflow
  );

endmodule
