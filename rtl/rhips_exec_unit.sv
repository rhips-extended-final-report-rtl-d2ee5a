// rhips_exec_unit: the execution section of RHIPS-Extended: the A, B and C
// operand registers, the ALU input multiplexers, the immediate extenders, the
// ALU control, the ALU and the Result register.
//
// In the decode state the three register-bank read ports are captured in A,
// B and C. In the following states the ALU combines one of
//   A input: A, main-memory read data, extended IR[7:0], PC,
//            {PC[15:12], 12'b0}, or the control's cause code
//   B input: B, C, the constant 1, zero-extended IR[11:0]
// and the result is captured in Result when res_write is 1. IR[7:0] is
// sign-extended for addi and zero-extended otherwise. alu_out, zero and
// overflow are combinational; zero feeds the branch decision of the control in
// the same cycle. The registers and the ALU are the processor's; the order of
// the multiplexer inputs is this design's.
//
// Follows the design: A, B, C and Result registers, ALU with its control,
// sign extension for addi and zero extension for ori and the jump target.
// Own choice: the input numbering of the A and B multiplexers, and placing
// the immediate on the A multiplexer instead of a separate ALU port.
// Lint notes only ctrl fields that belong to other sections as unused; they
// travel in the one control word on purpose and drive no logic here.
module rhips_exec_unit
  import rhips_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  ctrl_t ctrl,
  input  word_t ir,
  input  word_t pc,
  input  word_t a_data,
  input  word_t b_data,
  input  word_t c_data,
  input  word_t mem_rdata,
  output word_t alu_out,
  output word_t result,
  output logic  zero,
  output logic  overflow
);

  word_t   a_q, b_q, c_q, imm, jaddr, alu_a, alu_b;
  alu_op_t op;

  rhips_reg u_a (.clk, .rst, .en(ctrl.a_write), .d(a_data), .q(a_q));
  rhips_reg u_b (.clk, .rst, .en(ctrl.b_write), .d(b_data), .q(b_q));
  rhips_reg u_c (.clk, .rst, .en(ctrl.c_write), .d(c_data), .q(c_q));

  rhips_extender #(.IN_W(8)) u_imm_ext (
    .in(ir[7:0]), .sign_ext(opcode_t'(ir[15:12]) == OP_ADDI), .out(imm)
  );
  rhips_extender #(.IN_W(12)) u_jaddr_ext (
    .in(ir[11:0]), .sign_ext(1'b0), .out(jaddr)
  );

  rhips_mux #(.W(16), .N(6)) u_amux (
    .in  ({{12'b0, ctrl.cause}, {pc[15:12], 12'b0}, pc, imm, mem_rdata, a_q}),
    .sel (ctrl.a_src),
    .y   (alu_a)
  );

  rhips_mux #(.W(16), .N(4)) u_bmux (
    .in  ({jaddr, 16'd1, c_q, b_q}),
    .sel (ctrl.b_src),
    .y   (alu_b)
  );

  rhips_alu_control u_aluctl (
    .req(ctrl.alu_req), .fixed_op(ctrl.alu_op), .opcode(opcode_t'(ir[15:12])), .op
  );

  rhips_alu u_alu (.a(alu_a), .b(alu_b), .op, .y(alu_out), .zero, .overflow);

  rhips_reg u_res (.clk, .rst, .en(ctrl.res_write), .d(alu_out), .q(result));

endmodule
