// rhips_alu_control: picks the ALU operation for the current state.
//
// The control FSM either names an operation itself (AC_FIXED, for the
// address, pass-through and compare steps) or asks for the operation the
// opcode in IR stands for (AC_OPCODE, in the execute state shared by the
// arithmetic and immediate instructions). The opcode-to-operation map follows
// the instruction set: slt->0xA, add/addi->0x3, and->0x1, or/ori->0x2,
// sub->0x4, ls->0x0. Any other opcode under AC_OPCODE gives no operation (0x9).
// Combinational.
//
// Follows the design: the opcode-to-operation map and the operation codes.
// Own choice: one shared execute state lets the opcode pick the operation, where
// the state diagram gives each instruction its own state with a fixed ALUOP.
module rhips_alu_control
  import rhips_pkg::*;
(
  input  alu_req_t req,
  input  alu_op_t  fixed_op,
  input  opcode_t  opcode,
  output alu_op_t  op
);

  always_comb begin
    if (req == AC_FIXED) begin
      op = fixed_op;
    end else begin
      unique case (opcode)
        OP_SLT:           op = ALU_SLT;
        OP_ADD, OP_ADDI:  op = ALU_ADD;
        OP_AND:           op = ALU_AND;
        OP_OR, OP_ORI:    op = ALU_OR;
        OP_SUB:           op = ALU_SUB;
        OP_LS:            op = ALU_SHL;
        default:          op = ALU_NOP;
      endcase
    end
  end

endmodule
