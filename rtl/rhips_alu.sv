// rhips_alu: the 16-bit arithmetic logic unit of RHIPS-Extended.
//
// Purely combinational. The operation codes are the processor's ALU control
// table: 0x0 left shift, 0x1 and, 0x2 or, 0x3 add, 0x4 subtract, 0x7 pass A,
// 0x8 pass B, 0x9 no operation, 0xA set-less-than. Codes 0x5, 0x6 and 0xB..0xF
// are unused and give 0, as does 0x9.
//
// Choices of this design, not fixed by the instruction set:
//  - left shift moves B left by the amount in A (the ls instruction puts its
//    immediate on A and the register on B); an amount of 16 or more gives 0;
//  - subtract is A - B, and the branch compare only looks at whether it is 0;
//  - set-less-than compares A and B as signed numbers;
//  - zero is 1 when y is 0; overflow is signed overflow of add and subtract
//    and is 0 for all other operations.
module rhips_alu
  import rhips_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_t op,
  output word_t   y,
  output logic    zero,
  output logic    overflow
);

  word_t sum, diff;

  always_comb begin
    sum  = a + b;
    diff = a - b;
    overflow = 1'b0;
    unique case (op)
      ALU_SHL:   y = (a > 16'd15) ? '0 : (b << a[3:0]);
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_ADD: begin
        y = sum;
        overflow = (a[15] == b[15]) && (sum[15] != a[15]);
      end
      ALU_SUB: begin
        y = diff;
        overflow = (a[15] != b[15]) && (diff[15] != a[15]);
      end
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      ALU_SLT:   y = ($signed(a) < $signed(b)) ? 16'd1 : 16'd0;
      default:   y = '0;
    endcase
    zero = (y == '0);
  end

endmodule
