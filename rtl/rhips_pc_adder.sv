// rhips_pc_adder: the PC incrementer.
//
// newPC = PC + 1, wrapping at 16 bits. Combinational; its output is the
// "newPC" that the PC takes at the end of most instructions and that jal
// stores as the return address.
//
// Follows the design: a simple adder that adds 1 to the PC.
// Own choice: wrap-around at 16 bits.
module rhips_pc_adder
  import rhips_pkg::*;
(
  input  word_t pc,
  output word_t new_pc
);

  always_comb new_pc = pc + 16'd1;

endmodule
