// rhips_extender: widens an immediate field to 16 bits.
//
// With sign_ext = 1 the top bit of the field is copied into the upper bits
// (addi, whose immediate is signed); with sign_ext = 0 the upper bits are 0
// (ori, ls, and the 12-bit jump target). IN_W is the width of the field.
// Combinational.
//
// Follows the design: sign extension for addi, zero extension for ori and
// the jump target. Own choice: one module with a mode input for both.
module rhips_extender #(
  parameter int unsigned IN_W = 8
) (
  input  logic [IN_W-1:0] in,
  input  logic            sign_ext,
  output logic [15:0]     out
);

  always_comb begin
    out = {{(16-IN_W){sign_ext & in[IN_W-1]}}, in};
  end

endmodule
