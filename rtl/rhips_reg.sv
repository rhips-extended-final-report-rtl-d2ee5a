// rhips_reg: generic register with write enable and synchronous reset.
//
// Used for PC, IR, A, B, C and Result. On a rising clock edge, rst loads
// RESET_VAL, otherwise en loads d; with en low the value is held. The output
// is the stored value.
//
// Follows the design: a generic 16-bit register for PC, IR, A, B, C and Result.
// Own choice: synchronous active-high reset and the RESET_VAL parameter.
module rhips_reg #(
  parameter int unsigned     W         = 16,
  parameter logic [W-1:0]    RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VAL;
    else if (en) q <= d;
  end

endmodule
