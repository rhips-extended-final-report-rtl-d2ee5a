// rhips_mux: N-input multiplexer of W-bit words.
//
// y = in[sel]. A select value at or above N gives 0. The datapath uses one
// instance per select point (PC source, ALU A and B inputs, register write
// address and data). Combinational.
//
// Follows the design: plain multiplexers at each select point.
// Own choice: the parameterised form and 0 for out-of-range selects.
module rhips_mux #(
  parameter int unsigned W = 16,
  parameter int unsigned N = 4,
  parameter int unsigned S = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] in,
  input  logic [S-1:0]        sel,
  output logic [W-1:0]        y
);

  always_comb begin
    y = '0;
    for (int unsigned i = 0; i < N; i++)
      if (sel == S'(i)) y = in[i];
  end

endmodule
