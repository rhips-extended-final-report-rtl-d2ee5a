// rhips_imem: instruction memory.
//
// WORDS 16-bit words; 256 by default, the 0x000-0x0FF span of the processor's
// instruction memory map (kernel code from 0x000, user code after it). The
// read is combinational (address in, instruction out in the same cycle, so IR
// loads in the fetch state); the write port, used to load a program, writes
// on the rising clock edge when we is 1. The contents are not reset.
//
// Follows the design: 256 words at 0x000-0x0FF and a write port (InstWrite).
// Own choice: combinational read and no reset of the contents.
module rhips_imem #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [15:0]   rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [15:0]   wdata
);

  logic [15:0] mem [WORDS];

  always_comb rdata = mem[raddr];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

endmodule
