// rhips_mainmem: main memory, holding the user data page and the kernel page.
//
// WORDS 16-bit words, 512 by default: words 0-255 are user data memory and
// words 256-511 kernel memory, as in the processor's data memory map. One
// port: combinational read, write on the rising clock edge when we is 1. The
// surrounding logic forms the address from the kernel-mode flag and IR[7:0]
// for loads and stores, or from the PC when an instruction is fetched from the
// kernel page. The contents are not reset.
//
// Follows the design: user data page 0-255 and kernel page 256-511.
// Own choice: one port with combinational read. The additional instruction
// region planned above 512 is not built.
module rhips_mainmem #(
  parameter int unsigned WORDS = 512,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [15:0]   rdata,
  input  logic          we,
  input  logic [15:0]   wdata
);

  logic [15:0] mem [WORDS];

  always_comb rdata = mem[addr];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

endmodule
