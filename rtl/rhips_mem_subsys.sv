// rhips_mem_subsys: the memory section of RHIPS-Extended: instruction memory,
// main memory, memory manager and the switching between them.
//
// inst is the instruction at PC, from the instruction memory or, for a PC in
// the kernel page, from main memory (mem_src must then be MS_FETCH so that
// main memory is addressed by the PC). For loads and stores (MS_DATA) main
// memory is addressed by {kmode, IR[7:0]}: user programs see words 0-255,
// the kernel words 256-511. mem_rdata is the main memory word at that
// address; a store writes wdata when dat_write is 1. fetch_invalid flags a PC
// outside both memories. prog_* load the instruction memory. All reads are
// combinational, writes take effect at the rising clock edge.
//
// Follows the design: the memory section groups both memories, the memory
// manager and their switching; loads and stores use IR[7:0] and the page bit.
// Own choice: fetching from the kernel page through main memory and the
// invalid-fetch flag. Lint notes IR[15:8] as unused: only the address field
// of the instruction is needed here.
module rhips_mem_subsys
  import rhips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned MAIN_WORDS = 512,
  parameter int unsigned IAW        = $clog2(IMEM_WORDS),
  parameter int unsigned MAW        = $clog2(MAIN_WORDS)
) (
  input  logic           clk,
  input  word_t          pc,
  input  word_t          ir,
  input  logic           kmode,
  input  memsrc_t        mem_src,
  input  logic           dat_write,
  input  word_t          wdata,
  output word_t          inst,
  output word_t          mem_rdata,
  output logic           fetch_invalid,
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  word_t          prog_data
);

  logic [IAW-1:0] imem_addr;
  logic [MAW-1:0] kmem_addr, main_addr;
  logic           from_kernel;
  word_t          imem_rdata;

  rhips_memman #(.IMEM_WORDS(IMEM_WORDS), .MAIN_WORDS(MAIN_WORDS)) u_memman (
    .pc, .imem_addr, .kmem_addr, .from_kernel, .invalid(fetch_invalid)
  );

  rhips_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .raddr(imem_addr), .rdata(imem_rdata),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  always_comb begin
    if (mem_src == MS_FETCH) main_addr = kmem_addr;
    else                     main_addr = MAW'({kmode, ir[7:0]});
  end

  rhips_mainmem #(.WORDS(MAIN_WORDS)) u_main (
    .clk, .addr(main_addr), .rdata(mem_rdata),
    .we(dat_write), .wdata
  );

  always_comb inst = from_kernel ? mem_rdata : imem_rdata;

endmodule
