// rhips_memman: memory manager, decides where an instruction is fetched from.
//
// A PC below IMEM_WORDS fetches from the instruction memory. A PC from
// IMEM_WORDS up to MAIN_WORDS-1 fetches from main memory at the same address,
// which is the kernel page (words 256-511 by default), so the kernel can store
// code there and run it. Any higher PC is invalid: the control then enters the
// kernel with cause 2 instead of fetching. Combinational.
// Choosing between instruction memory and kernel memory by address is the
// processor's; the exact address split and the invalid-address trap are this
// design's choices.
module rhips_memman
  import rhips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned MAIN_WORDS = 512,
  parameter int unsigned IAW        = $clog2(IMEM_WORDS),
  parameter int unsigned MAW        = $clog2(MAIN_WORDS)
) (
  input  word_t           pc,
  output logic [IAW-1:0]  imem_addr,
  output logic [MAW-1:0]  kmem_addr,
  output logic            from_kernel,   // 1: fetch from main memory
  output logic            invalid
);

  always_comb begin
    imem_addr   = pc[IAW-1:0];
    kmem_addr   = pc[MAW-1:0];
    from_kernel = (32'(pc) >= IMEM_WORDS);
    invalid     = (32'(pc) >= MAIN_WORDS);
  end

endmodule
