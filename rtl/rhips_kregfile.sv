// rhips_kregfile: the kernel register file of RHIPS-Extended.
//
// Sixteen 16-bit registers, three combinational read ports and one
// synchronous write port, like the main file. It serves all register reads
// and writes while the processor is in kernel mode. Registers with a
// hardware meaning:
//   0x2 $PC_Temp     PC saved on a syscall or interrupt; retkern returns to it
//   0x3 $ErrMask     mask of the causes the kernel listens to
//   0x4 $ErrReg      cause of the last syscall or interrupt
//   0x6 $FlaggedInst instruction held in IR when the kernel was entered
//   0x7 $HOLD        1 = processor halted (term); visible on hold
//   0x9 $00          reads as 0, writes are ignored
//   0xE $Kbr         kernel branch target, always visible on br
// The register map is the processor's. The reset values are this design's
// choice: all 0 except $ErrMask, which resets to 0xFFFF so that the kernel
// listens to every cause until it changes the mask.
module rhips_kregfile
  import rhips_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] raddr_a,
  input  logic [3:0] raddr_b,
  input  logic [3:0] raddr_c,
  output word_t      rdata_a,
  output word_t      rdata_b,
  output word_t      rdata_c,
  input  logic       we,
  input  logic [3:0] waddr,
  input  word_t      wdata,
  output word_t      br,
  output word_t      pc_temp,
  output logic       hold
);

  word_t regs [16];

  function automatic word_t rd(input logic [3:0] addr);
    if (addr == K_ZERO) return '0;
    else                return regs[addr];
  endfunction

  always_comb begin
    rdata_a = rd(raddr_a);
    rdata_b = rd(raddr_b);
    rdata_c = rd(raddr_c);
    br      = regs[K_BR];
    pc_temp = regs[K_PCTEMP];
    hold    = regs[K_HOLD][0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 16; i++) regs[i] <= '0;
      regs[K_ERRMASK] <= 16'hFFFF;
    end else if (we && waddr != K_ZERO) begin
      regs[waddr] <= wdata;
    end
  end

endmodule
