// rhips_regfile: the main (user) register file of RHIPS-Extended.
//
// Sixteen 16-bit registers with three combinational read ports (A, B and C,
// addressed by IR[7:4], IR[3:0] and IR[11:8] in the decode step) and one
// synchronous write port. Several registers have a hardware meaning:
//   0x0 $0       reads as 0, writes are ignored
//   0xA $IN      reads the in_port pins, writes are ignored
//   0xB $OUT     ordinary register whose value drives out_port
//   0xD $memPage bit 0 is the kernel-mode flag (1 = kernel registers and
//                kernel memory page are in use); the control writes it
//                through the separate mode port, which wins over the
//                ordinary write port
//   0xE $br      branch target, always visible on br
// The register map is the processor's; the reset value (all registers 0, so
// the processor leaves reset in user mode) and the use of bit 0 only of
// $memPage are this design's choices.
module rhips_regfile
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
  input  logic       mode_we,
  input  logic       mode_val,
  input  word_t      in_port,
  output word_t      out_port,
  output word_t      br,
  output logic       kmode
);

  word_t regs [16];

  function automatic word_t rd(input logic [3:0] addr);
    if (addr == R_ZERO)    return '0;
    else if (addr == R_IN) return in_port;
    else                   return regs[addr];
  endfunction

  always_comb begin
    rdata_a  = rd(raddr_a);
    rdata_b  = rd(raddr_b);
    rdata_c  = rd(raddr_c);
    out_port = regs[R_OUT];
    br       = regs[R_BR];
    kmode    = regs[R_MEMPAGE][0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 16; i++) regs[i] <= '0;
    end else begin
      if (we && waddr != R_ZERO && waddr != R_IN)
        regs[waddr] <= wdata;
      if (mode_we)
        regs[R_MEMPAGE] <= {15'b0, mode_val};
    end
  end

endmodule
