// rhips_regbank: both register files with their input multiplexers and the
// user/kernel switching between them.
//
// The kernel-mode flag is bit 0 of user register 0xD ($memPage). In user mode
// the three read ports and the write port reach the main register file; in
// kernel mode they reach the kernel register file, and the branch target br
// is taken from the kernel's $Kbr instead of $br. Kernel mode is switched on
// and off by the control's mode write, which always lands in the main file.
//
// Read addresses: A = IR[7:4], C = IR[11:8], B = IR[3:0] or, for cmp, the KD
// bit IR[11]. Write address: IR[11:8], IR[7:4], IR[11], or one of the fixed
// numbers 0x2, 0x4, 0x6, 0x7 used by jal, syscall and term. Write data: Result,
// newPC, PC, IR, 0 or 1. Reads are combinational, the write happens on the
// rising clock edge. The split into two files and the kernel-mode switch are
// the processor's; routing every kernel-mode access, not only the kernel
// instructions, to the kernel file is this design's reading of it.
//
// Follows the design: two physical register files, switched by the mode flag,
// with the fixed kernel write addresses 0x2, 0x4, 0x6 and 0x7.
// Own choice: every port (reads, write, branch register) switches with the
// mode, and the mode flag is written through a dedicated port.
module rhips_regbank
  import rhips_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  word_t  ir,
  input  word_t  pc,
  input  word_t  new_pc,
  input  word_t  result,
  input  baddr_t b_addr_src,
  input  logic   reg_write,
  input  waddr_t reg_waddr_src,
  input  wdata_t reg_wdata_src,
  input  logic   mode_write,
  input  logic   mode_value,
  input  word_t  in_port,
  output word_t  a_data,
  output word_t  b_data,
  output word_t  c_data,
  output word_t  br,
  output word_t  pc_temp,
  output logic   hold,
  output logic   kmode,
  output word_t  out_port
);

  logic [3:0] raddr_a, raddr_b, raddr_c, waddr;
  word_t      wdata;
  word_t      u_a, u_b, u_c, u_br;
  word_t      k_a, k_b, k_c, k_br;

  always_comb begin
    raddr_a = ir[7:4];
    raddr_c = ir[11:8];
    raddr_b = (b_addr_src == BA_KD) ? {3'b0, ir[11]} : ir[3:0];
  end

  rhips_mux #(.W(4), .N(7)) u_waddr_mux (
    .in  ({4'h7, 4'h6, 4'h4, 4'h2, {3'b0, ir[11]}, ir[7:4], ir[11:8]}),
    .sel (reg_waddr_src),
    .y   (waddr)
  );

  rhips_mux #(.W(16), .N(6)) u_wdata_mux (
    .in  ({16'd1, 16'd0, ir, pc, new_pc, result}),
    .sel (reg_wdata_src),
    .y   (wdata)
  );

  rhips_regfile u_main (
    .clk, .rst,
    .raddr_a, .raddr_b, .raddr_c,
    .rdata_a (u_a), .rdata_b (u_b), .rdata_c (u_c),
    .we      (reg_write && !kmode),
    .waddr, .wdata,
    .mode_we (mode_write),
    .mode_val(mode_value),
    .in_port, .out_port,
    .br      (u_br),
    .kmode
  );

  rhips_kregfile u_kern (
    .clk, .rst,
    .raddr_a, .raddr_b, .raddr_c,
    .rdata_a (k_a), .rdata_b (k_b), .rdata_c (k_c),
    .we      (reg_write && kmode),
    .waddr, .wdata,
    .br      (k_br),
    .pc_temp,
    .hold
  );

  always_comb begin
    a_data = kmode ? k_a  : u_a;
    b_data = kmode ? k_b  : u_b;
    c_data = kmode ? k_c  : u_c;
    br     = kmode ? k_br : u_br;
  end

endmodule
