// rhips_exec_unit_tb: execution section test. Captures random operands in
// A, B and C, then for every A-input and B-input source and a set of ALU
// requests checks alu_out and the value latched in Result against a model:
// addi sign-extends IR[7:0], other opcodes zero-extend it, the jump inputs
// give {PC[15:12], 0} and IR[11:0]. Also checks that the operand registers
// hold while their enables are low.
//
// Follows the design's extension rules; the multiplexer numbering tested is
// this design's own.
module rhips_exec_unit_tb;
  import rhips_pkg::*;
  logic  clk = 0, rst, zero, overflow;
  ctrl_t ctrl;
  word_t ir, pc, a_data, b_data, c_data, mem_rdata, alu_out, result;
  word_t a_q, b_q, c_q;
  int    checks = 0, failures = 0;

  rhips_exec_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t alu_model(input logic [3:0] op, input word_t a, input word_t b);
    case (op)
      4'h0: return (a > 15) ? '0 : word_t'(b << a);
      4'h1: return a & b;
      4'h2: return a | b;
      4'h3: return a + b;
      4'h4: return a - b;
      4'h7: return a;
      4'h8: return b;
      4'hA: return ($signed(a) < $signed(b)) ? 16'd1 : 16'd0;
      default: return '0;
    endcase
  endfunction

  function automatic logic [3:0] opcode_op(input logic [3:0] opc);
    case (opc)
      4'h0: return 4'hA;
      4'h3, 4'hA: return 4'h3;
      4'h4: return 4'h1;
      4'h5, 4'h8: return 4'h2;
      4'h6: return 4'h4;
      4'h7: return 4'h0;
      default: return 4'h9;
    endcase
  endfunction

  initial begin
    rst = 1; ctrl = '0; ir = 0; pc = 0; a_data = 0; b_data = 0; c_data = 0; mem_rdata = 0;
    @(posedge clk); #1; rst = 0;
    for (int r = 0; r < 300; r++) begin
      // decode: capture operands
      a_q = word_t'($urandom); b_q = word_t'($urandom); c_q = word_t'($urandom);
      if (r % 4 == 0) a_q = word_t'($urandom_range(0, 17));
      a_data = a_q; b_data = b_q; c_data = c_q;
      ctrl = '0; ctrl.a_write = 1; ctrl.b_write = 1; ctrl.c_write = 1;
      @(posedge clk); #1;
      a_data = '1; b_data = '1; c_data = '1;   // must not be captured
      ir = word_t'($urandom); pc = word_t'($urandom); mem_rdata = word_t'($urandom);
      for (int as = 0; as < 6; as++)
        for (int bs = 0; bs < 4; bs++) begin
          word_t ea, eb, ey, imm;
          logic [3:0] op;
          imm = (ir[15:12] == 4'hA) ? {{8{ir[7]}}, ir[7:0]} : {8'h00, ir[7:0]};
          case (as)
            0: ea = a_q; 1: ea = mem_rdata; 2: ea = imm; 3: ea = pc;
            4: ea = {pc[15:12], 12'h000}; default: ea = 16'(r % 16);
          endcase
          case (bs)
            0: eb = b_q; 1: eb = c_q; 2: eb = 16'd1; default: eb = {4'h0, ir[11:0]};
          endcase
          ctrl = '0;
          ctrl.a_src = asrc_t'(as); ctrl.b_src = bsrc_t'(bs); ctrl.cause = 4'(r % 16);
          if ((as + bs + r) % 2 == 0) begin
            ctrl.alu_req = AC_OPCODE; ctrl.alu_op = ALU_NOP; op = opcode_op(ir[15:12]);
          end else begin
            op = 4'($urandom_range(0, 10));
            ctrl.alu_req = AC_FIXED; ctrl.alu_op = alu_op_t'(op);
          end
          ey = alu_model(op, ea, eb);
          ctrl.res_write = 1;
          #1; checks++;
          if (alu_out !== ey || zero !== (ey == 0)) begin
            failures++; $display("FAIL as=%0d bs=%0d op=%h y=%h exp %h", as, bs, op, alu_out, ey);
          end
          @(posedge clk); #1; checks++;
          if (result !== ey) begin failures++; $display("FAIL result %h exp %h", result, ey); end
          ctrl.res_write = 0; ctrl.alu_req = AC_FIXED; ctrl.alu_op = ALU_PASSB; ctrl.b_src = BSRC_ONE;
          @(posedge clk); #1; checks++;
          if (result !== ey) begin failures++; $display("FAIL result hold"); end
          ir = word_t'($urandom);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
