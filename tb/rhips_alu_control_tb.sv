// rhips_alu_control_tb: exhaustive test of the ALU control.
// Every opcode under the opcode request is compared with the instruction
// set's operation, and every fixed operation must pass through unchanged.
//
// Expected values follow the design's operation table; the test method is this
// testbench's own.
module rhips_alu_control_tb;
  import rhips_pkg::*;

  logic     clk = 0;
  alu_req_t req;
  alu_op_t  fixed_op, op;
  opcode_t  opcode;
  int       checks = 0, failures = 0;

  rhips_alu_control dut (.req, .fixed_op, .opcode, .op);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] expected(input logic [3:0] opc);
    case (opc)
      4'h0: return 4'hA;
      4'h3: return 4'h3;
      4'h4: return 4'h1;
      4'h5: return 4'h2;
      4'h6: return 4'h4;
      4'h7: return 4'h0;
      4'h8: return 4'h2;
      4'hA: return 4'h3;
      default: return 4'h9;
    endcase
  endfunction

  initial begin
    for (int o = 0; o < 16; o++) begin
      req = AC_OPCODE; opcode = opcode_t'(o); fixed_op = ALU_PASSB;
      #1; checks++;
      if (4'(op) !== expected(4'(o))) begin
        failures++; $display("FAIL opcode %h -> %h", o, op);
      end
    end
    for (int f = 0; f < 16; f++) begin
      req = AC_FIXED; fixed_op = alu_op_t'(f); opcode = OP_ADD;
      #1; checks++;
      if (4'(op) !== 4'(f)) begin failures++; $display("FAIL fixed %h", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
