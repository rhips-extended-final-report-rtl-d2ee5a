// rhips_alu_tb: self-checking test of the ALU.
// Applies every operation code, with hand-picked corner cases and random
// operands, and compares y, zero and overflow with a reference written from
// the operation table (shift B left by A, signed slt, signed overflow).
//
// Expected values follow the design's operation table; shift direction, signed
// slt and the overflow rule are this design's own choices.
module rhips_alu_tb;
  import rhips_pkg::*;

  logic    clk = 0;
  word_t   a, b, y;
  alu_op_t op;
  logic    zero, overflow;
  int      checks = 0, failures = 0;

  rhips_alu dut (.a, .b, .op, .y, .zero, .overflow);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [3:0] o, input word_t ta, input word_t tb);
    logic [15:0] ey;
    logic        eo;
    int signed   sa, sb;
    sa = int'($signed(ta));
    sb = int'($signed(tb));
    eo = 1'b0;
    case (o)
      4'h0: ey = (ta >= 16) ? 16'h0 : 16'(tb << ta);
      4'h1: ey = ta & tb;
      4'h2: ey = ta | tb;
      4'h3: begin ey = 16'(ta + tb); eo = (sa + sb > 32767) || (sa + sb < -32768); end
      4'h4: begin ey = 16'(ta - tb); eo = (sa - sb > 32767) || (sa - sb < -32768); end
      4'h7: ey = ta;
      4'h8: ey = tb;
      4'hA: ey = (sa < sb) ? 16'd1 : 16'd0;
      default: ey = 16'h0;
    endcase
    a = ta; b = tb; op = alu_op_t'(o);
    #1;
    checks++;
    if (y !== ey || zero !== (ey == 0) || overflow !== eo) begin
      failures++;
      $display("FAIL op=%h a=%h b=%h y=%h(exp %h) z=%b o=%b(exp %b)", o, ta, tb, y, ey, zero, overflow, eo);
    end
  endtask

  initial begin
    // corner cases
    apply(4'h3, 16'h7FFF, 16'h0001);   // overflow on add
    apply(4'h3, 16'h8000, 16'h8000);   // overflow on add, zero result
    apply(4'h4, 16'h8000, 16'h0001);   // overflow on sub
    apply(4'h4, 16'h1234, 16'h1234);   // zero
    apply(4'h0, 16'd8, 16'h00FF);      // ls by 8
    apply(4'h0, 16'd16, 16'h00FF);     // shift out
    apply(4'hA, 16'hFFFF, 16'h0001);   // -1 < 1
    apply(4'hA, 16'h0001, 16'hFFFF);
    apply(4'h9, 16'h1234, 16'h5678);   // no operation
    for (int o = 0; o < 16; o++)
      for (int i = 0; i < 300; i++)
        apply(4'(o), 16'($urandom), (i % 3 == 0) ? 16'($urandom_range(0, 20)) : 16'($urandom));
    for (int i = 0; i < 200; i++) apply(4'h0, 16'($urandom_range(0, 20)), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
