// rhips_reg_tb: generic register test, as in the unit-test plan: write a
// value and read it back, then try to clear it with the enable low and check
// that the value holds; also checks reset and a non-zero reset value.
//
// Follows the design's unit-test plan; reset checks are this design's own.
module rhips_reg_tb;
  logic        clk = 0, rst, en;
  logic [15:0] d, q, q2;
  int          checks = 0, failures = 0;

  rhips_reg dut (.clk, .rst, .en, .d, .q);
  rhips_reg #(.W(16), .RESET_VAL(16'hA5A5)) dut2 (.clk, .rst, .en, .d, .q(q2));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [15:0] e, input logic [15:0] e2);
    checks++;
    if (q !== e || q2 !== e2) begin failures++; $display("FAIL q=%h exp %h q2=%h exp %h", q, e, q2, e2); end
  endtask

  initial begin
    logic [15:0] v;
    rst = 1; en = 0; d = 16'hFFFF;
    @(posedge clk); #1; chk(16'h0000, 16'hA5A5);
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      v = 16'($urandom);
      en = 1; d = v; @(posedge clk); #1; chk(v, v);
      en = 0; d = 16'h0000; @(posedge clk); #1; chk(v, v);
      @(posedge clk); #1; chk(v, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
