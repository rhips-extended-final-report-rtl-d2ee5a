// rhips_extender_tb: exhaustive test of the 8-bit immediate extender in both
// modes and of the 12-bit jump-target extender.
//
// Follows the design's extension rules; the test method is this testbench's own.
module rhips_extender_tb;
  logic        clk = 0;
  logic [7:0]  in8;
  logic [11:0] in12;
  logic        sx;
  logic [15:0] out8, out12;
  int          checks = 0, failures = 0;

  rhips_extender #(.IN_W(8))  dut8  (.in(in8),  .sign_ext(sx),   .out(out8));
  rhips_extender #(.IN_W(12)) dut12 (.in(in12), .sign_ext(1'b0), .out(out12));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int v = 0; v < 256; v++) begin
        logic [15:0] e;
        in8 = 8'(v); sx = s[0];
        e = s[0] ? 16'(int'($signed(8'(v)))) : 16'(v);
        #1; checks++;
        if (out8 !== e) begin failures++; $display("FAIL s=%0d v=%h out=%h", s, v, out8); end
      end
    for (int i = 0; i < 500; i++) begin
      in12 = 12'($urandom);
      #1; checks++;
      if (out12 !== {4'h0, in12}) begin failures++; $display("FAIL 12 %h", in12); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
