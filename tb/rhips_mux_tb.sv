// rhips_mux_tb: multiplexer test, as in the unit-test plan: attach distinct
// values to the inputs, switch between them and compare the output; also
// checks that an out-of-range select gives 0.
//
// Follows the design's unit-test plan; the out-of-range check is this design's own.
module rhips_mux_tb;
  logic             clk = 0;
  logic [5:0][15:0] in6;
  logic [2:0]       sel6;
  logic [15:0]      y6;
  logic [2:0][3:0]  in3;
  logic [1:0]       sel3;
  logic [3:0]       y3;
  int               checks = 0, failures = 0;

  rhips_mux #(.W(16), .N(6)) dut6 (.in(in6), .sel(sel6), .y(y6));
  rhips_mux #(.W(4),  .N(3)) dut3 (.in(in3), .sel(sel3), .y(y3));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++) begin
      for (int i = 0; i < 6; i++) in6[i] = 16'($urandom);
      for (int i = 0; i < 3; i++) in3[i] = 4'($urandom);
      for (int s = 0; s < 8; s++) begin
        sel6 = 3'(s); sel3 = 2'(s);
        #1; checks++;
        if (y6 !== ((s < 6) ? in6[s] : 16'h0)) begin failures++; $display("FAIL6 s=%0d", s); end
        checks++;
        if (y3 !== (((s % 4) < 3) ? in3[s % 4] : 4'h0)) begin failures++; $display("FAIL3 s=%0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
