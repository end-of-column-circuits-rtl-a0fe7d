// tb_coarse_counter: self-checking test of the dual-phase coarse counter.
// After reset, cnt0 must equal the number of rising clock edges seen, and
// cnt1 must equal cnt0 while the clock is high and cnt0+1 while it is low,
// so that one of the two is always half a period away from changing.
`timescale 1ps/1fs
module tb_coarse_counter;
  logic clk = 1'b0, rst;
  logic [31:0] cnt0, cnt1;
  int checks = 0, failures = 0;
  int rises;

  coarse_counter dut (.clk(clk), .rst(rst), .cnt0(cnt0), .cnt1(cnt1));

  always #1562.5 clk = ~clk;

  initial begin
    #(3125.0 * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #100 rst = 1'b0;
    rises = 0;
    for (int i = 0; i < 1000; i++) begin
      // middle of the low half: cnt0 = rises, cnt1 = rises + 1
      @(negedge clk); #781.25;
      checks += 2;
      if (cnt0 !== 32'(rises))     begin failures++; $display("low %0d: cnt0=%0d exp %0d", i, cnt0, rises); end
      if (cnt1 !== 32'(rises + 1)) begin failures++; $display("low %0d: cnt1=%0d exp %0d", i, cnt1, rises + 1); end
      @(posedge clk); rises++;
      // middle of the high half: both equal rises
      #781.25;
      checks += 2;
      if (cnt0 !== 32'(rises)) begin failures++; $display("high %0d: cnt0=%0d exp %0d", i, cnt0, rises); end
      if (cnt1 !== 32'(rises)) begin failures++; $display("high %0d: cnt1=%0d exp %0d", i, cnt1, rises); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
