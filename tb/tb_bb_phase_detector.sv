// tb_bb_phase_detector: self-checking test of the bang-bang phase detector.
// A delayed copy of the reference clock is fed back with a delay that is
// either shorter or longer than one period; the detector must ask for more
// delay (up) when the copy is already high at the reference rising edge and
// for less (down) when it is still low, and never both.
`timescale 1ps/1fs
module tb_bb_phase_detector;
  logic clk = 1'b0, rst, fb = 1'b0, up, down;
  real dly;
  int checks = 0, failures = 0;

  bb_phase_detector dut (.ref_clk(clk), .rst(rst), .fb(fb), .up(up), .down(down));

  always #1562.5 clk = ~clk;

  task automatic launch(input logic v, input real t);
    fork begin #(t); fb = v; end join_none
  endtask
  always @(clk) launch(clk, dly);

  initial begin
    #(3125.0 * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; dly = 3000.0;
    repeat (3) @(posedge clk);
    #10;
    checks++;
    if (up || down) begin failures++; $display("outputs active in reset"); end
    rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      dly = (i % 2 == 0) ? 3125.0 - $urandom_range(5, 1400) : 3125.0 + $urandom_range(5, 1400);
      repeat (3) @(posedge clk);
      #10;
      checks += 2;
      if (up !== (dly < 3125.0)) begin failures++; $display("dly=%f up=%0d", dly, up); end
      if (down !== !up)          begin failures++; $display("dly=%f down=%0d up=%0d", dly, down, up); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
