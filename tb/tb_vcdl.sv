// tb_vcdl: self-checking test of the delay line / charge pump model.
// After start-up the taps must be the reference delayed by (k+1)/32 of
// INIT_DELAY_PS; every cycle with up lengthens the line by 10 ps and every
// cycle with down shortens it, which is measured on the rising edges of
// taps 0, 15 and 31.
`timescale 1ps/1fs
module tb_vcdl;
  logic clk = 1'b0, rst, up, down;
  logic [31:0] taps;
  realtime t_ref, t_tap[32];
  int checks = 0, failures = 0;

  vcdl dut (.ref_clk(clk), .rst(rst), .up(up), .down(down), .taps(taps));

  always #1562.5 clk = ~clk;
  always @(posedge clk) t_ref = $realtime;
  for (genvar k = 0; k < 32; k++) begin : g_mon
    always @(posedge taps[k]) t_tap[k] = $realtime;
  end

  task automatic check_delay(input real line);
    real d, e;
    // every line delay used here is below one period: all taps rise within
    // the period of the reference edge that launched them
    foreach (t_tap[k]) if (k == 0 || k == 15 || k == 31) begin
      e = line * (k + 1) / 32.0;
      d = t_tap[k] - t_ref;
      checks++;
      if (d < e - 0.5 || d > e + 0.5) begin
        failures++; $display("line %f: tap %0d delay %f expected %f", line, k, d, e);
      end
    end
  endtask

  initial begin
    #(3125.0 * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; up = 1'b0; down = 1'b0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (3) @(posedge clk);
    #2900;                        // tap 31 of the next period has risen
    check_delay(2000.0);
    // 20 cycles of up: +200 ps
    @(negedge clk) up = 1'b1;
    repeat (20) @(posedge clk);
    #1 up = 1'b0;
    repeat (3) @(posedge clk);
    #3000;
    check_delay(2200.0);
    // 5 cycles of down: -50 ps
    @(negedge clk) down = 1'b1;
    repeat (5) @(posedge clk);
    #1 down = 1'b0;
    repeat (3) @(posedge clk);
    #3000;
    check_delay(2150.0);
    // both at once: no change
    @(negedge clk) begin up = 1'b1; down = 1'b1; end
    repeat (5) @(posedge clk);
    #1 begin up = 1'b0; down = 1'b0; end
    repeat (3) @(posedge clk);
    #3000;
    check_delay(2150.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
