// tb_dll: self-checking test of the delay-locked loop.
// From start-up the loop must lock within 200 reference cycles (113 steps of
// 10 ps from 2000 ps to 3125 ps are needed) and then keep the delay of every
// tap within one loop step of (k+1) x 97.66 ps, with the phase detector
// alternating between up and down.
`timescale 1ps/1fs
module tb_dll;
  logic clk = 1'b0, rst;
  logic [31:0] taps;
  realtime t_ref, t_tap[32];
  int checks = 0, failures = 0;
  int cyc, ups, downs;

  dll dut (.ref_clk(clk), .rst(rst), .taps(taps));

  always #1562.5 clk = ~clk;
  always @(posedge clk) t_ref = $realtime;
  for (genvar k = 0; k < 32; k++) begin : g_mon
    always @(posedge taps[k]) t_tap[k] = $realtime;
  end

  initial begin
    #(3125.0 * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real d, e;
    rst = 1'b1;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (200) @(posedge clk);
    ups = 0; downs = 0;
    for (cyc = 0; cyc < 100; cyc++) begin
      @(posedge clk);
      #10;
      if (dut.up) ups++;
      if (dut.down) downs++;
      #(3125.0 / 2 - 10);        // taps 0..14 of this period have risen
      for (int k = 0; k < 15; k += 7) begin
        e = 3125.0 * (k + 1) / 32.0;
        d = t_tap[k] - t_ref;
        checks++;
        if (d < e - 10.0 || d > e + 10.0) begin
          failures++; $display("cycle %0d tap %0d: %f ps, expected %f", cyc, k, d, e);
        end
      end
    end
    checks += 2;
    if (ups < 20)   begin failures++; $display("too few up decisions: %0d", ups); end
    if (downs < 20) begin failures++; $display("too few down decisions: %0d", downs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
