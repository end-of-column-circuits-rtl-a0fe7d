// tb_ideal_timebase: test-side reference for the DLL taps and coarse counters.
// Tap k is the clock delayed by exactly (k+1) x period/32; cnt0 counts rising
// clock edges after reset and cnt1 is set to cnt0+1 at each falling edge,
// which is the behaviour the design's dual counter is meant to have. Used to
// test the hit registers and readout independently of the DLL and counter
// RTL. The reset must be released just after a rising edge.
`timescale 1ps/1fs
module tb_ideal_timebase #(
  parameter real PERIOD_PS = 3125.0
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] taps,
  output logic [31:0] cnt0,
  output logic [31:0] cnt1
);
  initial taps = '0;

  for (genvar k = 0; k < 32; k++) begin : g_tap
    task automatic launch(input logic v);
      fork begin #(PERIOD_PS * (k + 1) / 32.0); taps[k] = v; end join_none
    endtask
    always @(clk) launch(clk);
  end

  always @(posedge clk) cnt0 = rst ? 32'd0 : cnt0 + 32'd1;
  always @(negedge clk) cnt1 = rst ? 32'd0 : cnt0 + 32'd1;
endmodule
