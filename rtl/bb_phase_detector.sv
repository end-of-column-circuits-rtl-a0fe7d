// bb_phase_detector: bang-bang phase detector of the DLL.
//
// A flip-flop samples the delay line output at each rising edge of the
// reference clock. If the delayed clock is already high there, the line is
// shorter than one period and "up" (more delay) is asked for the next cycle;
// if it is still low, the line is too long and "down" is asked. Exactly one
// of the two is active every cycle after reset, which is what makes the loop
// bang-bang: it settles into a small dither around lock. The design only
// names a bang-bang detector (taken over from an earlier DLL); this
// single-flip-flop form and the meaning of up as "more delay" are this
// implementation's choices. Valid only if the delay is kept between half and
// one and a half periods, which the start-up of the line guarantees.
//
// Ports: ref_clk, rst (synchronous), fb (last tap), up, down (registered).
`timescale 1ps/1fs
module bb_phase_detector (
  input  logic ref_clk,
  input  logic rst,
  input  logic fb,
  output logic up,
  output logic down
);
  always_ff @(posedge ref_clk) begin
    if (rst) begin
      up   <= 1'b0;
      down <= 1'b0;
    end else begin
      up   <= fb;
      down <= ~fb;
    end
  end
endmodule
