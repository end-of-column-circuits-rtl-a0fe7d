// counter_block4: 4-bit slice of the synchronous coarse counter.
//
// Each bit toggles (XOR with its own output) when the enable has rippled
// through all lower bits of the slice along an AND chain, so the slice counts
// by one per clock while cin is high. The carry output is formed from the
// slice's own outputs and cin only, which lets a wide counter be built from
// slices whose carries are ready one AND gate after cin: the look-ahead scheme
// used to reach 320 MHz with 32 bits.
//
// Reset works through the load path of each bit, forcing the flip-flop inputs
// to 0000 at the next clock edge: reset is synchronous (latched with clk).
// These follow the 4-bit counter schematic of the design; there is no parallel
// load of other values, since the design uses the load path only for reset.
//
// Ports: clk, rst (synchronous, active high), cin (count enable / carry in),
// q (count), cout (cin & all four bits set, combinational).
`timescale 1ps/1fs
module counter_block4 (
  input  logic       clk,
  input  logic       rst,
  input  logic       cin,
  output logic [3:0] q,
  output logic       cout
);
  logic [3:0] toggle;  // AND chain: bit i toggles when cin and q[i-1:0] are all 1

  assign toggle[0] = cin;
  assign toggle[1] = cin & q[0];
  assign toggle[2] = cin & q[0] & q[1];
  assign toggle[3] = cin & q[0] & q[1] & q[2];

  assign cout = toggle[3] & q[3];

  always_ff @(posedge clk) begin
    if (rst) q <= 4'b0000;      // reset through the D inputs
    else     q <= q ^ toggle;
  end
endmodule
