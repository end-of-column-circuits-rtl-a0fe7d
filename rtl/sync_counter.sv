// sync_counter: W-bit synchronous binary counter made of 4-bit slices.
//
// The counter is split into W/4 counter_block4 slices. Slice 0 takes the
// count enable; every further slice takes the carry output of the slice
// below, which that slice computes from its outputs and its own carry in.
// All bits change on the same clock edge (no ripple through flip-flops).
// Reset is synchronous. W must be a multiple of 4; 32 bits is the design's
// coarse counter.
//
// Ports: clk, rst (synchronous), en (count enable), q (count, wraps at 2**W).
`timescale 1ps/1fs
module sync_counter #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [W-1:0] q
);
  localparam int NB = W / 4;
  logic [NB-1:0] carry;

  assign carry[0] = en;

  for (genvar b = 0; b < NB; b++) begin : g_blk
    logic cout_b;
    counter_block4 u_blk (
      .clk  (clk),
      .rst  (rst),
      .cin  (carry[b]),
      .q    (q[4*b +: 4]),
      .cout (cout_b)
    );
    if (b < NB - 1) begin : g_chain
      assign carry[b+1] = cout_b;
    end else begin : g_last
      logic unused_cout;       // the top slice's carry is not needed
      assign unused_cout = cout_b;
    end
  end

  initial assert (W % 4 == 0) else $error("sync_counter: W must be a multiple of 4");
endmodule
