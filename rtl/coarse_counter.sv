// coarse_counter: two W-bit synchronous counters, 180 degrees apart.
//
// cnt0 advances on the rising edge of the reference clock and cnt1 on the
// falling edge (the clock through an inverter), so at any instant at least
// one of the two copies is half a clock period away from changing. A hit
// stores both copies and the fine time then selects the stable one
// (coarse_select). Both counters share the synchronous reset; the falling-edge
// counter samples it half a cycle later, so after reset cnt1 equals cnt0
// while the clock is high and cnt0+1 while it is low.
//
// Ports: clk (320 MHz reference), rst (synchronous, driven from the rising
// edge domain), cnt0, cnt1.
`timescale 1ps/1fs
module coarse_counter #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] cnt0,
  output logic [W-1:0] cnt1
);
  logic clk_n;
  assign clk_n = ~clk;

  sync_counter #(.W(W)) u_cnt0 (.clk(clk),   .rst(rst), .en(1'b1), .q(cnt0));
  sync_counter #(.W(W)) u_cnt1 (.clk(clk_n), .rst(rst), .en(1'b1), .q(cnt1));
endmodule
