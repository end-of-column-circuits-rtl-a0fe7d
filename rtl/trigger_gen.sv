// trigger_gen: behavioural model of the transition detector (trigger
// generation) that follows each receiver.
//
// Behavioural model, not synthesizable: the circuit is a timing circuit made
// of two self-resetting D flip-flops whose reset comes back through a delay
// line of current-starved inverters. Its delays are modelled with # delays.
//
// The rising edge of the receiver output sets the "lead" flip-flop, the
// falling edge sets the "trail" flip-flop. Each flip-flop resets itself
// PULSE_PS after it was set, so each edge gives one pulse of fixed width:
// HIT_lead triggers the leading-edge hit registers, HIT_trail the
// trailing-edge ones. Both pulses appear TRIG_DELAY_PS after the receiver edge
// (the flip-flop and the buffer stage, 260 ps in the design). HIT_trail also
// disables the input (the first buffer inverter in the circuit) so that
// following hits cannot overwrite the registers, and raises the "ready to
// read the shift registers" flag. Both stay set until the readout pulses
// clear (or rst). The two-edge pulse generator, the 260 ps delay, the
// blocking and the flag follow the design; the 1 ns pulse width and the
// clear input are this model's assumptions.
//
// Ports: rx (receiver CMOS output), clear, rst (both asynchronous, active
// high), hit_lead, hit_trail, ready.
`timescale 1ps/1fs
module trigger_gen #(
  parameter real PULSE_PS      = 1000.0,
  parameter real TRIG_DELAY_PS = 260.0
) (
  input  logic rx,
  input  logic clear,
  input  logic rst,
  output logic hit_lead,
  output logic hit_trail,
  output logic ready
);
  logic blocked;
  logic rdy;
  logic lead_q;
  logic trail_q;
  logic lead_fb;   // lead_q after the reset delay line
  logic trail_fb;
  logic lead_out;   // after the output buffer
  logic trail_out;
  logic rx_g;

  initial begin
    {blocked, rdy, lead_q, trail_q} = '0;
    {lead_fb, trail_fb, lead_out, trail_out} = '0;
  end

  // First buffer inverter, disabled while the channel waits for readout.
  assign rx_g = rx & ~blocked;

  // Self-resetting flip-flops: D tied high, clocked by the two edges.
  always @(posedge rx_g or posedge lead_fb or posedge rst) begin
    if (rst || lead_fb) lead_q <= 1'b0;
    else                lead_q <= 1'b1;
  end

  always @(negedge rx_g or posedge trail_fb or posedge rst) begin
    if (rst || trail_fb) trail_q <= 1'b0;
    else                 trail_q <= 1'b1;
  end

  // Reset delay lines (pulse width) and output buffers (trigger delay),
  // as transport delays: every edge is scheduled in its own thread.
  task automatic delay_lead_fb(input logic v);
    fork begin #(PULSE_PS); lead_fb = v; end join_none
  endtask
  task automatic delay_trail_fb(input logic v);
    fork begin #(PULSE_PS); trail_fb = v; end join_none
  endtask
  task automatic delay_lead_out(input logic v);
    fork begin #(TRIG_DELAY_PS); lead_out = v; end join_none
  endtask
  task automatic delay_trail_out(input logic v);
    fork begin #(TRIG_DELAY_PS); trail_out = v; end join_none
  endtask

  always @(lead_q) begin
    delay_lead_fb(lead_q);
    delay_lead_out(lead_q);
  end
  always @(trail_q) begin
    delay_trail_fb(trail_q);
    delay_trail_out(trail_q);
  end

  // Block further hits and flag the data as ready to read.
  always @(posedge trail_out or posedge clear or posedge rst) begin
    if (rst || clear) begin
      blocked <= 1'b0;
      rdy     <= 1'b0;
    end else begin
      blocked <= 1'b1;
      rdy     <= 1'b1;
    end
  end

  assign hit_lead  = lead_out;
  assign hit_trail = trail_out;
  assign ready     = rdy;
endmodule
