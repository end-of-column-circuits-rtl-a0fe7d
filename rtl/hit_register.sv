// hit_register: a bank of W D flip-flops clocked by a hit trigger.
//
// The rising edge of trig stores a snapshot of d: the 32 DLL taps in a fine
// hit register, both 32-bit counter copies (2x32) in a coarse hit register,
// or the 5 group-address lines in an address register. The trigger is an
// asynchronous pulse from the transition detector; the stored value is only
// read by the readout after the channel's ready flag has passed through a
// synchroniser, and the channel is blocked until then, so q is stable when
// it is read. rst clears the bank asynchronously (this design's choice).
//
// Ports: trig, rst, d, q.
`timescale 1ps/1fs
module hit_register #(
  parameter int W = 32
) (
  input  logic         trig,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge trig or posedge rst) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
