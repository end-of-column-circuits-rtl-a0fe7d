// fine_encoder: 32-to-5 bit encoder of the sampled DLL taps.
//
// Tap k of the delay line is the reference clock delayed by k+1 cells. With
// the line locked to one clock period and a 50% duty cycle, the taps sampled
// by a hit hold a rotated run of N/2 ones. If the hit came P cells after a
// rising reference edge, taps P-16 .. P-1 (mod 32) are 1, so the 1-to-0 step
// sits between taps P-1 and P. The encoder finds the lowest k with
// code[k]=1 and code[k+1 mod N]=0 and returns P = k+1 mod N; a code with no
// such step (cannot occur with a running clock) encodes as 0.
// The encoder itself is named by the design (32-to-5 encoders next to the hit
// registers, to avoid 32 parallel lines per register); this decoding rule is
// this implementation's own. Purely combinational.
//
// Ports: code (N_TAPS sampled taps), phase (0 .. N_TAPS-1).
`timescale 1ps/1fs
module fine_encoder #(
  parameter int N_TAPS = 32
) (
  input  logic [N_TAPS-1:0]         code,
  output logic [$clog2(N_TAPS)-1:0] phase
);
  localparam int PW = $clog2(N_TAPS);

  always_comb begin
    phase = '0;
    for (int k = N_TAPS - 1; k >= 0; k--) begin
      if (code[k] && !code[(k + 1) % N_TAPS]) phase = PW'((k + 1) % N_TAPS);
    end
  end
endmodule
