// coarse_select: picks the stable one of the two stored coarse counts.
//
// At a hit both counter copies are stored: c0 (rising-edge counter) and c1
// (falling-edge counter, equal to c0 in the first half of the clock period
// and one ahead in the second half). The fine phase P (0..31 cells after
// the rising edge) says which copy may have been changing: c0 changes at
// P = 0, c1 at P = 16. Each copy is therefore only read at least a quarter
// period from its own transition:
//   P in  8..23  -> c0
//   P in 24..31  -> c1 - 1   (c1 already advanced at mid-period)
//   P in  0.. 7  -> c1
// The result is the number of rising reference edges seen, the same coarse
// word for the whole clock period. Selecting by fine time is the design's;
// the quarter-period windows are this implementation's choice. Combinational.
//
// Ports: phase, c0, c1, coarse.
`timescale 1ps/1fs
module coarse_select #(
  parameter int N_TAPS = 32,
  parameter int CNT_W  = 32
) (
  input  logic [$clog2(N_TAPS)-1:0] phase,
  input  logic [CNT_W-1:0]          c0,
  input  logic [CNT_W-1:0]          c1,
  output logic [CNT_W-1:0]          coarse
);
  localparam int Q1 = N_TAPS / 4;       // 8
  localparam int Q3 = 3 * N_TAPS / 4;   // 24

  always_comb begin
    if (int'(phase) >= Q1 && int'(phase) < Q3) coarse = c0;
    else if (int'(phase) >= Q3)                coarse = c1 - CNT_W'(1);
    else                                       coarse = c1;
  end
endmodule
