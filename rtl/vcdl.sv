// vcdl: behavioural model of the voltage-controlled delay line with its
// charge pump, loop-filter capacitor and start-up circuit.
//
// Behavioural model, not synthesizable: the real part is analog. N_CELLS
// identical delay cells are chained; cell k's output is tap k, so tap k is
// the reference clock delayed by (k+1) cell delays. All cells share one
// control voltage; here the total line delay stands for it. At every rising
// reference edge the charge pump acts on the phase detector's decision: up
// lengthens the line by STEP_PS, down shortens it by STEP_PS. STEP_PS = 10 ps
// is the delay jitter the design reports at the last cell for its chosen
// capacitor (20 pF) and pump current (1.72 uA), used here as the size of one
// correction because the delay-versus-voltage gain is not given. The
// start-up circuit is modelled by rst, which puts the line at INIT_DELAY_PS,
// above half a period so that the loop locks to the right edge. The delay is
// kept between MIN_DELAY_PS and MAX_DELAY_PS. Locked, each cell delays
// 3125/32 = 97.66 ps.
//
// Ports: ref_clk, rst, up, down, taps (cell outputs t0..t(N-1)).
`timescale 1ps/1fs
module vcdl #(
  parameter int  N_CELLS       = 32,
  parameter real STEP_PS       = 10.0,
  parameter real INIT_DELAY_PS = 2000.0,
  parameter real MIN_DELAY_PS  = 1700.0,
  parameter real MAX_DELAY_PS  = 4500.0
) (
  input  logic               ref_clk,
  input  logic               rst,
  input  logic               up,
  input  logic               down,
  output logic [N_CELLS-1:0] taps
);
  real line_delay_ps;
  real cell_delay_ps;
  logic [N_CELLS-1:0] cell_out;
  logic [N_CELLS-1:0] cell_in;

  initial begin
    line_delay_ps = INIT_DELAY_PS;
  end

  // Charge pump and capacitor: one step per reference cycle.
  always @(posedge ref_clk or posedge rst) begin
    if (rst)
      line_delay_ps <= INIT_DELAY_PS;
    else if (up && !down && line_delay_ps + STEP_PS <= MAX_DELAY_PS)
      line_delay_ps <= line_delay_ps + STEP_PS;
    else if (down && !up && line_delay_ps - STEP_PS >= MIN_DELAY_PS)
      line_delay_ps <= line_delay_ps - STEP_PS;
  end

  always_comb cell_delay_ps = line_delay_ps / N_CELLS;

  assign cell_in = {cell_out[N_CELLS-2:0], ref_clk};

  // Delay cells: every input edge reappears cell_delay_ps later (transport
  // delay, each edge scheduled in its own thread).
  for (genvar k = 0; k < N_CELLS; k++) begin : g_cell
    logic o;
    initial o = 1'b0;

    task automatic launch(input logic v, input real dly);
      fork
        begin
          #(dly);
          o = v;
        end
      join_none
    endtask

    always @(cell_in[k]) launch(cell_in[k], cell_delay_ps);
    assign cell_out[k] = o;
  end

  assign taps = cell_out;
endmodule
