// tdc_channel: one time-to-digital converter of the end-of-column block.
//
// A data line of the pixel matrix carries a pulse whose leading edge is the
// hit time and whose width is the signal's time over threshold. The
// transition detector (trigger_gen) turns the two edges into HIT_lead and
// HIT_trail. HIT_lead stores the 32 DLL taps (fine time), both coarse
// counter copies and the 5 group-address lines; HIT_trail stores the taps and
// counters again. The fine codes are encoded to a 5-bit phase
// (fine_encoder), which selects the stable coarse copy for each edge
// (coarse_select). HIT_trail then blocks the input and raises the ready flag;
// tdc_readout shifts the word out serially and clears the flag.
//
// Each edge's time in units of one DLL cell is coarse*32 + phase, where
// coarse counts rising reference edges since reset.
// Serial word, MSB first after a start bit:
//   USE_ENCODER = 0: {addr[4:0], coarse_trail[31:0], coarse_lead[31:0],
//                     fine_trail[31:0], fine_lead[31:0]}    133 bits
//   USE_ENCODER = 1: {addr, coarse_trail, coarse_lead,
//                     phase_trail[4:0], phase_lead[4:0]}    79 bits
// The register structure follows the design (two fine and two coarse hit
// registers per channel, read serially); the address capture on HIT_lead,
// the word layout and on-chip coarse selection are this implementation's.
// Dead time per hit: pulse width + 260 ps + about WORD_W+7 clock cycles.
//
// Ports: clk, rst, rx (receiver output), addr, taps, cnt0, cnt1, ser_out,
// busy.
`timescale 1ps/1fs
module tdc_channel
#(
  parameter int N_TAPS      = 32,
  parameter int CNT_W       = 32,
  parameter int N_ADDR      = 5,
  parameter bit USE_ENCODER = 1'b0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              rx,
  input  logic [N_ADDR-1:0] addr,
  input  logic [N_TAPS-1:0] taps,
  input  logic [CNT_W-1:0]  cnt0,
  input  logic [CNT_W-1:0]  cnt1,
  output logic              ser_out,
  output logic              busy
);
  localparam int PW     = $clog2(N_TAPS);
  localparam int WORD_W = eoc_pkg::word_width(USE_ENCODER, N_TAPS, CNT_W, N_ADDR);

  logic hit_lead, hit_trail, ready, clear;
  logic [N_TAPS-1:0]  fine_lead, fine_trail;
  logic [2*CNT_W-1:0] cpair_lead, cpair_trail;
  logic [N_ADDR-1:0]  addr_q;
  logic [PW-1:0]      phase_lead, phase_trail;
  logic [CNT_W-1:0]   coarse_lead, coarse_trail;
  logic [WORD_W-1:0]  word;

  trigger_gen u_trig (
    .rx        (rx),
    .clear     (clear),
    .rst       (rst),
    .hit_lead  (hit_lead),
    .hit_trail (hit_trail),
    .ready     (ready)
  );

  // Fine hit registers: DLL taps.
  hit_register #(.W(N_TAPS)) u_fine_lead  (.trig(hit_lead),  .rst(rst), .d(taps), .q(fine_lead));
  hit_register #(.W(N_TAPS)) u_fine_trail (.trig(hit_trail), .rst(rst), .d(taps), .q(fine_trail));

  // Coarse hit registers: both counter copies (2 x CNT_W).
  hit_register #(.W(2*CNT_W)) u_coarse_lead  (.trig(hit_lead),  .rst(rst), .d({cnt1, cnt0}), .q(cpair_lead));
  hit_register #(.W(2*CNT_W)) u_coarse_trail (.trig(hit_trail), .rst(rst), .d({cnt1, cnt0}), .q(cpair_trail));

  // Address hit register: group that fired.
  hit_register #(.W(N_ADDR)) u_addr (.trig(hit_lead), .rst(rst), .d(addr), .q(addr_q));

  fine_encoder #(.N_TAPS(N_TAPS)) u_enc_lead  (.code(fine_lead),  .phase(phase_lead));
  fine_encoder #(.N_TAPS(N_TAPS)) u_enc_trail (.code(fine_trail), .phase(phase_trail));

  coarse_select #(.N_TAPS(N_TAPS), .CNT_W(CNT_W)) u_sel_lead (
    .phase (phase_lead), .c0(cpair_lead[CNT_W-1:0]), .c1(cpair_lead[2*CNT_W-1:CNT_W]),
    .coarse(coarse_lead));
  coarse_select #(.N_TAPS(N_TAPS), .CNT_W(CNT_W)) u_sel_trail (
    .phase (phase_trail), .c0(cpair_trail[CNT_W-1:0]), .c1(cpair_trail[2*CNT_W-1:CNT_W]),
    .coarse(coarse_trail));

  if (USE_ENCODER) begin : g_enc
    assign word = {addr_q, coarse_trail, coarse_lead, phase_trail, phase_lead};
  end else begin : g_raw
    assign word = {addr_q, coarse_trail, coarse_lead, fine_trail, fine_lead};
  end

  tdc_readout #(.WORD_W(WORD_W)) u_ro (
    .clk     (clk),
    .rst     (rst),
    .ready   (ready),
    .word    (word),
    .ser_out (ser_out),
    .clear   (clear),
    .busy    (busy)
  );
endmodule
