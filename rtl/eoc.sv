// eoc: one end-of-column block.
//
// A column's pixels share N_TDC data lines (each line serves 5 pixels, one
// from each group) and N_ADDR group-address lines. The block holds one
// tdc_channel per data line: 9 leading-edge and 9 trailing-edge fine hit
// registers (18), and 18 coarse hit registers of two 32-bit counter copies
// each (36 counter words). All channels see the same DLL taps, coarse counter
// copies and address lines; each has its own serial output, which the design
// sends off chip through one LVDS driver per TDC. The (data line, address)
// pair identifies the pixel. Channels work independently; a channel is
// blocked from its trailing edge until its word has been sent.
//
// Ports: clk, rst, taps, cnt0, cnt1, rx_data (one bit per data line),
// rx_addr, ser_out and busy (one bit per channel).
`timescale 1ps/1fs
module eoc
#(
  parameter int N_TDC       = eoc_pkg::N_TDC,
  parameter int N_ADDR      = eoc_pkg::N_ADDR,
  parameter int N_TAPS      = eoc_pkg::N_TAPS,
  parameter int CNT_W       = eoc_pkg::CNT_W,
  parameter bit USE_ENCODER = 1'b0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [N_TAPS-1:0] taps,
  input  logic [CNT_W-1:0]  cnt0,
  input  logic [CNT_W-1:0]  cnt1,
  input  logic [N_TDC-1:0]  rx_data,
  input  logic [N_ADDR-1:0] rx_addr,
  output logic [N_TDC-1:0]  ser_out,
  output logic [N_TDC-1:0]  busy
);
  for (genvar i = 0; i < N_TDC; i++) begin : g_tdc
    tdc_channel #(
      .N_TAPS      (N_TAPS),
      .CNT_W       (CNT_W),
      .N_ADDR      (N_ADDR),
      .USE_ENCODER (USE_ENCODER)
    ) u_tdc (
      .clk     (clk),
      .rst     (rst),
      .rx      (rx_data[i]),
      .addr    (rx_addr),
      .taps    (taps),
      .cnt0    (cnt0),
      .cnt1    (cnt1),
      .ser_out (ser_out[i]),
      .busy    (busy[i])
    );
  end
endmodule
