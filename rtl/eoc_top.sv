// eoc_top: periphery of the pixel TDC chip.
//
// Every pixel of the matrix only amplifies and discriminates; its output
// pulse travels as a current on a shared transmission line to the end of its
// column, where all timing is done. One DLL (32 cells locked to the 320 MHz
// reference, ~97.66 ps per cell) provides the fine time and one pair of
// 32-bit coarse counters (rising and falling edge) the coarse time, both
// shared by all N_COLS end-of-column blocks. Each column has 9 TDC channels
// with 5 address lines; each channel records the leading and trailing edge of
// its pulse and sends coarse, fine and address data off chip serially.
//
// Defaults describe the full 40-column architecture (45 pixels per column,
// 9 data lines x 5 groups) with the 32-to-5 encoders in use. The single-column
// demonstrator is N_COLS = 1, USE_ENCODER = 0. The DLL and the transition
// detectors are behavioural models of analog timing circuits, so this top is
// for simulation; the receivers and LVDS drivers are outside it (rx_* are
// their CMOS outputs, ser_out goes to the drivers).
//
// Ports: clk (reference), rst (synchronous start-up/reset), rx_data[col][line],
// rx_addr[col][group], ser_out[col][line], busy[col][line], dll_taps.
`timescale 1ps/1fs
module eoc_top
#(
  parameter int N_COLS      = eoc_pkg::N_COLS,
  parameter int N_TDC       = eoc_pkg::N_TDC,
  parameter int N_ADDR      = eoc_pkg::N_ADDR,
  parameter bit USE_ENCODER = 1'b1,
  parameter int N_TAPS      = eoc_pkg::N_TAPS,
  parameter int CNT_W       = eoc_pkg::CNT_W
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [N_COLS-1:0][N_TDC-1:0]  rx_data,
  input  logic [N_COLS-1:0][N_ADDR-1:0] rx_addr,
  output logic [N_COLS-1:0][N_TDC-1:0]  ser_out,
  output logic [N_COLS-1:0][N_TDC-1:0]  busy,
  output logic [N_TAPS-1:0]             dll_taps
);
  logic [CNT_W-1:0] cnt0, cnt1;

  dll #(.N_CELLS(N_TAPS)) u_dll (
    .ref_clk (clk),
    .rst     (rst),
    .taps    (dll_taps)
  );

  coarse_counter #(.W(CNT_W)) u_ccnt (
    .clk  (clk),
    .rst  (rst),
    .cnt0 (cnt0),
    .cnt1 (cnt1)
  );

  for (genvar c = 0; c < N_COLS; c++) begin : g_col
    eoc #(
      .N_TDC       (N_TDC),
      .N_ADDR      (N_ADDR),
      .N_TAPS      (N_TAPS),
      .CNT_W       (CNT_W),
      .USE_ENCODER (USE_ENCODER)
    ) u_eoc (
      .clk     (clk),
      .rst     (rst),
      .taps    (dll_taps),
      .cnt0    (cnt0),
      .cnt1    (cnt1),
      .rx_data (rx_data[c]),
      .rx_addr (rx_addr[c]),
      .ser_out (ser_out[c]),
      .busy    (busy[c])
    );
  end
endmodule
