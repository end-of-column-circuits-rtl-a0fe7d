// eoc_pkg: sizes and helper functions shared by the end-of-column TDC.
//
// The numbers are those of the end-of-column design: a 32-cell DLL locked to
// the 320 MHz reference (3.125 ns, so about 97.66 ps per cell), two 32-bit
// coarse counters, 9 TDC channels per column and 5 group-address lines.
// The serial word layout and the fine-phase encoding rule are this design's
// own choices and are documented where they are used.
`timescale 1ps/1fs
package eoc_pkg;
  localparam int N_TAPS  = 32;   // DLL cells = fine hit register width
  localparam int CNT_W   = 32;   // coarse counter width
  localparam int N_TDC   = 9;    // data lines (TDC channels) per column
  localparam int N_ADDR  = 5;    // group-address lines per column
  localparam int N_COLS  = 40;   // columns served by one DLL and counter

  // Width of the serial word of one channel (the start bit not included).
  // Raw:     {addr, coarse_trail, coarse_lead, fine_trail, fine_lead}
  // Encoded: {addr, coarse_trail, coarse_lead, phase_trail, phase_lead}
  function automatic int word_width(input bit use_encoder, input int n_taps,
                                    input int cnt_w, input int n_addr);
    int fine_w;
    fine_w = use_encoder ? $clog2(n_taps) : n_taps;
    return n_addr + 2 * cnt_w + 2 * fine_w;
  endfunction

  // Readout controller states.
  typedef enum logic [1:0] {
    RO_IDLE  = 2'd0,   // waiting for the ready flag
    RO_SHIFT = 2'd1,   // start bit and word going out, one bit per clock
    RO_CLEAR = 2'd2    // read done: clear the flag and unblock the channel
  } ro_state_t;
endpackage
