// tdc_readout: serial readout of one TDC channel.
//
// The channel's ready flag is raised asynchronously by the trailing-edge
// trigger. It passes a two-flip-flop synchroniser into the clock domain; then
// the controller loads {1'b1, word} into a shift register and sends it MSB
// first, one bit per clock: a start bit followed by WORD_W data bits, so a
// readout occupies WORD_W+1 cycles on ser_out, which is low otherwise. After
// the last bit it raises clear, which resets the ready flag and unblocks the
// channel's input, and holds it until the synchronised flag has dropped.
// Serial readout of the hit registers is the design's; the clock (the 320 MHz
// reference), the start-bit framing and the clear handshake are this
// implementation's choices.
//
// Timing from the ready flag rising: 2-3 cycles synchroniser, then WORD_W+1
// serial bits, then clear for 2-3 cycles until the flag is seen low.
// Ports: clk, rst (synchronous), ready (async), word (stable while ready),
// ser_out, clear, busy.
`timescale 1ps/1fs
module tdc_readout
#(
  parameter int WORD_W = 133
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ready,
  input  logic [WORD_W-1:0] word,
  output logic              ser_out,
  output logic              clear,
  output logic              busy
);
  localparam int CW = $clog2(WORD_W + 1);

  eoc_pkg::ro_state_t state;
  logic [1:0]      rdy_sync;
  logic [WORD_W:0] sr;
  logic [CW-1:0]   cnt;

  always_ff @(posedge clk) begin
    if (rst) rdy_sync <= 2'b00;
    else     rdy_sync <= {rdy_sync[0], ready};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= eoc_pkg::RO_IDLE;
      sr    <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        eoc_pkg::RO_IDLE: if (rdy_sync[1]) begin
          sr    <= {1'b1, word};
          cnt   <= CW'(WORD_W);
          state <= eoc_pkg::RO_SHIFT;
        end
        eoc_pkg::RO_SHIFT: begin
          sr <= sr << 1;
          if (cnt == '0) state <= eoc_pkg::RO_CLEAR;
          else           cnt   <= cnt - CW'(1);
        end
        eoc_pkg::RO_CLEAR: if (!rdy_sync[1]) state <= eoc_pkg::RO_IDLE;
        default: state <= eoc_pkg::RO_IDLE;
      endcase
    end
  end

  assign ser_out = (state == eoc_pkg::RO_SHIFT) && sr[WORD_W];
  assign clear   = (state == eoc_pkg::RO_CLEAR);
  assign busy    = (state != eoc_pkg::RO_IDLE);
endmodule
