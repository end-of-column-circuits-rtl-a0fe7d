// tb_serial_rx: test-side receiver for one channel's serial output.
// Waits for the start bit, then shifts in W bits MSB first, one per clock
// (sampled on the rising edge), and presents the word with a one-cycle valid
// pulse. Also reports the number of the clock cycle at which the start bit
// was seen, for latency checks.
`timescale 1ps/1fs
module tb_serial_rx #(
  parameter int W = 133
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ser,
  output logic         valid,
  output logic [W-1:0] word,
  output longint       start_cycle
);
  logic         active;
  int           left;
  logic [W-1:0] sr;
  longint       cyc;

  always_ff @(posedge clk) begin
    valid <= 1'b0;
    if (rst) begin
      active <= 1'b0; left <= 0; cyc <= 0; sr <= '0; word <= '0; start_cycle <= 0;
    end else begin
      cyc <= cyc + 1;
      if (!active) begin
        if (ser) begin
          active <= 1'b1; left <= W; start_cycle <= cyc;
        end
      end else begin
        sr   <= {sr[W-2:0], ser};
        left <= left - 1;
        if (left == 1) begin
          active <= 1'b0;
          valid  <= 1'b1;
          word   <= {sr[W-2:0], ser};
        end
      end
    end
  end
endmodule
