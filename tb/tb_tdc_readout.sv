// tb_tdc_readout: self-checking test of the serial readout controller.
// A model of the channel's flag (set by the test, cleared by the controller's
// clear) presents random words. Each must come out as a start bit followed by
// the 133 word bits MSB first on consecutive clocks, clear must follow the
// last bit, and nothing may be sent while the flag is low.
`timescale 1ps/1fs
module tb_tdc_readout;
  localparam int W = 133;
  logic clk = 1'b0, rst, ready = 1'b0;
  logic [W-1:0] word, got;
  logic ser_out, clear, busy;
  int checks = 0, failures = 0;

  tdc_readout dut (.clk(clk), .rst(rst), .ready(ready), .word(word), .ser_out(ser_out), .clear(clear), .busy(busy));

  always #1562.5 clk = ~clk;
  always @(posedge clear) ready = 1'b0;   // the flag is cleared asynchronously

  initial begin
    #(3125.0 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, idle_ones;
    rst = 1'b1; word = '0;
    repeat (3) @(posedge clk);
    #100 rst = 1'b0;
    for (int i = 0; i < 30; i++) begin
      // idle: no output
      idle_ones = 0;
      repeat ($urandom_range(3, 20)) begin @(posedge clk); #10 if (ser_out) idle_ones++; end
      checks++;
      if (idle_ones != 0) begin failures++; $display("output while idle"); end
      for (int b = 0; b < W; b += 32) word[b +: 32] = $urandom;
      #($urandom_range(1, 3000)) ready = 1'b1;
      lat = 0;
      do begin @(posedge clk); #10; lat++; end while (!ser_out && lat < 10);
      checks++;
      if (lat < 2 || lat > 4) begin failures++; $display("start bit after %0d cycles", lat); end
      for (int b = W - 1; b >= 0; b--) begin
        @(posedge clk); #10;
        got[b] = ser_out;
      end
      checks++;
      if (got !== word) begin failures++; $display("word %0d: got %h expected %h", i, got, word); end
      @(posedge clk); #10;
      checks++;
      if (!clear || ser_out) begin failures++; $display("no clear after the last bit"); end
      repeat (5) @(posedge clk);
      #10;
      checks++;
      if (busy || clear) begin failures++; $display("controller not idle again"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
