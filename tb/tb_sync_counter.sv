// tb_sync_counter: self-checking test of the 32-bit synchronous counter.
// The 32-bit default counts 3000 cycles with random enable and reset and is
// compared each cycle with a reference; an 8-bit instance is run past its
// wrap-around so every slice carry is exercised.
`timescale 1ps/1fs
module tb_sync_counter;
  logic clk = 1'b0, rst, en;
  logic [31:0] q32;
  logic [7:0]  q8;
  longint m32;
  int m8;
  int checks = 0, failures = 0;

  sync_counter dut32 (.clk(clk), .rst(rst), .en(en), .q(q32));
  sync_counter #(.W(8)) dut8 (.clk(clk), .rst(rst), .en(en), .q(q8));

  always #1562.5 clk = ~clk;

  initial begin
    #(3125.0 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b1; m32 = 0; m8 = 0;
    @(posedge clk); #100;
    for (int i = 0; i < 3000; i++) begin
      rst = (i > 1000) && ($urandom_range(0, 499) == 0);
      en  = (i < 1000) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (rst) begin m32 = 0; m8 = 0; end
      else if (en) begin m32 = (m32 + 1) % (64'd1 << 32); m8 = (m8 + 1) % 256; end
      #100;
      checks += 2;
      if (q32 !== 32'(m32)) begin failures++; $display("cycle %0d: q32=%0d expected %0d", i, q32, m32); end
      if (q8  !== 8'(m8))   begin failures++; $display("cycle %0d: q8=%0d expected %0d", i, q8, m8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
