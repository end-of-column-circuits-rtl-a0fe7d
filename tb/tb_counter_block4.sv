// tb_counter_block4: self-checking test of the 4-bit counter slice.
// Drives random enable and reset for 400 cycles and compares the count and
// the look-ahead carry with a reference model kept as an integer.
`timescale 1ps/1fs
module tb_counter_block4;
  logic clk = 1'b0, rst, cin;
  logic [3:0] q;
  logic cout;
  int checks = 0, failures = 0;
  int model;

  counter_block4 dut (.clk(clk), .rst(rst), .cin(cin), .q(q), .cout(cout));

  always #1562.5 clk = ~clk;

  initial begin
    #(3125.0 * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; cin = 1'b0; model = 0;
    @(posedge clk); #100;
    for (int i = 0; i < 400; i++) begin
      rst = ($urandom_range(0, 39) == 0);
      cin = (i < 40) ? 1'b1 : 1'($urandom_range(0, 1));
      #10;
      checks++;
      if (cout !== (cin && model == 15)) begin
        failures++; $display("cycle %0d: cout=%0d cin=%0d q=%0d", i, cout, cin, q);
      end
      @(posedge clk);
      if (rst) model = 0; else if (cin) model = (model + 1) % 16;
      #100;
      checks++;
      if (q !== 4'(model)) begin failures++; $display("cycle %0d: q=%0d expected %0d", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
