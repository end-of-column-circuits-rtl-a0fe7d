// tb_hit_register: self-checking test of the hit register bank.
// Random data changes continuously; short trigger pulses at random times must
// store the value present at the trigger's rising edge and hold it until the
// next trigger, whatever the data does meanwhile. Reset clears it.
`timescale 1ps/1fs
module tb_hit_register;
  logic trig = 1'b0, rst;
  logic [31:0] d, q, expect_q;
  int checks = 0, failures = 0;

  hit_register dut (.trig(trig), .rst(rst), .d(d), .q(q));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; d = $urandom; #500;
    checks++;
    if (q !== '0) begin failures++; $display("not cleared by reset"); end
    rst = 1'b0; expect_q = '0;
    for (int i = 0; i < 300; i++) begin
      repeat ($urandom_range(1, 5)) begin
        #($urandom_range(50, 400)) d = $urandom;
        checks++;
        if (q !== expect_q) begin failures++; $display("%0d: q=%h expected %h (hold)", i, q, expect_q); end
      end
      #($urandom_range(1, 90));
      trig = 1'b1; expect_q = d;
      #1000 trig = 1'b0;
      checks++;
      if (q !== expect_q) begin failures++; $display("%0d: q=%h expected %h", i, q, expect_q); end
    end
    rst = 1'b1; #100;
    checks++;
    if (q !== '0) begin failures++; $display("not cleared by reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
