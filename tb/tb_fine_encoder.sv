// tb_fine_encoder: self-checking test of the 32-to-5 fine time encoder.
// For every phase P the tap code of a locked DLL is built independently
// (tap k high when the clock delayed by k+1 cells is high: (P-k-1) mod 32 < 16)
// and the encoder must return P. Runs of other lengths (duty cycle off 50%)
// are also checked: the encoder keys on the 1-to-0 step only.
`timescale 1ps/1fs
module tb_fine_encoder;
  logic [31:0] code;
  logic [4:0]  phase;
  int checks = 0, failures = 0;

  fine_encoder dut (.code(code), .phase(phase));

  function automatic logic [31:0] tap_code(input int p, input int ones);
    logic [31:0] c;
    for (int k = 0; k < 32; k++) c[k] = (((p - k - 1) % 32 + 32) % 32) < ones;
    return c;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ones = 12; ones <= 20; ones++) begin
      for (int p = 0; p < 32; p++) begin
        code = tap_code(p, ones);
        #10;
        checks++;
        if (phase !== 5'(p)) begin
          failures++; $display("ones=%0d p=%0d code=%h phase=%0d", ones, p, code, phase);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
