// tb_coarse_select: self-checking test of the coarse counter selection.
// For random counts N and every phase P the stored copies are built as the
// dual counter leaves them (c1 = N for P < 16, N+1 otherwise); the copy that
// was within 4 cells of its own transition (c0 near P = 0, c1 near P = 16) is
// replaced by a random value, as a flip-flop caught mid-change would hold.
// The selected word must still be N.
`timescale 1ps/1fs
module tb_coarse_select;
  logic [4:0]  phase;
  logic [31:0] c0, c1, coarse;
  int checks = 0, failures = 0;

  coarse_select dut (.phase(phase), .c0(c0), .c1(c1), .coarse(coarse));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      logic [31:0] n;
      n = (it == 0) ? 32'hFFFF_FFFF : $urandom;
      for (int p = 0; p < 32; p++) begin
        phase = 5'(p);
        c0 = n;
        c1 = (p < 16) ? n : n + 1;
        if (p >= 28 || p < 4)  c0 = $urandom;   // c0 was changing
        if (p >= 12 && p < 20) c1 = $urandom;   // c1 was changing
        #10;
        checks++;
        if (coarse !== n) begin
          failures++; $display("p=%0d n=%h c0=%h c1=%h coarse=%h", p, n, c0, c1, coarse);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
