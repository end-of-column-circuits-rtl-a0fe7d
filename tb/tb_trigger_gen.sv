// tb_trigger_gen: self-checking test of the transition detector model.
// A receiver pulse must give HIT_lead 260 ps after its rising edge and
// HIT_trail 260 ps after its falling edge, each 1 ns wide; after HIT_trail
// the ready flag is set and further pulses give no triggers until clear.
`timescale 1ps/1fs
module tb_trigger_gen;
  logic rx = 1'b0, clear = 1'b0, rst;
  logic hit_lead, hit_trail, ready;
  realtime t_lr, t_lf, t_tr, t_tf;
  int n_lead, n_trail;
  int checks = 0, failures = 0;

  trigger_gen dut (.rx(rx), .clear(clear), .rst(rst), .hit_lead(hit_lead), .hit_trail(hit_trail), .ready(ready));

  always @(posedge hit_lead)  begin t_lr = $realtime; n_lead++;  end
  always @(negedge hit_lead)  t_lf = $realtime;
  always @(posedge hit_trail) begin t_tr = $realtime; n_trail++; end
  always @(negedge hit_trail) t_tf = $realtime;

  task automatic near(input string what, input real got, input real exp);
    checks++;
    if (got < exp - 1.0 || got > exp + 1.0) begin
      failures++; $display("%s: %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    int w;
    n_lead = 0; n_trail = 0;
    rst = 1'b1; #1000; rst = 1'b0; #1000;
    for (int i = 0; i < 20; i++) begin
      w = $urandom_range(1500, 20000);
      #($urandom_range(100, 5000));
      t0 = $realtime; rx = 1'b1;
      #(w);
      t1 = $realtime; rx = 1'b0;
      #3000;
      near("lead rise", t_lr, t0 + 260.0);
      near("lead width", t_lf - t_lr, 1000.0);
      near("trail rise", t_tr, t1 + 260.0);
      near("trail width", t_tf - t_tr, 1000.0);
      checks += 3;
      if (!ready) begin failures++; $display("ready not set"); end
      if (n_lead != i + 1 || n_trail != i + 1) begin failures++; $display("trigger count %0d/%0d", n_lead, n_trail); end
      // a second pulse while blocked must be ignored
      rx = 1'b1; #2000 rx = 1'b0; #3000;
      if (n_lead != i + 1 || n_trail != i + 1) begin failures++; $display("blocked pulse triggered"); end
      #($urandom_range(0, 3000));
      clear = 1'b1; #3000 clear = 1'b0;
      checks++;
      if (ready) begin failures++; $display("ready not cleared"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
