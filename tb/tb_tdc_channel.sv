// tb_tdc_channel: self-checking test of one TDC channel.
// An ideal time base (exact taps, ideal counters) drives two channels, one
// sending raw tap codes and one sending 5-bit encoded phases. Pulses with
// random leading-edge times, widths and address values are applied. For each
// pulse the expected leading and trailing times are worked out from the
// absolute time of the trigger (receiver edge + 260 ps): coarse = rising
// clock edges seen, phase = cells since the last one, tap code = which
// delayed clocks were high. The serial words of both channels must match;
// the word must arrive within WORD_W+1..WORD_W+5 cycles of the trailing
// trigger; a pulse sent while the channel waits for readout must be ignored.
`timescale 1ps/1fs
module tb_tdc_channel;
  localparam real T   = 3125.0;
  localparam real TAU = T / 32.0;
  localparam int  WR  = 133;   // raw word
  localparam int  WE  = 79;    // encoded word

  logic clk = 1'b0, rst, rx = 1'b0;
  logic [4:0]  addr = '0;
  logic [31:0] taps, cnt0, cnt1;
  logic ser_raw, ser_enc, busy_raw, busy_enc;
  logic v_raw, v_enc;
  logic [WR-1:0] w_raw;
  logic [WE-1:0] w_enc;
  longint s_raw, s_enc;
  realtime t_first, t_vraw;
  int checks = 0, failures = 0;
  int blocked_sent = 0;

  always #(T / 2) clk = ~clk;

  tb_ideal_timebase tbase (.clk(clk), .rst(rst), .taps(taps), .cnt0(cnt0), .cnt1(cnt1));

  tdc_channel dut_raw (.clk(clk), .rst(rst), .rx(rx), .addr(addr), .taps(taps), .cnt0(cnt0), .cnt1(cnt1),
                       .ser_out(ser_raw), .busy(busy_raw));
  tdc_channel #(.USE_ENCODER(1'b1)) dut_enc (.clk(clk), .rst(rst), .rx(rx), .addr(addr), .taps(taps),
                       .cnt0(cnt0), .cnt1(cnt1), .ser_out(ser_enc), .busy(busy_enc));

  tb_serial_rx #(.W(WR)) rx_raw (.clk(clk), .rst(rst), .ser(ser_raw), .valid(v_raw), .word(w_raw), .start_cycle(s_raw));
  tb_serial_rx #(.W(WE)) rx_enc (.clk(clk), .rst(rst), .ser(ser_enc), .valid(v_enc), .word(w_enc), .start_cycle(s_enc));

  always @(posedge v_raw) t_vraw = $realtime;

  function automatic logic [31:0] code_of(input longint n);
    logic [31:0] c;
    int p;
    p = int'(n % 32);
    for (int k = 0; k < 32; k++) c[k] = (((p - k - 1) % 32 + 32) % 32) < 16;
    return c;
  endfunction

  task automatic wait_until(input real t);
    if (t > $realtime) #(t - $realtime);
  endtask

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    #(T * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint nl, nt;
    real tl, tt;
    logic [4:0] a;
    rst = 1'b1;
    repeat (4) @(posedge clk);
    #100 rst = 1'b0;
    @(posedge clk);
    t_first = $realtime;
    for (int i = 0; i < 60; i++) begin
      // leading trigger nl cells (plus a fraction) after the first counted edge
      nl = longint'(($realtime - t_first) / TAU) + 40 + $urandom_range(0, 200);
      nt = nl + $urandom_range(12, 400);
      tl = t_first + (real'(nl) + 0.1 + 0.8 * real'($urandom_range(0, 1000)) / 1000.0) * TAU;
      tt = t_first + (real'(nt) + 0.1 + 0.8 * real'($urandom_range(0, 1000)) / 1000.0) * TAU;
      a  = 5'($urandom);
      wait_until(tl - 260.0);
      rx = 1'b1; addr = a;
      wait_until(tt - 260.0);
      rx = 1'b0;
      #1000 addr = '0;
      // a pulse while the channel is blocked
      if (i % 3 == 1) begin
        #2000 rx = 1'b1; addr = ~a;
        #3000 rx = 1'b0; addr = '0;
        blocked_sent++;
      end
      fork
        @(posedge v_raw);
        @(posedge v_enc);
      join
      #10;
      // raw word: {addr, coarse_trail, coarse_lead, fine_trail, fine_lead}
      chk("raw addr",         w_raw[132:128], a);
      chk("raw coarse trail", w_raw[127:96],  nt / 32 + 1);
      chk("raw coarse lead",  w_raw[95:64],   nl / 32 + 1);
      chk("raw fine trail",   w_raw[63:32],   code_of(nt));
      chk("raw fine lead",    w_raw[31:0],    code_of(nl));
      // encoded word: {addr, coarse_trail, coarse_lead, phase_trail, phase_lead}
      chk("enc addr",         w_enc[78:74],   a);
      chk("enc coarse trail", w_enc[73:42],   nt / 32 + 1);
      chk("enc coarse lead",  w_enc[41:10],   nl / 32 + 1);
      chk("enc phase trail",  w_enc[9:5],     nt % 32);
      chk("enc phase lead",   w_enc[4:0],     nl % 32);
      // time from the trailing trigger to the end of the raw word
      checks++;
      if (t_vraw - tt < (WR + 1) * T || t_vraw - tt > (WR + 5) * T) begin
        failures++; $display("readout took %f cycles", (t_vraw - tt) / T);
      end
      repeat (8) @(posedge clk);
    end
    checks++;
    if (blocked_sent == 0) begin failures++; $display("blocking never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
