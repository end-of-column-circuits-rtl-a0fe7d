// tb_eoc: self-checking test of one end-of-column block (9 TDC channels,
// raw words). In each round a random subset of data lines fires, one pixel
// after another (staggered so that the shared group-address lines belong to
// one pulse at a time), each pulse with a random group on the address lines.
// Every firing channel must send exactly one word with its own pixel's group,
// leading and trailing times; channels that did not fire must stay silent.
// The channels' readouts run concurrently.
`timescale 1ps/1fs
module tb_eoc;
  localparam real T   = 3125.0;
  localparam real TAU = T / 32.0;
  localparam int  N   = 9;
  localparam int  W   = 133;

  logic clk = 1'b0, rst;
  logic [N-1:0] rx = '0;
  logic [4:0]   addr = '0;
  logic [31:0]  taps, cnt0, cnt1;
  logic [N-1:0] ser, busy, valid;
  logic [W-1:0] word [N];
  longint       sc [N];
  int           nwords [N];
  realtime      t_first;
  int checks = 0, failures = 0;

  always #(T / 2) clk = ~clk;

  tb_ideal_timebase tbase (.clk(clk), .rst(rst), .taps(taps), .cnt0(cnt0), .cnt1(cnt1));

  eoc dut (.clk(clk), .rst(rst), .taps(taps), .cnt0(cnt0), .cnt1(cnt1), .rx_data(rx), .rx_addr(addr),
           .ser_out(ser), .busy(busy));

  for (genvar i = 0; i < N; i++) begin : g_rx
    tb_serial_rx #(.W(W)) u_rx (.clk(clk), .rst(rst), .ser(ser[i]), .valid(valid[i]), .word(word[i]), .start_cycle(sc[i]));
    always @(posedge valid[i]) nwords[i]++;
  end

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

  task automatic chk(input string what, input int ch, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("ch%0d %s: got %0d expected %0d", ch, what, got, exp); end
  endtask

  initial begin
    #(T * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint nl [N], nt [N];
    logic [4:0] a [N];
    logic [N-1:0] fire;
    int n_before [N];
    longint base;
    foreach (nwords[i]) nwords[i] = 0;
    rst = 1'b1;
    repeat (4) @(posedge clk);
    #100 rst = 1'b0;
    @(posedge clk);
    t_first = $realtime;
    for (int r = 0; r < 12; r++) begin
      fire = (r == 0) ? '1 : N'($urandom);
      foreach (n_before[i]) n_before[i] = nwords[i];
      base = longint'(($realtime - t_first) / TAU) + 40;
      for (int i = 0; i < N; i++) begin
        nl[i] = base + i * 320 + $urandom_range(0, 100);   // 320 cells = 31 ns apart
        nt[i] = nl[i] + $urandom_range(12, 150);
        a[i]  = 5'(1 << $urandom_range(0, 4));
      end
      for (int i = 0; i < N; i++) begin
        if (fire[i]) begin
          wait_until(t_first + (real'(nl[i]) + 0.5) * TAU - 260.0);
          rx[i] = 1'b1; addr = a[i];
          wait_until(t_first + (real'(nt[i]) + 0.5) * TAU - 260.0);
          rx[i] = 1'b0;
          #500 addr = '0;
        end
      end
      repeat (W + 20) @(posedge clk);
      for (int i = 0; i < N; i++) begin
        chk("words", i, nwords[i] - n_before[i], fire[i] ? 1 : 0);
        if (fire[i]) begin
          chk("addr",         i, word[i][132:128], a[i]);
          chk("coarse trail", i, word[i][127:96],  nt[i] / 32 + 1);
          chk("coarse lead",  i, word[i][95:64],   nl[i] / 32 + 1);
          chk("fine trail",   i, word[i][63:32],   code_of(nt[i]));
          chk("fine lead",    i, word[i][31:0],    code_of(nl[i]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
