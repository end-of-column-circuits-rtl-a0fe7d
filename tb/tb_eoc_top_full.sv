// tb_eoc_top_full: the TDC periphery at its default size, 40 columns of 9
// channels with the 32-to-5 encoders, taken through DLL lock from start-up
// and three rounds of hits in which all 40 columns fire at once (every
// channel fires in the first round). Each serial word's address, coarse
// times and encoded phases are compared with the times at which the pulses
// were applied, and the same mechanisms as in tb_eoc_top are counted (DLL
// corrections both ways, all three coarse-selection windows, a pulse ignored
// while blocked, concurrent column readouts).
`timescale 1ps/1fs
module tb_eoc_top_full;
  localparam real T   = 3125.0;
  localparam real TAU = T / 32.0;
  localparam int  NC  = 40;
  localparam bit  ENC = 1'b1;
  localparam int  N   = 9;
  localparam int  W   = ENC ? 79 : 133;

  logic clk = 1'b0, rst;
  logic [NC-1:0][N-1:0] rx = '0;
  logic [NC-1:0][4:0]   addr = '0;
  logic [NC-1:0][N-1:0] ser, busy;
  logic [31:0]          taps;
  logic [NC*N-1:0]      valid;
  logic [W-1:0]         word [NC*N];
  longint               sc [NC*N];
  int                   nwords [NC*N];
  realtime              t_first;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_win_c1 = 0, n_win_c0 = 0, n_win_c1m1 = 0, n_blocked = 0, n_multi = 0;

  always #(T / 2) clk = ~clk;

  eoc_top dut (
    .clk(clk), .rst(rst), .rx_data(rx), .rx_addr(addr), .ser_out(ser), .busy(busy), .dll_taps(taps));

  for (genvar c = 0; c < NC; c++) begin : g_col
    for (genvar i = 0; i < N; i++) begin : g_ch
      tb_serial_rx #(.W(W)) u_rx (.clk(clk), .rst(rst), .ser(ser[c][i]), .valid(valid[c*N+i]),
                                 .word(word[c*N+i]), .start_cycle(sc[c*N+i]));
      always @(posedge valid[c*N+i]) nwords[c*N+i]++;
    end
  end

  // DLL corrections and concurrent readouts
  always @(posedge clk) begin
    if (!rst && dut.u_dll.up)   n_up++;
    if (!rst && dut.u_dll.down) n_down++;
    if ((busy[0] != '0) && (busy[NC-1] != '0)) n_multi++;
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

  task automatic count_window(input longint n);
    if (n % 32 < 8) n_win_c1++;
    else if (n % 32 < 24) n_win_c0++;
    else n_win_c1m1++;
  endtask

  initial begin
    #(T * 400000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One column's pulses for a round.
  task automatic fire_column(input int c, input logic [N-1:0] fire, input longint base,
                             ref longint nl [NC*N], ref longint nt [NC*N], ref logic [4:0] a [NC*N]);
    for (int i = 0; i < N; i++) begin
      if (fire[i]) begin
        wait_until(t_first + (real'(nl[c*N+i]) + 0.5) * TAU - 260.0);
        rx[c][i] = 1'b1; addr[c] = a[c*N+i];
        wait_until(t_first + (real'(nt[c*N+i]) + 0.5) * TAU - 260.0);
        rx[c][i] = 1'b0;
        #500 addr[c] = '0;
        if (i == N - 1 && c == 0) begin      // again while blocked
          #1000 rx[c][i] = 1'b1; addr[c] = 5'h1F;
          #2000 rx[c][i] = 1'b0; addr[c] = '0;
          n_blocked++;
        end
      end
    end
  endtask

  initial begin
    longint nl [NC*N], nt [NC*N];
    logic [4:0] a [NC*N];
    logic [N-1:0] fire [NC];
    int n_before [NC*N];
    longint base;
    int ch;
    foreach (nwords[i]) nwords[i] = 0;
    rst = 1'b1;
    repeat (4) @(posedge clk);
    #100 rst = 1'b0;
    @(posedge clk);
    t_first = $realtime;
    repeat (250) @(posedge clk);        // DLL lock from start-up
    for (int r = 0; r < 3; r++) begin
      foreach (n_before[i]) n_before[i] = nwords[i];
      base = longint'(($realtime - t_first) / TAU) + 40;
      for (int c = 0; c < NC; c++) begin
        fire[c] = (r == 0) ? '1 : N'($urandom);
        fire[c][N-1] = (c == 0) ? 1'b1 : fire[c][N-1];
        for (int i = 0; i < N; i++) begin
          ch = c * N + i;
          nl[ch] = base + i * 320 + $urandom_range(0, 100);
          nt[ch] = nl[ch] + $urandom_range(12, 150);
          a[ch]  = 5'(1 << $urandom_range(0, 4));
        end
      end
      fork
        begin : f_cols
          for (int c = 0; c < NC; c++) begin
            automatic int cc = c;
            fork fire_column(cc, fire[cc], base, nl, nt, a); join_none
          end
          wait fork;
        end
      join
      repeat (W + 20) @(posedge clk);
      for (int c = 0; c < NC; c++) begin
        for (int i = 0; i < N; i++) begin
          ch = c * N + i;
          chk("words", ch, nwords[ch] - n_before[ch], fire[c][i] ? 1 : 0);
          if (fire[c][i]) begin
            count_window(nl[ch]);
            count_window(nt[ch]);
            if (ENC) begin
              chk("addr",         ch, word[ch][78:74], a[ch]);
              chk("coarse trail", ch, word[ch][73:42], nt[ch] / 32 + 1);
              chk("coarse lead",  ch, word[ch][41:10], nl[ch] / 32 + 1);
              chk("phase trail",  ch, word[ch][9:5],   nt[ch] % 32);
              chk("phase lead",   ch, word[ch][4:0],   nl[ch] % 32);
            end else begin
              chk("addr",         ch, word[ch][W-1 -: 5],  a[ch]);
              chk("coarse trail", ch, word[ch][127:96],    nt[ch] / 32 + 1);
              chk("coarse lead",  ch, word[ch][95:64],     nl[ch] / 32 + 1);
              chk("fine trail",   ch, word[ch][63:32],     code_of(nt[ch]));
              chk("fine lead",    ch, word[ch][31:0],      code_of(nl[ch]));
            end
          end
        end
      end
    end
    $display("mechanisms: dll_up=%0d dll_down=%0d window_c1=%0d window_c0=%0d window_c1m1=%0d blocked=%0d multi_column=%0d",
             n_up, n_down, n_win_c1, n_win_c0, n_win_c1m1, n_blocked, n_multi);
    checks += 7;
    if (n_up == 0)       begin failures++; $display("DLL never corrected up"); end
    if (n_down == 0)     begin failures++; $display("DLL never corrected down"); end
    if (n_win_c1 == 0)   begin failures++; $display("window c1 never used"); end
    if (n_win_c0 == 0)   begin failures++; $display("window c0 never used"); end
    if (n_win_c1m1 == 0) begin failures++; $display("window c1-1 never used"); end
    if (n_blocked == 0)  begin failures++; $display("blocking never exercised"); end
    if (n_multi == 0)    begin failures++; $display("no concurrent column readout"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
