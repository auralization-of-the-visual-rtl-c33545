// tb_audio_ifft: checks the synthesiser against a direct cosine sum.
//
// N = 64, M = 20.  A first coefficient set is loaded and window 0 must equal
// x[n] = (a0 + 2*sum a_k cos(2*pi*k*n/N)) / 2^OSHIFT.  No new set follows, so
// window 1 must replay window 0.  A second set is sent while window 1 plays;
// window 2 must carry the phase advance of 2*M samples.  The time from a
// complete set to the first output is checked against 2N plus the pipeline.
module tb_audio_ifft;
  localparam int unsigned LOGN = 6, N = 64, M = 20, OSH = 2;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;

  pkt_bus #(.W(16)) ib (.clk, .rst);
  pkt_bus #(.W(16)) ob (.clk, .rst);
  logic new_window, replay;

  audio_ifft #(.LOGN(LOGN), .M(M), .OSHIFT(OSH)) dut (
    .clk, .rst, .in_bus(ib), .out_bus(ob), .new_window, .replay);

  int checks = 0, failures = 0;
  int a1 [N/2];
  int a2 [N/2];
  int got [4][M];
  int wcnt = 0, widx = 0, n_replay = 0, n_new = 0;
  longint t_done, t_first;

  // reader: one word every 20 clocks
  int div = 0;
  always_ff @(posedge clk) begin
    div <= (div == 19) ? 0 : div + 1;
    if (!rst && ob.re && ob.woe && wcnt < 4) begin
      if (ob.start && widx != 0) begin $display("start misplaced"); failures++; end
      got[wcnt][widx] = $signed(ob.data);
      if (widx == M - 1) begin widx = 0; wcnt++; end else widx++;
    end
    if (!rst && replay) n_replay++;
    if (!rst && new_window) n_new++;
  end
  assign ob.woe = (div == 0);

  task automatic send(input int a [N/2]);
    for (int k = 0; k < N/2; k++) begin
      ib.re <= 1; ib.start <= (k == 0); ib.data <= 16'(a[k]);
      @(posedge clk iff ib.woe);
    end
    ib.re <= 0; ib.start <= 0;
    @(negedge clk);
  endtask

  function automatic int expect_x(input int a [N/2], input int n, input int d);
    real s;
    s = a[0];
    for (int k = 1; k < N/2; k++) s += 2.0 * a[k] * $cos(2.0 * 3.14159265358979 * k * (n + d) / N);
    return int'(s / (1 << OSH));
  endfunction

  task automatic cmp_window(input int w, input int a [N/2], input int d);
    for (int n = 0; n < M; n++) begin
      int e;
      e = expect_x(a, n, d);
      checks++;
      if (got[w][n] - e > 6 || e - got[w][n] > 6) begin
        failures++;
        $display("window %0d n=%0d got %0d expected %0d", w, n, got[w][n], e);
      end
    end
  endtask

  initial begin
    ib.re = 0; ib.start = 0; ib.data = 0;
    foreach (a1[k]) begin a1[k] = 0; a2[k] = 0; end
    a1[0] = 200; a1[3] = 1000; a1[5] = 600; a1[17] = 300;
    a2[2] = 900; a2[9] = 400; a2[31] = 250;
    repeat (4) @(posedge clk);
    rst = 0;
    send(a1);
    t_done = $time;
    wait (ob.re);
    t_first = $time;
    checks++;
    if ((t_first - t_done) / 10 > 2 * N + 4 * 25) begin
      failures++; $display("latency %0d clocks", (t_first - t_done) / 10);
    end
    wait (wcnt == 1);
    send(a2);
    wait (wcnt == 3);
    cmp_window(0, a1, 0);
    cmp_window(1, a1, 0);      // replay of window 0
    cmp_window(2, a2, 2 * M);  // new set, phase advanced by two windows
    checks++; if (n_replay < 1) begin failures++; $display("no replay"); end
    checks++; if (n_new < 2) begin failures++; $display("new windows %0d", n_new); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
