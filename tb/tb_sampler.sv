// tb_sampler: starts voices at random frames and compares every unit's
// per-frame sum with a reference model of the voice allocation (free voice
// first, otherwise the oldest) and of the synthetic drum tables.
// 3 units, 2 voices each, 16-sample sounds, 200 frames.
module tb_sampler;
  localparam int NSU = 3, NCNT = 2, SLEN = 16;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  pkt_bus #(.W(8)) st (.clk, .rst);
  logic ready = 0, out_valid;
  logic signed [15:0] su_out [NSU];
  logic [7:0] n_started;

  sampler #(.NSU(NSU), .NCNT(NCNT), .SLEN(SLEN), .BASE(1)) dut (
    .clk, .rst, .start_in(st), .ready, .su_out, .out_valid, .n_started);

  int checks = 0, failures = 0, steals = 0, frees = 0;
  int m_act [NSU][NCNT];
  int m_cnt [NSU][NCNT];

  function automatic int drum(input int su, input int n);
    int env, v;
    env = int'((longint'(SLEN - n) * (SLEN - n) * 16383) / (longint'(SLEN) * SLEN));
    if (su % 2 == 0) v = ((n / (4 + 3 * su)) % 2 == 1) ? env : -env;
    else v = (((n * 1103515245 + su * 12345) >>> 12) % 2 == 1) ? env : -env;
    return int'(shortint'(v));
  endfunction

  task automatic model_start(input int a);
    int i, pick, oldest;
    i = a - 1;
    if (i < 0 || i >= NSU) return;
    pick = -1; oldest = 0;
    for (int c = 0; c < NCNT; c++) begin
      if (m_act[i][c] == 0 && pick < 0) pick = c;
      if (m_cnt[i][c] > m_cnt[i][oldest]) oldest = c;
    end
    if (pick < 0) begin pick = oldest; steals++; end
    m_act[i][pick] = 1; m_cnt[i][pick] = 0;
  endtask

  initial begin
    st.re = 0; st.start = 0; st.data = 0;
    foreach (m_act[i, c]) begin m_act[i][c] = 0; m_cnt[i][c] = 0; end
    repeat (3) @(posedge clk); rst = 0;
    for (int f = 0; f < 200; f++) begin
      // maybe start a voice
      if ($urandom_range(0, 3) == 0) begin
        int a;
        a = $urandom_range(0, NSU + 1);   // includes addresses nobody answers
        st.re <= 1; st.start <= 1; st.data <= 8'(a);
        @(posedge clk iff st.woe);
        st.re <= 0; st.start <= 0;
        model_start(a);
      end
      @(negedge clk);
      ready = 1; @(negedge clk); ready = 0;
      @(posedge clk iff out_valid);
      for (int i = 0; i < NSU; i++) begin
        int e;
        e = 0;
        for (int c = 0; c < NCNT; c++) if (m_act[i][c] != 0) e += drum(i, m_cnt[i][c]);
        if (e > 32767) e = 32767;
        if (e < -32767) e = -32767;
        checks++;
        if (int'(su_out[i]) != e) begin
          failures++;
          if (failures < 10) $display("frame %0d su %0d got %0d exp %0d", f, i, su_out[i], e);
        end
        for (int c = 0; c < NCNT; c++) if (m_act[i][c] != 0) begin
          if (m_cnt[i][c] == SLEN - 1) begin m_act[i][c] = 0; frees++; end
          else m_cnt[i][c]++;
        end
      end
      // frame processing takes NCNT + 1 clocks
      repeat (5) @(posedge clk);
    end
    checks++; if (steals == 0 || frees == 0) begin failures++; $display("steals %0d frees %0d", steals, frees); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
