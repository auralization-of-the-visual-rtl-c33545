// tb_video_input_xlate: loads colour peaks for a 4 x 2 grid, steps the band
// and checks every word of the sample packets against a floating-point
// reference of the pitch table (F0BIN * 2^(hue/64)) and of the Welch window
// on the harmonic axis (tolerance 1 bin, 2 window steps), then checks rule
// handling: tempo pulses and sampler addresses carried in the header.
module tb_video_input_xlate;
  localparam int NOSC = 4, NHARM = 8, NV = 2, F0 = 150;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  pkt_bus #(.W(8))  ci (.clk, .rst);
  pkt_bus #(.W(8))  ri (.clk, .rst);
  pkt_bus #(.W(32)) so (.clk, .rst);
  logic band_step = 0, tempo_out, cfg_we = 0;
  logic [3:0] band_sel;
  logic [2:0] cfg_rule = 0;
  logic [9:0] cfg_data = 0;

  video_input_xlate #(.NOSC(NOSC), .NHARM(NHARM), .NV(NV), .F0BIN(F0)) dut (
    .clk, .rst, .csa_in(ci), .rule_in(ri), .band_step, .smp_out(so), .tempo_out, .band_sel,
    .cfg_we, .cfg_rule, .cfg_data);

  int checks = 0, failures = 0, tempos = 0;
  int words [$];
  int starts [$];
  assign so.woe = 1'b1;
  always_ff @(posedge clk) if (!rst) begin
    if (so.re && so.woe) begin words.push_back(int'(so.data)); starts.push_back(int'(so.start)); end
    if (tempo_out) tempos++;
  end

  int hh [8], ss [8], bb [8];

  task automatic send8(input int a, input int b, input int c, input int d);
    int w [4];
    w = '{a, b, c, d};
    foreach (w[i]) begin
      ci.re <= 1; ci.start <= (i == 0); ci.data <= 8'(w[i]);
      @(posedge clk iff ci.woe);
    end
  endtask
  task automatic rule(input int r, input int v);
    int w [3];
    w = '{r, (v >> 8) & 63, v & 255};
    foreach (w[i]) begin
      ri.re <= 1; ri.start <= (i == 0); ri.data <= 8'(w[i]);
      @(posedge clk iff ri.woe);
    end
    ri.re <= 0; ri.start <= 0;
    @(negedge clk);
  endtask

  task automatic step_and_check(input int band, input int trig);
    words.delete(); starts.delete();
    @(negedge clk); band_step = 1; @(negedge clk); band_step = 0;
    repeat (NOSC * NHARM + 10) @(posedge clk);
    checks++;
    if (band_sel != band || words.size() != 1 + NOSC * NHARM || starts[0] != 1) begin
      failures++; $display("band %0d packet %0d words", band_sel, words.size()); return;
    end
    checks++;
    if (words[0] != ((NOSC * NHARM) << 16 | trig)) begin failures++; $display("header %h", words[0]); end
    for (int o = 0; o < NOSC; o++)
      for (int n = 1; n <= NHARM; n++) begin
        int c, w, gb, gv, eb, ev;
        real d, f0;
        c = o * NV + band;
        w = words[1 + o * NHARM + n - 1];
        gb = (w >> 16) & 65535; gv = (w & 65535) >> 4;
        f0 = F0 * (2.0 ** (hh[c] / 64.0));
        eb = int'(n * f0);
        if (eb > 65535) eb = 65535;
        d = (n - 1 - (bb[c] * NHARM) / 256) * 512.0 / (2 ** (ss[c] / 32));
        ev = (d <= -512 || d >= 512) ? 0 : int'(255.0 * (1.0 - (d / 512.0) ** 2));
        checks++;
        if (gb - eb > 1 + n || eb - gb > 1 + n || gv - ev > 2 || ev - gv > 2) begin
          failures++;
          if (failures < 10) $display("cell %0d h%0d: bin %0d exp %0d, value %0d exp %0d", c, n, gb, eb, gv, ev);
        end
      end
  endtask

  initial begin
    ci.re = 0; ci.start = 0; ci.data = 0; ri.re = 0; ri.start = 0; ri.data = 0;
    repeat (3) @(posedge clk); rst = 0;
    for (int c = 0; c < 8; c++) begin
      hh[c] = $urandom_range(0, 255); ss[c] = $urandom_range(0, 255); bb[c] = $urandom_range(0, 255);
      send8(c, hh[c], ss[c], bb[c]);
    end
    ci.re <= 0; ci.start <= 0;
    step_and_check(1, 0);
    rule(1, 200);                       // trigger rule: sampler address 2
    rule(5, 0);                         // value 0: nothing
    rule(2, 77);                        // rule with no action
    step_and_check(0, 2);
    step_and_check(1, 0);               // trigger is sent once
    rule(3, 1); rule(3, 4000);          // tempo rule twice
    @(negedge clk); cfg_we = 1; cfg_rule = 2; cfg_data = 10'h200; @(negedge clk); cfg_we = 0;
    rule(2, 9);                         // rule 2 now a tempo rule
    repeat (3) @(posedge clk);
    checks++; if (tempos != 3) begin failures++; $display("tempo pulses %0d", tempos); end
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
