// tb_hw_input_xlate: presses every button and checks the one-clock control
// pulses, the switch-to-address mapping, the internal tempo period at two
// tempo settings, the video tempo path, the effect controls and the
// four-byte parameter packet (with a stalling receiver).  TEMPO_DIV = 10.
module tb_hw_input_xlate;
  import aural_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  pkt_bus #(.W(8)) pb (.clk, .rst);
  logic [7:0] sw = 0, knob = 0;
  logic [5:0] buttons = 0;
  logic mode_sw = 0, tempo_src = 0, video_tempo = 0;
  logic [2:0] tempo_sel = 0;
  logic [1:0] fx_sw = 0;
  logic [31:0] user_io = 0;
  seq_ctrl_t ctrl;
  logic filter_en, reverb_en;
  logic [7:0] decay;

  hw_input_xlate #(.TEMPO_DIV(10)) dut (.clk, .rst, .sw, .buttons, .mode_sw, .tempo_src,
    .tempo_sel, .video_tempo, .fx_sw, .knob, .user_io, .ctrl, .filter_en, .reverb_en,
    .decay, .par_out(pb));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int got [$];
  always_ff @(posedge clk) pb.woe <= ($urandom_range(0, 2) != 0);
  always_ff @(posedge clk) if (!rst && pb.re && pb.woe) got.push_back({pb.start, pb.data});

  // count pulses of each control over a window
  int pulses [6];
  always_ff @(posedge clk) if (!rst) begin
    if (ctrl.store_sample) pulses[0]++;
    if (ctrl.clear_sample) pulses[1]++;
    if (ctrl.play_sample)  pulses[2]++;
    if (ctrl.store_step)   pulses[3]++;
    if (ctrl.clear_step)   pulses[4]++;
  end
  int tlast = -1, tper [$], cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && ctrl.tempo) begin
      if (tlast >= 0) tper.push_back(cyc - tlast);
      tlast <= cyc;
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    @(negedge clk); sw = 8'h5A; mode_sw = 1; fx_sw = 2'b10; knob = 8'd200;
    repeat (2) @(negedge clk);
    check(ctrl.memory_address == 4'hA && ctrl.step_address == 4'h5 && ctrl.mode_select, "switches");
    check(!filter_en && reverb_en && decay == 8'd200, "fx controls");
    for (int b = 0; b < 5; b++) begin
      foreach (pulses[i]) pulses[i] = 0;
      buttons[b] = 1; repeat (20) @(negedge clk); buttons[b] = 0; repeat (3) @(negedge clk);
      for (int i = 0; i < 5; i++) check(pulses[i] == ((i == b) ? 1 : 0), $sformatf("button %0d pulse %0d", b, i));
    end
    // internal tempo: period 10 with tempo_sel 0, 30 with tempo_sel 2
    tper.delete(); repeat (60) @(negedge clk);
    check(tper.size() >= 4, "tempo count");
    foreach (tper[i]) check(tper[i] == 10, $sformatf("tempo period %0d", tper[i]));
    tempo_sel = 2; repeat (40) @(negedge clk); tper.delete(); repeat (100) @(negedge clk);
    check(tper.size() >= 2, "tempo count 2");
    foreach (tper[i]) check(tper[i] == 30, $sformatf("tempo period2 %0d", tper[i]));
    // video tempo
    tempo_src = 1; repeat (3) @(negedge clk); tper.delete(); tlast = -1;
    repeat (50) @(negedge clk);
    check(tlast == -1, "internal tempo muted");
    repeat (3) begin video_tempo = 1; @(negedge clk); video_tempo = 0; repeat (7) @(negedge clk); end
    check(tper.size() == 2 && tper[0] == 8 && tper[1] == 8, "video tempo");
    // parameter packets
    for (int k = 0; k < 3; k++) begin
      logic [31:0] w;
      w = $urandom;
      user_io = w; buttons[5] = 1; repeat (5) @(negedge clk); buttons[5] = 0;
      repeat (30) @(negedge clk);
      check(got.size() == 4, "packet length");
      if (got.size() == 4)
        for (int i = 0; i < 4; i++)
          check(got[i] == {(i == 0), w[31-8*i -: 8]}, $sformatf("packet byte %0d", i));
      got.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
