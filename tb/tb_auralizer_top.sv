// tb_auralizer_top: end-to-end run of the whole auralizer at reduced sizes
// (512 x 320 frames, 1024-point transform, 8-sample windows, 8 harmonics,
// 3 drum units).  It plays the camera: coloured vertical stripes with a red
// LED square that moves left to right, crossing the trigger line during the
// run.  It plays the codec too: it drives the AC'97 bit clock and decodes
// the serial frames.  It counts each mechanism and checks it:
// colour-analysis packets (16 per band), sprite-rule packets (4 per frame),
// tempo pulses, sample packets, spectra, new and replayed windows, drum
// voices started by the LED crossing, audio frames, a patchboard change made
// with a parameter packet from the user I/O, and that every left sample
// decoded from the AC'97 stream is one the effects produced.
module tb_auralizer_top;
  localparam int H = 512, V = 320;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic bit_clk = 0;
  always #25 bit_clk = !bit_clk;

  logic [7:0] y_in = 0, cr_in = 128, cb_in = 128;
  logic pix_valid = 0, hsync_in = 0, vsync_in = 0;
  logic [7:0] sw = 0, knob = 0;
  logic [5:0] buttons = 0;
  logic mode_sw = 0, tempo_src = 0;
  logic [2:0] tempo_sel = 0;
  logic [1:0] fx_sw = 0;
  logic [31:0] user_io = 0;
  logic [4:0] volume = 5'd31;
  logic cfg_we = 0;
  logic [1:0] cfg_sel = 0;
  logic [7:0] cfg_addr = 0;
  logic [9:0] cfg_data = 0;
  logic sync, sdo, rst_n;
  logic [3:0] band_sel, step_ptr;
  logic tempo, csa_busy, csa_overrun, new_window, replay, audio_re;
  logic [15:0] audio_left, audio_right;
  logic [7:0] n_voices, n_sprite_dropped;

  auralizer_top #(.H_PIX(H), .V_PIX(V), .NHARM(8), .F0BIN(2), .LOGN(10), .M(8), .NSU(3),
    .SLEN(256), .EDEPTH(64), .TEMPO_DIV(20000), .RST_CYC(16)) dut (
    .clk, .rst, .y_in, .cr_in, .cb_in, .pix_valid, .hsync_in, .vsync_in, .sw, .buttons,
    .mode_sw, .tempo_src, .tempo_sel, .fx_sw, .knob, .user_io, .volume, .cfg_we, .cfg_sel,
    .cfg_addr, .cfg_data, .ac97_bit_clk(bit_clk), .ac97_sdata_in(1'b0), .ac97_sync(sync),
    .ac97_sdata_out(sdo), .ac97_reset_n(rst_n), .band_sel, .step_ptr, .tempo, .csa_busy,
    .csa_overrun, .new_window, .replay, .audio_re, .audio_left, .audio_right, .n_voices,
    .n_sprite_dropped);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_csa = 0, n_rule = 0, n_smp = 0, n_spec = 0, n_sa = 0, n_tempo = 0, n_new = 0,
      n_replay = 0, n_audio = 0, n_left_nz = 0, n_right_nz = 0, n_overrun = 0, n_band = 0;
  logic [3:0] band_q = 0;
  bit seen_left [logic [15:0]];
  initial seen_left[16'h0000] = 1;   // the encoder's reset value, sent before any sample
  always_ff @(posedge clk) if (!rst) begin
    if (dut.csa_bus.re && dut.csa_bus.woe && dut.csa_bus.start) n_csa++;
    if (dut.rule_bus.re && dut.rule_bus.woe && dut.rule_bus.start) n_rule++;
    if (dut.smp_bus.re && dut.smp_bus.woe && dut.smp_bus.start) n_smp++;
    if (dut.spec_bus.re && dut.spec_bus.woe && dut.spec_bus.start) n_spec++;
    if (dut.sa_bus.re && dut.sa_bus.woe && dut.sa_bus.start) n_sa++;
    if (tempo) n_tempo++;
    if (new_window) n_new++;
    if (replay) n_replay++;
    if (csa_overrun) n_overrun++;
    band_q <= band_sel;
    if (band_sel != band_q) n_band++;
    if (audio_re) begin
      n_audio++;
      seen_left[audio_left] = 1;
      if (audio_left != 0) n_left_nz++;
      if (audio_right != 0) n_right_nz++;
    end
  end

  // ---------------- AC'97 codec model ----------------
  logic [255:0] sh;
  int nbits = -1, n_ac97 = 0, n_ac97_nz = 0, n_ac97_bad = 0;
  logic prev_sync = 0;
  always @(negedge bit_clk) begin
    if (sync && !prev_sync) begin
      if (nbits == 256) begin
        n_ac97++;
        if (sh[199:184] != 0) n_ac97_nz++;
        if (!seen_left.exists(sh[199:184])) n_ac97_bad++;
      end
      nbits = 0;
    end
    prev_sync = sync;
    if (nbits >= 0) begin sh = {sh[254:0], sdo}; nbits++; end
  end

  // ---------------- camera ----------------
  // stripe colours by vertical band: blue, green, yellow, magenta
  function automatic void stripe(int x, output logic [7:0] yy, cr, cb);
    case ((x / (H / 16)) % 4)
      0: begin yy = 8'd41;  cr = 8'd110; cb = 8'd240; end
      1: begin yy = 8'd145; cr = 8'd34;  cb = 8'd54;  end
      2: begin yy = 8'd210; cr = 8'd146; cb = 8'd16;  end
      default: begin yy = 8'd106; cr = 8'd222; cb = 8'd202; end
    endcase
    yy = yy - 8'(x % 8);
  endfunction

  task automatic frame(int lx, int ly);
    for (int y = 0; y < V; y++)
      for (int x = 0; x < H; x++) begin
        logic [7:0] yy, cr, cb;
        @(negedge clk);
        if (x >= lx && x < lx + 8 && y >= ly && y < ly + 8) begin
          yy = 8'd81; cr = 8'd240; cb = 8'd90;           // red LED
        end else stripe(x, yy, cr, cb);
        y_in = yy; cr_in = cr; cb_in = cb;
        pix_valid = 1; hsync_in = (x == 0); vsync_in = (x == 0 && y == 0);
      end
  endtask

  int led_x [5] = '{60, 180, 300, 420, 440};
  initial begin
    repeat (5) @(posedge clk); rst = 0;
    for (int f = 0; f < 5; f++) begin
      if (f == 1) fork
        begin   // patch the right output to the first drum unit (channel 1)
          user_io = {8'd255, 8'd7, 16'd1};
          repeat (100) @(negedge clk); buttons[5] = 1;
          repeat (100) @(negedge clk); buttons[5] = 0;
        end
      join_none
      frame(led_x[f], 150);
    end
    @(negedge clk); pix_valid = 0; hsync_in = 0; vsync_in = 0;
    repeat (40000) @(negedge clk);

    $display("MECH colour_packets=%0d rule_packets=%0d tempo=%0d band_steps=%0d", n_csa, n_rule, n_tempo, n_band);
    $display("MECH sample_packets=%0d spectra=%0d drum_triggers=%0d voices=%0d", n_smp, n_spec, n_sa, n_voices);
    $display("MECH new_windows=%0d replays=%0d audio_frames=%0d left_nonzero=%0d right_nonzero=%0d",
             n_new, n_replay, n_audio, n_left_nz, n_right_nz);
    $display("MECH ac97_frames=%0d ac97_left_nonzero=%0d ac97_unknown=%0d overruns=%0d sprite_dropped=%0d",
             n_ac97, n_ac97_nz, n_ac97_bad, n_overrun, n_sprite_dropped);
    // every band is reported when the next one starts: 4 whole frames plus
    // the first 15 bands of the last one, 16 cells each
    check(n_csa == 4 * 256 + 15 * 16, $sformatf("colour packets %0d", n_csa));
    check(n_rule == 5 * 4, $sformatf("rule packets %0d", n_rule));
    check(n_overrun == 0 && n_sprite_dropped == 0, "overrun or dropped frame");
    check(n_tempo >= 30 && n_band >= 30, "tempo and band stepping");
    check(n_smp >= 30, "sample packets");
    check(n_spec >= n_smp - 2 && n_spec <= n_smp, "one spectrum per sample packet");
    check(n_new >= 10, "new windows");
    check(n_replay >= 10, "replayed windows");
    check(n_sa == 1 && n_voices == 1, "one drum trigger from the line crossing");
    check(n_audio >= 600, "audio frames");
    check(n_left_nz >= n_audio / 2, "synthesiser audio on the left");
    check(n_right_nz >= 10, "drum audio on the right after the patch");
    check(n_ac97 >= n_audio - 2 && n_ac97 <= n_audio + 2, "AC'97 frames");
    check(n_ac97_nz >= n_ac97 / 2 && n_ac97_bad == 0, "AC'97 left slot carries the effects output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1200000) @(posedge clk);
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
