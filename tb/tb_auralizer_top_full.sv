// tb_auralizer_top_full: the whole auralizer at its default, full sizes
// (1024 x 768 frames, 16 x 16 grid, 16 oscillators x 128 harmonics,
// 2^16-point transform, 800-sample windows, 15 drum units), with no
// parameter changed.  Two camera frames are played; in the second the red
// LED moves into the sprite box, and the first pixel of a third frame closes
// it.  With the tempo taken from video, that entry is the one tempo pulse:
// it makes one sample packet from the colour analysis, one 32768-bin
// spectrum and one synthesised window, which the test hears on the AC'97
// link.  Checks: colour and rule packet counts, the single tempo, packet
// and spectrum, a new window, non-zero audio and that every decoded AC'97
// left sample is one the effects produced.
module tb_auralizer_top_full;
  localparam int H = 1024, V = 768;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic bit_clk = 0;
  always #25 bit_clk = !bit_clk;

  logic [7:0] y_in = 0, cr_in = 128, cb_in = 128;
  logic pix_valid = 0, hsync_in = 0, vsync_in = 0;
  logic [7:0] sw = 0, knob = 0;
  logic [5:0] buttons = 0;
  logic mode_sw = 0, tempo_src = 1;
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

  auralizer_top dut (
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

  initial begin
    repeat (5) @(posedge clk); rst = 0;
    frame(40, 300);           // LED left of the box
    frame(400, 300);          // LED inside the box
    @(negedge clk); y_in = 8'd16; cr_in = 8'd128; cb_in = 8'd128;
    pix_valid = 1; hsync_in = 1; vsync_in = 1;       // first pixel of frame 3
    @(negedge clk); pix_valid = 0; hsync_in = 0; vsync_in = 0;
    wait (n_new == 1);
    repeat (900 * 2200) @(negedge clk);              // one window of audio

    $display("MECH colour_packets=%0d rule_packets=%0d tempo=%0d band_steps=%0d", n_csa, n_rule, n_tempo, n_band);
    $display("MECH sample_packets=%0d spectra=%0d new_windows=%0d replays=%0d", n_smp, n_spec, n_new, n_replay);
    $display("MECH audio_frames=%0d left_nonzero=%0d ac97_frames=%0d ac97_left_nonzero=%0d ac97_unknown=%0d",
             n_audio, n_left_nz, n_ac97, n_ac97_nz, n_ac97_bad);
    check(n_csa == 2 * 256, $sformatf("colour packets %0d", n_csa));
    check(n_rule == 3 * 4, $sformatf("rule packets %0d", n_rule));
    check(n_overrun == 0 && n_sprite_dropped == 0, "overrun or dropped frame");
    check(n_tempo == 1 && n_band == 1, "one tempo pulse from the LED entering the box");
    check(n_smp == 1 && n_spec == 1, "one sample packet and one spectrum");
    check(n_new == 1 && n_replay >= 1, "one new window, then replay");
    check(n_left_nz >= 400, "synthesised audio on the left");
    check(n_ac97 >= n_audio - 2 && n_ac97_nz >= 400 && n_ac97_bad == 0, "AC'97 left slot carries the audio");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8000000) @(posedge clk);
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
