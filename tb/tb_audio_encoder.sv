// tb_audio_encoder: acts as the AC'97 codec.  It drives a bit clock of 8
// system clocks, shifts in SDATA_OUT on falling edges, frames on SYNC and
// checks the tag slot, the volume register writes, the left/right PCM slots
// (each frame must carry the samples offered before the previous `ready`)
// and that `ready` comes once per 256 bit clocks.
module tb_audio_encoder;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic bit_clk = 0;
  always #40 bit_clk = !bit_clk;

  logic [15:0] left = 0, right = 0;
  logic re = 0, ready;
  logic [4:0] volume = 5'd20;
  logic sync, sdo, rst_n;

  audio_encoder #(.RST_CYC(16)) dut (.clk, .rst, .left, .right, .re, .volume, .ready,
    .ac97_bit_clk(bit_clk), .ac97_sdata_in(1'b0), .ac97_sync(sync),
    .ac97_sdata_out(sdo), .ac97_reset_n(rst_n));

  int checks = 0, failures = 0;
  logic [255:0] sh;
  int nbits = -1, frames = 0;
  logic prev_sync = 0;
  logic [15:0] exp_l [$], exp_r [$];
  int n_cmd02 = 0, n_cmd18 = 0;
  longint last_ready = 0;

  // new samples offered right after each ready
  always @(posedge clk) if (!rst && ready) begin
    logic [15:0] l, r;
    l = 16'($urandom); r = 16'($urandom);
    checks++;
    if (last_ready != 0 && ($time - last_ready) != 256 * 80) begin
      failures++; $display("ready spacing %0d", $time - last_ready);
    end
    last_ready = $time;
    left <= l; right <= r; re <= 1;
    exp_l.push_back(l); exp_r.push_back(r);
  end else re <= 0;

  always @(negedge bit_clk) begin
    if (sync && !prev_sync) begin
      if (nbits == 256) begin
        // a complete frame in sh, bit 255 first
        frames++;
        checks++;
        if (sh[255:251] != 5'b11111 || sh[250:240] != 0) begin failures++; $display("tag %h", sh[255:240]); end
        if (sh[238:232] == 7'h02) n_cmd02++;
        if (sh[238:232] == 7'h18) n_cmd18++;
        checks++;
        if (sh[219:217] != 0 || sh[216:212] != 5'd11 || sh[208:204] != 5'd11) begin
          failures++; $display("volume word %h", sh[219:200]);
        end
        if (frames > 2) begin
          logic [15:0] el, er;
          el = exp_l.pop_front(); er = exp_r.pop_front();
          checks++;
          if (sh[199:184] != el || sh[179:164] != er || sh[183:180] != 0) begin
            failures++; $display("frame %0d pcm %h %h exp %h %h", frames, sh[199:184], sh[179:164], el, er);
          end
        end
      end
      nbits = 0;
    end
    prev_sync <= sync;
    if (nbits >= 0) begin sh = {sh[254:0], sdo}; nbits++; end
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    wait (frames == 12);
    checks++; if (n_cmd02 == 0 || n_cmd18 == 0) begin failures++; $display("commands %0d %0d", n_cmd02, n_cmd18); end
    checks++; if (!rst_n) begin failures++; $display("codec held in reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
