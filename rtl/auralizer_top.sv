// auralizer_top: the complete auralizer, from decoded video and user
// controls to the AC'97 codec link.
//
// Video path: video_decoder turns YCrCb pixels into hue, saturation and
// brightness with pixel coordinates.  csa averages each grid cell and
// reports the colour peaks of every finished band; sprite_detect tracks a
// coloured object and reports rule events.  video_input_xlate turns the
// colours of one vertical band (advanced on every tempo pulse) into a
// sample packet of sinusoid coefficients, turns rules into sampler
// triggers or tempo pulses, and hands the packet to the sequencer.
// Controls: hw_input_xlate maps switches and buttons to the sequencer's
// control word, a tempo pulse (internal or from video), the
// frequency-domain effect settings and time-domain effect parameter
// packets.  Audio path: sequencer (sample memory and step sequencer) ->
// fd_fx (frequency-domain filter and reverb) -> audio_ifft (additive
// synthesis) -> channel_mapper, which merges the synthesiser with the
// sampler's drum units -> td_fx (patchboard effects) -> audio_encoder
// (AC'97).  The codec's frame tick (`ready`, 48 kHz) paces the mapper, the
// sampler and the effects.  All blocks talk over word-serial pkt_bus
// handshakes inside this module; its ports are plain signals.
//
// Not included: the analogue NTSC decoder in front (pixels arrive here
// already decoded as YCrCb with line and frame markers), the AC'97 codec
// chip, and the external ZBT memory (all storage is on chip).  The
// configuration port writes one of three tables, selected by cfg_sel:
// 0 fd_fx filter response (addr, data[7:0]), 1 channel_mapper source map
// (addr, data[7:0]), 2 video rule table (addr[2:0], data[9:0]).  Status
// outputs expose the mechanisms for observation.  The block partition
// follows the design description; the configuration port, status outputs
// and the tempo-to-band-step connection are this design's own.
module auralizer_top #(
  parameter int unsigned H_PIX     = 1024,
  parameter int unsigned V_PIX     = 768,
  parameter int unsigned CSA_WIN   = 32,
  parameter int unsigned NOSC      = 16,
  parameter int unsigned NHARM     = 128,
  parameter int unsigned F0BIN     = 150,
  parameter int unsigned LOGN      = 16,
  parameter int unsigned M         = 800,
  parameter int unsigned NSU       = 15,
  parameter int unsigned SLEN      = 2048,
  parameter int unsigned EDEPTH    = 4096,
  parameter int unsigned TEMPO_DIV = 8_500_000,
  parameter int unsigned RST_CYC   = 64
) (
  input  logic        clk,
  input  logic        rst,
  // decoded video (from the NTSC decoder)
  input  logic [7:0]  y_in,
  input  logic [7:0]  cr_in,
  input  logic [7:0]  cb_in,
  input  logic        pix_valid,
  input  logic        hsync_in,
  input  logic        vsync_in,
  // user controls
  input  logic [7:0]  sw,
  input  logic [5:0]  buttons,
  input  logic        mode_sw,
  input  logic        tempo_src,
  input  logic [2:0]  tempo_sel,
  input  logic [1:0]  fx_sw,
  input  logic [7:0]  knob,
  input  logic [31:0] user_io,
  input  logic [4:0]  volume,
  // table configuration
  input  logic        cfg_we,
  input  logic [1:0]  cfg_sel,
  input  logic [7:0]  cfg_addr,
  input  logic [9:0]  cfg_data,
  // AC'97 codec link
  input  logic        ac97_bit_clk,
  input  logic        ac97_sdata_in,
  output logic        ac97_sync,
  output logic        ac97_sdata_out,
  output logic        ac97_reset_n,
  // status
  output logic [3:0]  band_sel,
  output logic [3:0]  step_ptr,
  output logic        tempo,
  output logic        csa_busy,
  output logic        csa_overrun,
  output logic        new_window,
  output logic        replay,
  output logic        audio_re,
  output logic [15:0] audio_left,
  output logic [15:0] audio_right,
  output logic [7:0]  n_voices,
  output logic [7:0]  n_sprite_dropped
);
  localparam int unsigned LOGNB = LOGN - 1;

  pkt_bus #(.W(8))  csa_bus  (.clk, .rst);
  pkt_bus #(.W(8))  rule_bus (.clk, .rst);
  pkt_bus #(.W(32)) smp_bus  (.clk, .rst);
  pkt_bus #(.W(16)) spec_bus (.clk, .rst);
  pkt_bus #(.W(8))  sa_bus   (.clk, .rst);
  pkt_bus #(.W(16)) fx_bus   (.clk, .rst);
  pkt_bus #(.W(16)) win_bus  (.clk, .rst);
  pkt_bus #(.W(16)) ch_bus   (.clk, .rst);
  pkt_bus #(.W(8))  par_bus  (.clk, .rst);

  logic [7:0]  hue, sat, bri;
  logic [10:0] px;
  logic [9:0]  py;
  logic        pv, hs, vs;
  logic        video_tempo, smp_ready, su_valid;
  logic        filter_en, reverb_en;
  logic [7:0]  decay;
  logic signed [15:0] su_out [NSU];
  aural_pkg::seq_ctrl_t ctrl;

  video_decoder u_dec (.clk, .rst, .y_in, .cr_in, .cb_in, .pix_valid, .hsync_in, .vsync_in,
    .hue, .saturation(sat), .brightness(bri), .pixel_x(px), .pixel_y(py), .out_valid(pv),
    .hsync(hs), .vsync(vs));

  csa #(.H_PIX(H_PIX), .V_PIX(V_PIX), .NV(aural_pkg::N_VBAND), .NH(aural_pkg::N_HBAND), .WIN(CSA_WIN)) u_csa (
    .clk, .rst, .hue, .saturation(sat), .brightness(bri), .pixel_x(px), .pixel_y(py),
    .pix_valid(pv), .out_bus(csa_bus), .busy(csa_busy), .overrun(csa_overrun));

  sprite_detect #(.H_PIX(H_PIX), .V_PIX(V_PIX)) u_spr (.clk, .rst, .hue, .saturation(sat),
    .brightness(bri), .pixel_x(px), .pixel_y(py), .pix_valid(pv), .vsync(vs),
    .out_bus(rule_bus), .n_dropped(n_sprite_dropped));

  video_input_xlate #(.NOSC(NOSC), .NHARM(NHARM), .NV(aural_pkg::N_VBAND), .F0BIN(F0BIN)) u_vix (
    .clk, .rst, .csa_in(csa_bus), .rule_in(rule_bus), .band_step(ctrl.tempo),
    .smp_out(smp_bus), .tempo_out(video_tempo), .band_sel,
    .cfg_we(cfg_we && cfg_sel == 2'd2), .cfg_rule(cfg_addr[2:0]), .cfg_data);

  hw_input_xlate #(.TEMPO_DIV(TEMPO_DIV)) u_hw (.clk, .rst, .sw, .buttons, .mode_sw,
    .tempo_src, .tempo_sel, .video_tempo, .fx_sw, .knob, .user_io, .ctrl, .filter_en,
    .reverb_en, .decay, .par_out(par_bus));

  sequencer #(.NMAX(NOSC * NHARM), .LOGNB(LOGNB)) u_seq (.clk, .rst, .smp_in(smp_bus), .ctrl,
    .spec_out(spec_bus), .sa_out(sa_bus), .step_ptr);

  fd_fx #(.LOGNB(LOGNB)) u_fdfx (.clk, .rst, .in_bus(spec_bus), .out_bus(fx_bus), .filter_en,
    .reverb_en, .decay, .resp_we(cfg_we && cfg_sel == 2'd0), .resp_addr(cfg_addr),
    .resp_data(cfg_data[7:0]));

  audio_ifft #(.LOGN(LOGN), .M(M)) u_ifft (.clk, .rst, .in_bus(fx_bus), .out_bus(win_bus),
    .new_window, .replay);

  sampler #(.NSU(NSU), .SLEN(SLEN)) u_smp (.clk, .rst, .start_in(sa_bus), .ready(smp_ready),
    .su_out, .out_valid(su_valid), .n_started(n_voices));

  channel_mapper #(.NS(NSU)) u_map (.clk, .rst, .ifft_in(win_bus), .ready(smp_ready), .su_out,
    .su_valid, .out_bus(ch_bus), .map_we(cfg_we && cfg_sel == 2'd1), .map_addr(cfg_addr),
    .map_data(cfg_data[7:0]));

  td_fx #(.EDEPTH(EDEPTH)) u_tdfx (.clk, .rst, .ch_in(ch_bus), .par_in(par_bus),
    .ready(smp_ready), .left(audio_left), .right(audio_right), .out_re(audio_re));

  audio_encoder #(.RST_CYC(RST_CYC)) u_enc (.clk, .rst, .left(audio_left), .right(audio_right),
    .re(audio_re), .volume, .ready(smp_ready), .ac97_bit_clk, .ac97_sdata_in, .ac97_sync,
    .ac97_sdata_out, .ac97_reset_n);

  assign tempo = ctrl.tempo;
endmodule
