// sampler: drum-machine sample playback.
//
// NSU sample units (SU), each a ROM holding one drum sound and NCNT
// {active, counter} voices.  A one-word start packet carrying a sample
// address starts a voice in the SU whose address matches (SU i answers to
// address BASE + i): the first free voice, or the oldest one (highest count)
// when all are busy.  On every audio frame tick (`ready`) each SU walks its
// voices, one per clock, adding ROM[counter] of each active voice; after
// NCNT clocks every SU's sum is presented, saturated to 16 bits, with
// out_valid high for one clock, and every active counter advances.  A
// voice that reaches the end of its sound is freed.
//
// The ROMs hold synthetic sounds computed at elaboration (decaying square
// tones on even units, decaying pseudo-noise on odd units), standing in for
// recorded drum samples; their formula is in drum_val below.  Voice
// allocation, per-frame accumulation and the ROM-per-SU structure follow the
// design description; NCNT, SLEN, BASE and the sounds are this design's own.
module sampler #(
  parameter int unsigned NSU  = 15,     // sampler channels 1..15
  parameter int unsigned NCNT = 4,
  parameter int unsigned SLEN = 2048,
  parameter int unsigned BASE = 1
) (
  input  logic               clk,
  input  logic               rst,
  pkt_bus.rx                 start_in,   // W = 8
  input  logic               ready,
  output logic signed [15:0] su_out [NSU],
  output logic               out_valid,
  output logic [7:0]         n_started   // voices started (wraps)
);
  localparam int unsigned CW = $clog2(SLEN);
  localparam int unsigned VW = (NCNT > 1) ? $clog2(NCNT) : 1;

  function automatic logic signed [15:0] drum_val(input int su, input int n);
    int env, half, v;
    env  = int'((longint'(SLEN - n) * (SLEN - n) * 16383) / (longint'(SLEN) * SLEN));
    half = 4 + 3 * su;
    if (su % 2 == 0) v = ((n / half) % 2 == 1) ? env : -env;
    else             v = (((n * 1103515245 + su * 12345) >>> 12) % 2 == 1) ? env : -env;
    return 16'(v);
  endfunction

  logic signed [15:0] rom [NSU][SLEN];
  initial
    for (int i = 0; i < NSU; i++)
      for (int n = 0; n < SLEN; n++)
        rom[i][n] = drum_val(i, n);

  logic [CW-1:0] cnt [NSU][NCNT];
  logic          act [NSU][NCNT];
  logic signed [19:0] acc [NSU];
  logic [VW:0]   phase;
  logic          running;

  assign start_in.woe = 1'b1;

  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (rst) begin
      running <= 1'b0; phase <= '0; n_started <= '0;
      for (int i = 0; i < NSU; i++) begin
        acc[i] <= '0; su_out[i] <= '0;
        for (int c = 0; c < NCNT; c++) begin act[i][c] <= 1'b0; cnt[i][c] <= '0; end
      end
    end else begin
      if (ready && !running) begin
        running <= 1'b1; phase <= '0;
        for (int i = 0; i < NSU; i++) acc[i] <= '0;
      end else if (running) begin
        if (phase == (VW+1)'(NCNT)) begin
          running <= 1'b0; out_valid <= 1'b1;
          for (int i = 0; i < NSU; i++) begin
            su_out[i] <= (acc[i] > 20'sd32767) ? 16'sd32767 : (acc[i] < -20'sd32767) ? -16'sd32767 : acc[i][15:0];
            for (int c = 0; c < NCNT; c++)
              if (act[i][c]) begin
                if (cnt[i][c] == CW'(SLEN - 1)) act[i][c] <= 1'b0;
                else cnt[i][c] <= cnt[i][c] + 1'b1;
              end
          end
        end else begin
          for (int i = 0; i < NSU; i++)
            if (act[i][VW'(phase)]) acc[i] <= acc[i] + 20'(rom[i][cnt[i][VW'(phase)]]);
          phase <= phase + 1'b1;
        end
      end
      // voice allocation (after the frame update, so a restart wins)
      if (start_in.re && start_in.woe) begin
        for (int i = 0; i < NSU; i++)
          if (start_in.data == 8'(BASE + i)) begin
            int pick, oldest;
            logic found;
            found = 1'b0; pick = 0; oldest = 0;
            for (int c = 0; c < NCNT; c++) begin
              if (!act[i][c] && !found) begin found = 1'b1; pick = c; end
              if (cnt[i][c] > cnt[i][oldest]) oldest = c;
            end
            if (!found) pick = oldest;
            act[i][pick] <= 1'b1;
            cnt[i][pick] <= '0;
            n_started <= n_started + 1'b1;
          end
      end
    end
  end
endmodule
