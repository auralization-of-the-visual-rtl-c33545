// video_input_xlate: turns colour peaks into sound and sprite rules into
// triggers.
//
// Colour: the latest {hue, saturation, brightness} of every grid cell is
// kept.  On each band_step the selected vertical band advances by one
// (cycling across the image) and a sample packet for the sequencer is
// built from its NOSC cells, one oscillator per cell:
//   header: {NOSC*NHARM, 8'h00, pending sampler address (0 = none)}
//   then for oscillator o and harmonic n = 1..NHARM: {bin, value} with
//   bin = n * f0(hue), f0 from a 256-entry hue-to-pitch table (a rising
//   scale of 2^(hue/64), four octaves from F0BIN), and value = 16 * w(u),
//   w a 1024-entry window table (a Welch window, w = 255*(1-d^2)) placed on
//   the harmonic axis: its centre is at harmonic brightness*NHARM/256 and
//   its half-width is 2^(saturation[7:5]) harmonics.  Bins beyond 16 bits
//   are sent as 0xFFFF, which the sequencer drops.
// Rules: each three-byte rule packet {rule, value[13:8], value[7:0]} with a
// non-zero value looks the rule up in an 8-entry table: a tempo rule gives
// a tempo pulse, a trigger rule makes its sampler address pending for the
// next sample packet.  Table default (matching sprite_detect's rules):
// rule 0 -> sampler address 1, rule 1 -> address 2, rule 2 -> nothing,
// rule 3 -> tempo, rules 4..7 -> address r; it can be rewritten through
// cfg_we/cfg_rule/cfg_data.
// Timing: a packet is 1 + NOSC*NHARM words at one word per clock.
// The mapping of hue to pitch, of brightness and saturation to a window on
// the harmonics, the two lookup tables and the rule table follow the design
// description; the table contents, the window placement, the packet header
// and the rule table format are this design's own choices.
module video_input_xlate #(
  parameter int unsigned NOSC  = 16,
  parameter int unsigned NHARM = 128,
  parameter int unsigned NV    = 16,
  parameter int unsigned F0BIN = 150   // about 110 Hz at 0.73 Hz per bin
) (
  input  logic        clk,
  input  logic        rst,
  pkt_bus.rx          csa_in,     // W = 8, 4 words
  pkt_bus.rx          rule_in,    // W = 8, 3 words
  input  logic        band_step,
  pkt_bus.tx          smp_out,    // W = 32
  output logic        tempo_out,
  output logic [3:0]  band_sel,
  input  logic        cfg_we,
  input  logic [2:0]  cfg_rule,
  input  logic [9:0]  cfg_data    // {kind[1:0], sampler address[7:0]}; kind 1 trigger, 2 tempo
);
  localparam int unsigned OW = (NOSC > 1) ? $clog2(NOSC) : 1;
  localparam int unsigned NW = $clog2(NHARM + 1);
  localparam int unsigned VW = (NV > 1) ? $clog2(NV) : 1;

  // ---------------- tables ----------------
  function automatic logic [15:0] hue_freq(input int h);
    longint r;
    r = longint'(1) << 30;
    for (int i = 0; i < h % 64; i++) r = (r * 64'd1085434106 + (longint'(1) << 29)) >> 30;   // 2^(1/64) in Q30
    return 16'((((longint'(F0BIN) * r) << (h / 64)) + (longint'(1) << 29)) >> 30);
  endfunction
  function automatic logic [7:0] welch(input int u);
    int d;
    d = u - 512;
    return 8'(255 - (255 * d * d) / (512 * 512));
  endfunction

  logic [15:0] f_lut [256];
  logic [7:0]  w_lut [1024];
  initial begin
    for (int h = 0; h < 256; h++) f_lut[h] = hue_freq(h);
    for (int u = 0; u < 1024; u++) w_lut[u] = welch(u);
  end

  // ---------------- cell table ----------------
  logic [23:0] cell_tab [256];
  logic [7:0]  c_addr, c_h, c_s;
  logic [1:0]  c_idx;
  logic        c_on;
  assign csa_in.woe = 1'b1;

  // ---------------- rules ----------------
  logic [9:0]  rtab [8];
  logic [7:0]  r_addr;
  logic [5:0]  r_hi;
  logic [1:0]  r_idx;
  logic        r_on;
  logic [7:0]  trig_pend;
  assign rule_in.woe = 1'b1;

  // ---------------- packet builder ----------------
  logic        sending, hdr;
  logic [OW-1:0] osc;
  logic [NW-1:0] hn;           // harmonic number 1..NHARM
  logic [23:0] hsb;
  logic [31:0] bin_full;
  logic signed [19:0] hdist;
  logic [7:0]  wv;
  logic [2:0]  e;
  logic [15:0] ctr;

  always_comb begin
    hsb      = cell_tab[8'(32'(osc) * NV + 32'(band_sel))];
    bin_full = 32'(hn) * 32'(f_lut[hsb[23:16]]);
    ctr      = 16'((32'(hsb[7:0]) * NHARM) >> 8);
    e        = hsb[15:13];
    hdist    = ($signed(20'(hn)) - 20'sd1 - $signed(20'(ctr))) <<< 9 >>> e;
    if (hdist <= -20'sd512 || hdist >= 20'sd512) wv = 8'd0;
    else wv = w_lut[10'(hdist + 20'sd512)];
  end

  assign smp_out.re    = sending;
  assign smp_out.start = hdr;
  assign smp_out.data  = hdr ? {16'(NOSC * NHARM), 8'h00, trig_pend}
                             : {(bin_full > 32'hffff) ? 16'hffff : bin_full[15:0], 4'h0, wv, 4'h0};

  always_ff @(posedge clk) begin
    tempo_out <= 1'b0;
    if (rst) begin
      c_idx <= '0; c_on <= 1'b0; c_addr <= '0; c_h <= '0; c_s <= '0;
      r_idx <= '0; r_on <= 1'b0; r_addr <= '0; r_hi <= '0; trig_pend <= '0;
      // default: crossings trigger sampler addresses 1 and 2, presence
      // alone does nothing, entering the area is a tempo pulse
      rtab[0] <= {2'd1, 8'd1}; rtab[1] <= {2'd1, 8'd2};
      rtab[2] <= {2'd0, 8'd0}; rtab[3] <= {2'd2, 8'd0};
      for (int r = 4; r < 8; r++) rtab[r] <= {2'd1, 8'(r)};
      sending <= 1'b0; hdr <= 1'b0; osc <= '0; hn <= NW'(1); band_sel <= '0;
    end else begin
      if (cfg_we) rtab[cfg_rule] <= cfg_data;
      // colour peaks
      if (csa_in.re && csa_in.woe) begin
        if (csa_in.start) begin c_addr <= csa_in.data; c_idx <= 2'd1; c_on <= 1'b1; end
        else if (c_on) begin
          c_idx <= c_idx + 1'b1;
          if (c_idx == 2'd1) c_h <= csa_in.data;
          if (c_idx == 2'd2) c_s <= csa_in.data;
          if (c_idx == 2'd3) begin cell_tab[c_addr] <= {c_h, c_s, csa_in.data}; c_on <= 1'b0; end
        end
      end
      // rules
      if (rule_in.re && rule_in.woe) begin
        if (rule_in.start) begin r_addr <= rule_in.data; r_idx <= 2'd1; r_on <= 1'b1; end
        else if (r_on) begin
          r_idx <= r_idx + 1'b1;
          if (r_idx == 2'd1) r_hi <= rule_in.data[5:0];
          if (r_idx == 2'd2) begin
            r_on <= 1'b0;
            if (r_addr < 8'd8 && {r_hi, rule_in.data} != 14'd0) begin
              if (rtab[r_addr[2:0]][9:8] == 2'd2) tempo_out <= 1'b1;
              if (rtab[r_addr[2:0]][9:8] == 2'd1) trig_pend <= rtab[r_addr[2:0]][7:0];
            end
          end
        end
      end
      // sample packets
      if (band_step && !sending) begin
        band_sel <= (32'(band_sel) == NV - 1) ? 4'd0 : band_sel + 1'b1;
        sending <= 1'b1; hdr <= 1'b1; osc <= '0; hn <= NW'(1);
      end else if (sending && smp_out.woe) begin
        if (hdr) begin
          hdr <= 1'b0; trig_pend <= '0;
        end else if (hn == NW'(NHARM)) begin
          hn <= NW'(1);
          if (osc == OW'(NOSC - 1)) sending <= 1'b0;
          else osc <= osc + 1'b1;
        end else begin
          hn <= hn + 1'b1;
        end
      end
    end
  end
endmodule
