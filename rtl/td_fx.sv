// td_fx: time-domain effects with a channel patchboard.
//
// Output channels (sources): 0 = synthesiser, 1..15 = sampler units, then
// one per effects unit: 16 FIR, 17 gain, 18 mixdown, 19 echo.  Input
// channels (sinks): 0 FIR in, 1 gain in, 2 gain control, 3 mix A, 4 mix B,
// 5 echo in, 6 left out, 7 right out.  The patchboard holds, for every sink,
// the source channel it listens to.
//
// Channel values arrive as two-word packets {8'h00, channel}, value and are
// held in a value table.  On each audio frame tick (`ready`) every unit
// reads its inputs from the table as they stood and writes its result back
// to its own output channel, so each unit adds exactly one frame of delay
// and any unit can feed any other in any order.  The same tick presents
// the values patched to sinks 6 and 7 as left/right with out_re high.
//   FIR:   8 taps, Q1.15 coefficients (reset: a plain pass-through).
//   Gain:  Q8.8 gain.  In mode 1 the gain is also scaled by (1 - e), e being
//          a smoothed absolute value of the control sink, which makes a
//          compressor when the control is the unit's own input and a
//          side-chain ducker when it is another channel.
//   Mix:   two inputs, Q8.8 weights.
//   Echo:  delay line of EDEPTH samples, delay, feedback and wet level.
// Parameters are set with four-byte packets: unit channel, parameter number,
// value[15:8], value[7:0].  Channel 255 addresses the patchboard itself:
// parameter = sink, value = source channel.
// The patchboard, the unit list, one frame of latency per unit and the
// control channels follow the design description; the channel numbering
// of the effects, the parameter numbers, tap count, arithmetic formats and
// the absolute-value envelope (for RMS) are this design's own choices.
module td_fx #(
  parameter int unsigned EDEPTH = 4096
) (
  input  logic        clk,
  input  logic        rst,
  pkt_bus.rx          ch_in,     // W = 16, 2-word packets
  pkt_bus.rx          par_in,    // W = 8, 4-word packets
  input  logic        ready,
  output logic [15:0] left,
  output logic [15:0] right,
  output logic        out_re
);
  localparam int unsigned NOUT = 20;
  localparam int unsigned NIN  = 8;
  localparam int unsigned EW   = $clog2(EDEPTH);
  localparam logic [7:0] CH_FIR = 8'd16, CH_GAIN = 8'd17, CH_MIX = 8'd18, CH_ECHO = 8'd19;

  logic signed [15:0] chval [NOUT];
  logic [7:0]         route [NIN];

  // ---------------- channel packets ----------------
  logic       ch_second;
  logic [7:0] ch_num;
  assign ch_in.woe = 1'b1;

  // ---------------- parameter packets ----------------
  logic [1:0]  pidx;
  logic [7:0]  p_unit, p_num, p_hi;
  logic        p_on;
  assign par_in.woe = 1'b1;

  logic signed [15:0] fir_c [8];
  logic signed [15:0] fir_h [8];
  logic signed [15:0] gain_g;
  logic               gain_mode;
  logic [15:0]        gain_env;
  logic signed [15:0] mix_a, mix_b;
  logic [EW-1:0]      echo_delay;
  logic [7:0]         echo_fb, echo_wet;
  logic signed [15:0] echo_mem [EDEPTH];
  logic [EW-1:0]      echo_wp;
  logic               echo_clr;    // after reset: sweep the delay line to zero
  logic [EW-1:0]      echo_ci;

  function automatic logic signed [15:0] sat(input logic signed [39:0] v);
    if (v > 40'sd32767)       return 16'sd32767;
    else if (v < -40'sd32767) return -16'sd32767;
    else                      return v[15:0];
  endfunction

  function automatic logic signed [15:0] sink(input int s);
    logic [7:0] r;
    r = route[s];
    return (r < 8'(NOUT)) ? chval[r[4:0]] : 16'sd0;
  endfunction

  // ---------------- unit arithmetic (combinational) ----------------
  logic signed [15:0] x_fir, x_gain, x_ctl, x_ma, x_mb, x_echo, d_echo;
  logic signed [39:0] fir_acc, gain_p, mix_p, echo_y, echo_w;
  logic [15:0]        ctl_abs;
  logic [16:0]        g_scale;

  always_comb begin
    x_fir  = sink(0);
    x_gain = sink(1);
    x_ctl  = sink(2);
    x_ma   = sink(3);
    x_mb   = sink(4);
    x_echo = sink(5);
    fir_acc = 40'(x_fir) * 40'(fir_c[0]);
    for (int t = 1; t < 8; t++) fir_acc += 40'(fir_h[t-1]) * 40'(fir_c[t]);
    ctl_abs = x_ctl[15] ? 16'(-x_ctl) : 16'(x_ctl);
    g_scale = gain_mode ? 17'(17'd32768 - 17'(gain_env[15:1])) : 17'd32768;
    gain_p  = (((40'(x_gain) * 40'(gain_g)) >>> 8) * $signed({23'd0, g_scale})) >>> 15;
    mix_p   = (40'(x_ma) * 40'(mix_a) + 40'(x_mb) * 40'(mix_b)) >>> 8;
    d_echo  = echo_mem[EW'(echo_wp - echo_delay)];
    echo_y  = 40'(x_echo) + ((40'(d_echo) * $signed({32'd0, echo_wet})) >>> 8);
    echo_w  = 40'(x_echo) + ((40'(d_echo) * $signed({32'd0, echo_fb})) >>> 8);
  end

  always_ff @(posedge clk) begin
    out_re <= 1'b0;
    if (rst) begin
      for (int i = 0; i < NOUT; i++) chval[i] <= '0;
      for (int i = 0; i < NIN; i++) route[i] <= 8'd0;
      for (int t = 0; t < 8; t++) begin fir_c[t] <= '0; fir_h[t] <= '0; end
      fir_c[0] <= 16'sh7fff;
      gain_g <= 16'sd256; gain_mode <= 1'b0; gain_env <= '0;
      mix_a <= 16'sd128; mix_b <= 16'sd128;
      echo_delay <= EW'(EDEPTH / 2); echo_fb <= 8'd0; echo_wet <= 8'd128; echo_wp <= '0;
      ch_second <= 1'b0; ch_num <= '0;
      pidx <= '0; p_on <= 1'b0; p_unit <= '0; p_num <= '0; p_hi <= '0;
      left <= '0; right <= '0; echo_clr <= 1'b1; echo_ci <= '0;
    end else begin
      if (echo_clr) begin
        echo_mem[echo_ci] <= '0;
        echo_ci <= echo_ci + 1'b1;
        if (echo_ci == EW'(EDEPTH - 1)) echo_clr <= 1'b0;
      end
      // channel values
      if (ch_in.re && ch_in.woe) begin
        if (ch_in.start) begin ch_num <= ch_in.data[7:0]; ch_second <= 1'b1; end
        else if (ch_second) begin
          if (ch_num < CH_FIR) chval[ch_num[4:0]] <= $signed(ch_in.data);
          ch_second <= 1'b0;
        end
      end
      // parameters
      if (par_in.re && par_in.woe) begin
        if (par_in.start) begin p_unit <= par_in.data; pidx <= 2'd1; p_on <= 1'b1; end
        else if (p_on) begin
          pidx <= pidx + 1'b1;
          if (pidx == 2'd1) p_num <= par_in.data;
          if (pidx == 2'd2) p_hi <= par_in.data;
          if (pidx == 2'd3) begin
            logic [15:0] v;
            v = {p_hi, par_in.data};
            p_on <= 1'b0;
            unique case (p_unit)
              8'd255:  if (p_num < 8'(NIN)) route[p_num[2:0]] <= v[7:0];
              CH_FIR:  if (p_num < 8'd8) fir_c[p_num[2:0]] <= $signed(v);
              CH_GAIN: if (p_num == 0) gain_g <= $signed(v); else gain_mode <= v[0];
              CH_MIX:  if (p_num == 0) mix_a <= $signed(v); else mix_b <= $signed(v);
              CH_ECHO: if (p_num == 0) echo_delay <= EW'(v);
                       else if (p_num == 1) echo_fb <= v[7:0];
                       else echo_wet <= v[7:0];
              default: ;
            endcase
          end
        end
      end
      // one frame of every unit
      if (ready && !echo_clr) begin
        chval[CH_FIR[4:0]]  <= sat(fir_acc >>> 15);
        chval[CH_GAIN[4:0]] <= sat(gain_p);
        chval[CH_MIX[4:0]]  <= sat(mix_p);
        chval[CH_ECHO[4:0]] <= sat(echo_y);
        fir_h[0] <= x_fir;
        for (int t = 1; t < 8; t++) fir_h[t] <= fir_h[t-1];
        gain_env <= gain_env - (gain_env >> 6) + (ctl_abs >> 6);
        echo_mem[echo_wp] <= sat(echo_w);
        echo_wp <= echo_wp + 1'b1;
        left   <= sink(6);
        right  <= sink(7);
        out_re <= 1'b1;
      end
    end
  end
endmodule
