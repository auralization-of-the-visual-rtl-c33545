// audio_ifft: additive synthesiser built on a CORDIC-based radix-2^2
// single-path delay-feedback (R2^2SDF) transform.
//
// Input: a packet of N/2 unsigned 16-bit coefficients a_k, one per positive
// frequency bin (real parts only).  Output: packets of M signed 16-bit audio
// samples, one output window each, handed out one word per handshake.
//
// How it works.  A complete input packet is stored in one of two banks; a
// restarted or partial packet never disturbs the bank in use.  When a new
// set is complete and the spare output bank is free, a job runs: the N-point
// Hermitian spectrum is formed on the fly, each coefficient is turned in
// phase by 2*pi*k*D/N (the phase advance that keeps every partial continuous
// across windows; D is the audio sample index at which the target window
// will start), and the spectrum is pushed through LOGN/2 stage pairs
// (r22_stage) followed by N zeros to flush the delay lines.  The real part
// of the transform is
//     x[n] = a_0 + 2 * sum_k a_k * cos(2*pi*k*(n + D)/N)
// and arrives in bit-reversed order; only the first M samples of it are
// kept, written in natural order into the spare output bank and scaled by
// 2^-OSHIFT with saturation.  At the end of a window the output switches to
// the new bank if one is ready; otherwise the same window is played again,
// while D keeps advancing by M per window.
//
// Timing: a job takes 2N + about 2*LOGN*ITER clocks; one CORDIC rotates the
// inputs and one per stage pair applies twiddles, all fully pipelined.
// The R2^2SDF structure, the CORDIC, the phase advance, input buffering and
// the replay on missing input follow the design description; the separate
// CORDIC per stage (instead of one time-shared unit), on-chip delay lines
// instead of external SRAM, the output scaling and the exact window hand-off
// are this design's own choices.
module audio_ifft #(
  parameter int unsigned LOGN   = 16,   // N = 65536 point transform
  parameter int unsigned M      = 800,  // output window, samples
  parameter int unsigned OSHIFT = 6,
  parameter int unsigned PW     = 24,
  parameter int unsigned ITER   = 18
) (
  input  logic clk,
  input  logic rst,
  pkt_bus.rx   in_bus,     // W = 16, N/2 words per packet
  pkt_bus.tx   out_bus,    // W = 16, M words per packet
  output logic new_window, // pulse: a freshly computed window starts playing
  output logic replay      // pulse: a window is played again (no new set)
);
  localparam int unsigned N    = 1 << LOGN;
  localparam int unsigned NH   = N / 2;
  localparam int unsigned DW   = LOGN + 18;
  localparam int unsigned MW   = $clog2(M);

  // ---------------- input banks ----------------
  logic [15:0]       ibuf [2][NH];
  logic              wr_bank, rd_bank, job_bank;
  logic [LOGN-2:0]   wr_idx;
  logic              receiving;
  logic              params_new;
  logic              busy;

  assign in_bus.woe = !(busy && (wr_bank == job_bank));

  logic             job_start;   // a job begins (job feed below)

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_bank <= 1'b0; rd_bank <= 1'b1; wr_idx <= '0; receiving <= 1'b0;
      params_new <= 1'b0;
    end else begin
      if (in_bus.re && in_bus.woe && (in_bus.start || receiving)) begin
        logic [LOGN-2:0] idx;
        idx = in_bus.start ? '0 : wr_idx;
        ibuf[wr_bank][idx] <= in_bus.data;
        wr_idx <= idx + 1'b1;
        receiving <= 1'b1;
        if (idx == (LOGN-1)'(NH - 1)) begin
          receiving  <= 1'b0;
          rd_bank    <= wr_bank;
          wr_bank    <= !wr_bank;
          params_new <= 1'b1;
        end
      end
      if (job_start) params_new <= 1'b0;
    end
  end

  // ---------------- job feed ----------------
  logic [LOGN:0]    t;           // 0 .. 2N-1
  logic             feeding;
  logic [LOGN-1:0]  job_delta;
  logic [LOGN-1:0]  play_delta;
  logic             have_out, filled;
  logic [LOGN-1:0]  tk, k;
  logic [15:0]      amp;
  logic [PW-1:0]    ph;
  logic signed [DW-1:0] fx;

  assign job_start = !busy && !filled && params_new;

  always_comb begin
    tk  = t[LOGN-1:0];
    k   = tk[LOGN-1] ? LOGN'(N - tk) : tk;          // mirror above N/2
    amp = (t[LOGN] || tk == LOGN'(NH)) ? 16'd0 : ibuf[job_bank][k[LOGN-2:0]];
    ph  = PW'(LOGN'(-(tk * job_delta))) << (PW - LOGN);
    fx  = DW'(amp);
  end

  logic cv;
  logic signed [DW-1:0] cr, ci;
  cordic_rot #(.W(DW), .PW(PW), .ITER(ITER)) u_rot (
    .clk, .rst, .in_valid(feeding), .x(fx), .y('0), .phase(ph),
    .out_valid(cv), .xo(cr), .yo(ci));

  always_ff @(posedge clk) begin
    if (rst) begin
      t <= '0; feeding <= 1'b0; job_bank <= 1'b0; job_delta <= '0;
    end else if (job_start) begin
      t <= '0; feeding <= 1'b1; job_bank <= rd_bank;
      job_delta <= have_out ? LOGN'(play_delta + LOGN'(M)) : play_delta;
    end else if (feeding) begin
      t <= t + 1'b1;
      if (t == (LOGN+1)'(2*N - 1)) feeding <= 1'b0;
    end
  end

  // ---------------- transform ----------------
  localparam int unsigned NS = LOGN / 2;
  logic                 sv [NS+1];
  logic signed [DW-1:0] sr [NS+1];
  logic signed [DW-1:0] si [NS+1];
  assign sv[0] = cv;
  assign sr[0] = cr;
  assign si[0] = ci;
  for (genvar s = 0; s < NS; s++) begin : g_st
    r22_stage #(.LOGN(LOGN), .S(s), .DW(DW), .PW(PW), .ITER(ITER)) u_st (
      .clk, .rst, .in_valid(sv[s]), .xr(sr[s]), .xi(si[s]),
      .out_valid(sv[s+1]), .yr(sr[s+1]), .yi(si[s+1]));
  end

  // ---------------- output capture ----------------
  logic [15:0]     obuf [2][M];
  logic            fill_bank, play_bank;
  logic [LOGN:0]   j;            // output position, 0..N-1 is the data frame
  logic [LOGN-1:0] bin;

  always_comb
    for (int b = 0; b < LOGN; b++) bin[b] = j[LOGN-1-b];

  function automatic logic [15:0] sat16(input logic signed [DW-1:0] v);
    logic signed [DW-1:0] s;
    s = v >>> OSHIFT;
    if (s > DW'(32767))       return 16'h7fff;
    else if (s < -DW'(32767)) return 16'h8001;
    else                      return s[15:0];
  endfunction

  // ---------------- playback ----------------
  logic [MW-1:0] pidx;
  assign out_bus.re    = have_out;
  assign out_bus.start = (pidx == '0);
  assign out_bus.data  = obuf[play_bank][pidx];

  always_ff @(posedge clk) begin
    new_window <= 1'b0;
    replay     <= 1'b0;
    if (rst) begin
      j <= (LOGN+1)'(N + 1); busy <= 1'b0; filled <= 1'b0; have_out <= 1'b0;
      fill_bank <= 1'b0; play_bank <= 1'b1; pidx <= '0; play_delta <= '0;
    end else begin
      if (job_start) busy <= 1'b1;
      if (sv[NS]) begin
        j <= j + 1'b1;
        if (!j[LOGN]) begin
          if (bin < LOGN'(M)) obuf[fill_bank][bin[MW-1:0]] <= sat16(sr[NS]);
          if (j[LOGN-1:0] == LOGN'(N - 1)) begin
            busy <= 1'b0;
            if (!have_out) begin
              have_out <= 1'b1; play_bank <= fill_bank; fill_bank <= !fill_bank;
              pidx <= '0; new_window <= 1'b1;
            end else begin
              filled <= 1'b1;
            end
          end
        end
      end
      if (out_bus.re && out_bus.woe) begin
        if (pidx == MW'(M - 1)) begin
          pidx <= '0;
          play_delta <= LOGN'(play_delta + LOGN'(M));
          if (filled) begin
            play_bank <= fill_bank; fill_bank <= !fill_bank; filled <= 1'b0;
            new_window <= 1'b1;
          end else begin
            replay <= 1'b1;
          end
        end else begin
          pidx <= pidx + 1'b1;
        end
      end
    end
  end
endmodule
