// sequencer: sample memory and step sequencer in front of the synthesiser.
//
// A "sample" is a sparse spectrum: a packet whose first word is a header
// {length[15:0], 8'h00, sampler_address[7:0]} followed by `length` words
// {bin[15:0], value[15:0]} (one per oscillator harmonic).  The latest
// complete sample is the "current input"; store_sample copies it into slot
// memory_address (NSLOT slots), clear_sample empties a slot.  Each of NSTEP
// steps plays a rest, the current input or a stored slot: store_step assigns
// slot memory_address to step step_address (the current input when
// play_sample is high at the same time), clear_step makes it a rest.
//
// Playing: in sequencer mode (mode_select = 1) every tempo pulse advances
// the step pointer and plays that step; in continuous mode every newly
// completed input is played; play_sample alone plays slot memory_address at
// once.  Playing scatters the sparse words into a bin buffer (values that land
// on one bin add, saturating), then streams NBINS = 2^LOGNB unsigned 16-bit
// words out as one spectrum packet, clearing each bin as it leaves.  A
// non-zero sampler address stored with the sample is sent at the same time
// as a one-word packet for the drum sampler.  A request that arrives while
// a spectrum is still being produced waits (one deep).
//
// Timing: `length` clocks of scatter plus NBINS clocks of output per step.
// Slot count, step count, the 4-bit addresses, 2048-word samples and the
// control set follow the design description; the header word, the encoding
// of "current input" and the one-deep request queue are this design's own.
module sequencer
  import aural_pkg::*;
#(
  parameter int unsigned NSLOT = 16,
  parameter int unsigned NSTEP = 16,
  parameter int unsigned NMAX  = 2048,   // 16 oscillators x 128 harmonics
  parameter int unsigned LOGNB = 15      // 2^15 bins for a 2^16 point IFFT
) (
  input  logic      clk,
  input  logic      rst,
  pkt_bus.rx        smp_in,    // W = 32
  input  seq_ctrl_t ctrl,
  pkt_bus.tx        spec_out,  // W = 16, 2^LOGNB words
  pkt_bus.tx        sa_out,    // W = 8, one word
  output logic [$clog2(NSTEP)-1:0] step_ptr
);
  localparam int unsigned NB = 1 << LOGNB;
  localparam int unsigned AW = $clog2(NMAX);
  localparam int unsigned SW = $clog2(NSLOT);
  localparam int unsigned TW = $clog2(NSTEP);

  // ---------------- current input (two banks) ----------------
  logic [31:0]   cbuf [2][NMAX];
  logic          wbank, cbank;
  logic [AW:0]   clen, rlen, ridx;
  logic [7:0]    ctrig, rtrig;
  logic          rx_on, new_input;
  logic          job_on, job_cur, copy_on;

  assign smp_in.woe = !((job_on && job_cur) || copy_on);

  always_ff @(posedge clk) begin
    new_input <= 1'b0;
    if (rst) begin
      wbank <= 1'b0; cbank <= 1'b1; clen <= '0; ctrig <= '0; rx_on <= 1'b0;
      rlen <= '0; ridx <= '0; rtrig <= '0;
    end else if (smp_in.re && smp_in.woe) begin
      if (smp_in.start) begin
        rlen  <= (AW+1)'(smp_in.data[31:16] > 16'(NMAX) ? 16'(NMAX) : smp_in.data[31:16]);
        rtrig <= smp_in.data[7:0];
        ridx  <= '0;
        rx_on <= 1'b1;
        if (smp_in.data[31:16] == 16'd0) begin
          clen <= '0; ctrig <= smp_in.data[7:0]; cbank <= wbank; wbank <= !wbank;
          rx_on <= 1'b0; new_input <= 1'b1;
        end
      end else if (rx_on) begin
        cbuf[wbank][ridx[AW-1:0]] <= smp_in.data;
        ridx <= ridx + 1'b1;
        if (ridx + 1'b1 == rlen) begin
          clen <= rlen; ctrig <= rtrig; cbank <= wbank; wbank <= !wbank;
          rx_on <= 1'b0; new_input <= 1'b1;
        end
      end
    end
  end

  // ---------------- slots and steps ----------------
  logic [31:0]  smem [NSLOT][NMAX];
  logic [AW:0]  slen [NSLOT];
  logic [7:0]   strig [NSLOT];
  step_t        steps [NSTEP];
  logic [SW-1:0] copy_slot;
  logic [AW:0]   copy_idx;

  wire [SW-1:0] maddr = SW'(ctrl.memory_address);
  wire [TW-1:0] saddr = TW'(ctrl.step_address);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < NSLOT; s++) begin slen[s] <= '0; strig[s] <= '0; end
      for (int s = 0; s < NSTEP; s++) steps[s] <= '{kind: STEP_REST, slot: '0};
      copy_on <= 1'b0; copy_idx <= '0; copy_slot <= '0;
    end else begin
      if (ctrl.store_sample && !copy_on) begin
        copy_on <= 1'b1; copy_idx <= '0; copy_slot <= maddr;
        slen[maddr] <= '0;
      end else if (copy_on) begin
        if (copy_idx == clen) begin
          copy_on <= 1'b0; slen[copy_slot] <= clen; strig[copy_slot] <= ctrig;
        end else begin
          smem[copy_slot][copy_idx[AW-1:0]] <= cbuf[cbank][copy_idx[AW-1:0]];
          copy_idx <= copy_idx + 1'b1;
        end
      end
      if (ctrl.clear_sample && !(ctrl.store_sample && !copy_on)) slen[maddr] <= '0;
      if (ctrl.store_step)
        steps[saddr] <= ctrl.play_sample ? '{kind: STEP_CURRENT, slot: 4'(maddr)}
                                         : '{kind: STEP_SLOT,    slot: 4'(maddr)};
      else if (ctrl.clear_step)
        steps[saddr] <= '{kind: STEP_REST, slot: '0};
    end
  end

  // ---------------- play requests ----------------
  step_kind_e   req_kind, pend_kind, job_kind;
  logic [SW-1:0] req_slot, pend_slot, job_slot;
  logic          req, pend;

  always_comb begin
    req = 1'b0; req_kind = STEP_REST; req_slot = '0;
    if (ctrl.mode_select && ctrl.tempo) begin
      req = 1'b1;
      req_kind = steps[TW'(step_ptr + 1'b1)].kind;
      req_slot = SW'(steps[TW'(step_ptr + 1'b1)].slot);
    end else if (!ctrl.mode_select && new_input) begin
      req = 1'b1; req_kind = STEP_CURRENT;
    end else if (ctrl.play_sample && !ctrl.store_step) begin
      req = 1'b1; req_kind = STEP_SLOT; req_slot = maddr;
    end
  end

  // ---------------- scatter and stream ----------------
  logic [15:0]  bin_mem [NB];
  logic         clearing;   // after reset: sweep the bin buffer to zero
  logic [AW:0]  jidx, jlen;
  logic         scatter, stream;
  logic [LOGNB:0] oidx;
  logic [31:0]  w;
  logic [16:0]  acc;
  logic         sa_pend;
  logic [7:0]   sa_val;

  assign w   = (job_kind == STEP_CURRENT) ? cbuf[cbank][jidx[AW-1:0]] : smem[job_slot][jidx[AW-1:0]];
  assign acc = 17'(bin_mem[w[16 +: LOGNB]]) + 17'(w[15:0]);

  assign spec_out.re    = stream;
  assign spec_out.start = (oidx == '0);
  assign spec_out.data  = bin_mem[oidx[LOGNB-1:0]];
  assign sa_out.re      = sa_pend;
  assign sa_out.start   = 1'b1;
  assign sa_out.data    = sa_val;

  always_ff @(posedge clk) begin
    if (rst) begin
      step_ptr <= '0; pend <= 1'b0; job_on <= 1'b0; job_cur <= 1'b0;
      scatter <= 1'b0; stream <= 1'b0; oidx <= '0; jidx <= '0; jlen <= '0;
      sa_pend <= 1'b0; sa_val <= '0; pend_kind <= STEP_REST; pend_slot <= '0;
      job_kind <= STEP_REST; job_slot <= '0; clearing <= 1'b1;
    end else if (clearing) begin
      bin_mem[oidx[LOGNB-1:0]] <= '0;
      oidx <= oidx + 1'b1;
      if (oidx == (LOGNB+1)'(NB - 1)) begin clearing <= 1'b0; oidx <= '0; end
    end else begin
      if (ctrl.mode_select && ctrl.tempo) step_ptr <= step_ptr + 1'b1;
      if (sa_out.re && sa_out.woe) sa_pend <= 1'b0;

      if (req && (job_on || pend)) begin
        pend <= 1'b1; pend_kind <= req_kind; pend_slot <= req_slot;
      end
      if (!job_on && (req || pend)) begin
        step_kind_e k;
        logic [SW-1:0] s;
        k = pend ? pend_kind : req_kind;
        s = pend ? pend_slot : req_slot;
        if (pend && !req) pend <= 1'b0;
        if (pend && req) begin pend_kind <= req_kind; pend_slot <= req_slot; end
        job_on <= 1'b1; job_kind <= k; job_slot <= s; job_cur <= (k == STEP_CURRENT);
        jidx <= '0; scatter <= 1'b1;
        jlen <= (k == STEP_CURRENT) ? clen : (k == STEP_SLOT) ? slen[s] : '0;
        if (k == STEP_CURRENT && ctrig != 0) begin sa_pend <= 1'b1; sa_val <= ctrig; end
        if (k == STEP_SLOT && strig[s] != 0) begin sa_pend <= 1'b1; sa_val <= strig[s]; end
      end
      if (scatter) begin
        if (jidx == jlen) begin
          scatter <= 1'b0; stream <= 1'b1; oidx <= '0;
        end else begin
          if (w[31:16] < 16'(NB)) bin_mem[w[16 +: LOGNB]] <= acc[16] ? 16'hffff : acc[15:0];
          jidx <= jidx + 1'b1;
        end
      end
      if (stream && spec_out.woe) begin
        bin_mem[oidx[LOGNB-1:0]] <= '0;
        oidx <= oidx + 1'b1;
        if (oidx == (LOGNB+1)'(NB - 1)) begin
          stream <= 1'b0; job_on <= 1'b0; job_cur <= 1'b0;
        end
      end
    end
  end
endmodule
