// fd_fx: frequency-domain effects between the sequencer and the IFFT.
//
// Works on the streamed spectrum (one unsigned 16-bit coefficient per bin,
// 2^LOGNB bins per packet, bin 0 first) and passes it on unchanged in
// format, so it is transparent to both neighbours.
//   Filter/EQ: each bin is multiplied by a response H in 0..255 (255 = unity,
//   applied as x*(H+1)/256).  The response is a 256-entry table indexed by the
//   top 8 bits of the bin number, written through resp_we/resp_addr/resp_data
//   and reset to all-pass.
//   Reverb: an FIR across time.  The filtered spectra of the last R packets
//   are kept; each output bin adds sum_j c_j * past_j[bin] with c_j =
//   (decay/256)^j, so older spectra fade.  Only packets actually seen count.
// Timing: one bin per clock, one clock of latency, full back-pressure
// through a single output register.  The multiply-by-response filter, the FIR
// over saved spectra with decaying weights and the filter lookup tables
// follow the design description; the 256-entry response table, the
// coefficient law and R = 4 are this design's own choices.
module fd_fx #(
  parameter int unsigned LOGNB = 15,
  parameter int unsigned R     = 4
) (
  input  logic       clk,
  input  logic       rst,
  pkt_bus.rx         in_bus,    // W = 16
  pkt_bus.tx         out_bus,   // W = 16
  input  logic       filter_en,
  input  logic       reverb_en,
  input  logic [7:0] decay,
  input  logic       resp_we,
  input  logic [7:0] resp_addr,
  input  logic [7:0] resp_data
);
  localparam int unsigned NB = 1 << LOGNB;
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1;

  logic [7:0]  resp [256];
  logic [15:0] hist [R][NB];
  logic [RW-1:0] hp;             // slot the current packet is written to
  logic [RW:0]   nhist;          // packets held
  logic [LOGNB-1:0] k;
  logic          in_pkt;
  logic          vld;
  logic [15:0]   oreg;
  logic          ostart;
  logic [7:0]    hidx;
  logic [15:0]   coef [R+1];     // c_j in Q8 (256 = 1)

  // Response table: reset sweeps it to all-pass.
  logic       rclr;
  always_ff @(posedge clk) begin
    if (rst) begin
      rclr <= 1'b1; hidx <= '0;
    end else if (rclr) begin
      resp[hidx] <= 8'hff;
      hidx <= hidx + 1'b1;
      if (hidx == 8'hff) rclr <= 1'b0;
    end else if (resp_we) begin
      resp[resp_addr] <= resp_data;
    end
  end

  always_comb begin
    coef[0] = 16'd256;
    for (int j = 1; j <= R; j++) coef[j] = 16'((32'(coef[j-1]) * 32'(decay)) >> 8);
  end

  logic [LOGNB-1:0] kk;
  logic [23:0] filt;
  logic [15:0] dry;
  logic [31:0] wet;
  logic [31:0] sum;

  always_comb begin
    kk   = in_bus.start ? '0 : k;
    filt = 24'(in_bus.data) * 24'({1'b0, resp[kk[LOGNB-1 -: 8]]} + 9'd1);
    dry  = filter_en ? filt[23:8] : in_bus.data;
    wet  = '0;
    for (int j = 1; j <= R; j++)
      if (reverb_en && nhist >= (RW+1)'(j))
        wet += 32'(hist[RW'(hp - RW'(j))][kk]) * 32'(coef[j]);
    sum  = 32'(dry) + (wet >> 8);
  end

  assign in_bus.woe    = !rclr && (!vld || out_bus.woe);
  assign out_bus.re    = vld;
  assign out_bus.data  = oreg;
  assign out_bus.start = ostart;

  always_ff @(posedge clk) begin
    if (rst) begin
      vld <= 1'b0; k <= '0; in_pkt <= 1'b0; hp <= '0; nhist <= '0; ostart <= 1'b0; oreg <= '0;
    end else begin
      if (out_bus.re && out_bus.woe) vld <= 1'b0;
      if (in_bus.re && in_bus.woe && (in_bus.start || in_pkt)) begin
        vld    <= 1'b1;
        ostart <= in_bus.start;
        oreg   <= (sum > 32'hffff) ? 16'hffff : sum[15:0];
        hist[hp][kk] <= dry;
        k      <= kk + 1'b1;
        in_pkt <= 1'b1;
        if (kk == LOGNB'(NB - 1)) begin
          in_pkt <= 1'b0;
          hp     <= (hp == RW'(R - 1)) ? '0 : hp + 1'b1;
          if (nhist != (RW+1)'(R)) nhist <= nhist + 1'b1;
        end
      end
    end
  end
endmodule
