// audio_encoder: AC'97 link driver for the stereo output.
//
// Runs on the system clock and samples the codec's 12.288 MHz bit clock
// (two-flop synchroniser, edge detect), so the system clock must be at
// least about four times faster.  Each AC'97 frame is 256 bit clocks:
// SYNC high for the 16-bit tag slot, then twelve 20-bit slots.  Bits change
// on rising bit-clock edges, MSB first, as the codec samples on falling
// edges.  Slot 3/4 carry the latched left/right samples (16 bits, four
// zero LSBs).  Slots 1/2 carry register writes, alternating between master
// volume (0x02) and PCM-out volume (0x18), both set from the 5-bit volume
// (31 = loudest, attenuation 31 - volume on both sides).  One frame is
// 48 kHz; `ready` pulses once per frame when the next samples are latched,
// which paces the whole audio chain.  Samples offered with `re` are held
// until then.  reset_n is held low for RST_CYC system clocks after reset.
// The AC'97 interface, 16-bit stereo at 48 kHz and the volume input follow
// the design description; the register choice and the timing details are
// this design's own reading of the AC'97 link.
module audio_encoder #(
  parameter int unsigned RST_CYC = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] left,
  input  logic [15:0] right,
  input  logic        re,
  input  logic [4:0]  volume,
  output logic        ready,
  // AC'97 link
  input  logic        ac97_bit_clk,
  input  logic        ac97_sdata_in,
  output logic        ac97_sync,
  output logic        ac97_sdata_out,
  output logic        ac97_reset_n
);
  logic [2:0]  bsync;
  logic        rise;
  logic [7:0]  bitn;                 // bit of the frame about to be sent
  logic [15:0] l_hold, r_hold, l_cur, r_cur;
  logic        cmd_sel;
  logic [7:0]  rcnt;
  logic [4:0]  att;
  logic [19:0] slot1, slot2;
  logic        nb;

  assign rise = bsync[1] && !bsync[2];
  assign att  = 5'd31 - volume;

  always_comb begin
    slot1 = {1'b0, cmd_sel ? 7'h18 : 7'h02, 12'h000};
    slot2 = {3'b000, att, 3'b000, att, 4'h0};  // same attenuation for both registers
    if (bitn < 8'd16) begin
      // tag: frame valid, slots 1-4 valid
      nb = (bitn <= 8'd4);
    end else if (bitn < 8'd36) nb = slot1[5'(8'd35 - bitn)];
    else if (bitn < 8'd56)     nb = slot2[5'(8'd55 - bitn)];
    else if (bitn < 8'd76)     nb = (bitn < 8'd72) ? l_cur[4'(8'd71 - bitn)] : 1'b0;
    else if (bitn < 8'd96)     nb = (bitn < 8'd92) ? r_cur[4'(8'd91 - bitn)] : 1'b0;
    else                       nb = 1'b0;
  end

  always_ff @(posedge clk) begin
    ready <= 1'b0;
    if (rst) begin
      bsync <= '0; bitn <= '0; l_hold <= '0; r_hold <= '0; l_cur <= '0; r_cur <= '0;
      cmd_sel <= 1'b0; rcnt <= '0; ac97_reset_n <= 1'b0; ac97_sync <= 1'b0;
      ac97_sdata_out <= 1'b0;
    end else begin
      bsync <= {bsync[1:0], ac97_bit_clk};
      if (re) begin l_hold <= left; r_hold <= right; end
      if (!ac97_reset_n) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == 8'(RST_CYC - 1)) ac97_reset_n <= 1'b1;
      end else if (rise) begin
        ac97_sdata_out <= nb;
        ac97_sync      <= (bitn < 8'd16);
        bitn           <= bitn + 1'b1;
        if (bitn == 8'd255) begin
          l_cur   <= re ? left : l_hold;
          r_cur   <= re ? right : r_hold;
          cmd_sel <= !cmd_sel;
          ready   <= 1'b1;
        end
      end
    end
  end
endmodule
