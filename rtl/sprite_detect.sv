// sprite_detect: finds one coloured object (such as an LED) in each frame and
// turns its position and motion into rule packets.
//
// A pixel belongs to the object when its hue is within HUE_TOL of HUE0
// (mod 256), its saturation is at least SAT_MIN and its brightness at least
// BRI_MIN.  Over a frame the block counts matching pixels and sums their x
// and y.  When the first pixel of the next frame arrives (vsync with
// pix_valid) the totals are latched and two 11-cycle restoring dividers give
// the centroid; the object is present when at least MIN_PIX pixels matched.
// Velocity is the change of centroid from the previous frame.  Four rules
// are then evaluated and sent as 3-word packets {rule, value[13:8],
// value[7:0]} on out_bus:
//   rule 0  the object crossed x = LINE_X left to right; value = x speed
//   rule 1  the object crossed x = LINE_X right to left; value = x speed
//   rule 2  the object is inside the box AX0..AX1 x AY0..AY1;
//           value = matching pixel count (saturated)
//   rule 3  the object entered the box this frame; value = 1
// A value of 0 means the rule did not fire.  All four packets are sent once
// per frame, about 60 clocks after the frame boundary; the frame time is
// far longer, so the block never loses a frame unless out_bus stalls for a
// whole frame (then that frame's result is dropped and counted in
// n_dropped).  The document's detector finds sprites with a
// difference-of-Gaussians colour filter and can track several objects; this
// block is a simplified single-object colour-threshold tracker, which is
// this design's own choice, as are the rule set, thresholds and packet
// layout.  Pixel inputs are the video_decoder outputs.
module sprite_detect #(
  parameter int unsigned H_PIX   = 1024,
  parameter int unsigned V_PIX   = 768,
  parameter logic [7:0]  HUE0    = 8'd0,     // red LED
  parameter logic [7:0]  HUE_TOL = 8'd12,
  parameter logic [7:0]  SAT_MIN = 8'd96,
  parameter logic [7:0]  BRI_MIN = 8'd160,
  parameter int unsigned MIN_PIX = 4,
  parameter int unsigned LINE_X  = H_PIX / 2,
  parameter int unsigned AX0 = H_PIX / 4, parameter int unsigned AX1 = 3 * H_PIX / 4,
  parameter int unsigned AY0 = V_PIX / 4, parameter int unsigned AY1 = 3 * V_PIX / 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  hue,
  input  logic [7:0]  saturation,
  input  logic [7:0]  brightness,
  input  logic [10:0] pixel_x,
  input  logic [9:0]  pixel_y,
  input  logic        pix_valid,
  input  logic        vsync,       // with pix_valid: first pixel of a frame
  pkt_bus.tx          out_bus,     // W = 8, 3-word packets
  output logic [7:0]  n_dropped
);
  localparam int unsigned CNTW = $clog2(H_PIX * V_PIX + 1);
  localparam int unsigned SUMW = CNTW + 11;

  typedef enum logic [2:0] {S_ACC, S_DIVX, S_DIVY, S_RULE, S_SEND} state_e;
  state_e st;

  logic [CNTW-1:0] cnt, f_cnt;
  logic [SUMW-1:0] sx, sy, f_sy, rem;
  logic [10:0]     q, cx, cy, pcx;
  logic [3:0]      bit_i;
  logic            ppresent, pinbox;
  logic [13:0]     rv [4];
  logic [1:0]      ridx, widx;

  logic [7:0] hd;
  logic       match;
  assign hd    = hue - HUE0;
  assign match = pix_valid && (hd <= HUE_TOL || hd >= 8'(-HUE_TOL)) &&
                 saturation >= SAT_MIN && brightness >= BRI_MIN;

  // one restoring-division step on rem / f_cnt
  logic [SUMW-1:0] dsh;
  assign dsh = SUMW'(f_cnt) << bit_i;

  logic present, inbox;
  assign present = f_cnt >= CNTW'(MIN_PIX);
  assign inbox   = present && 32'(cx) >= AX0 && 32'(cx) <= AX1 && 32'(cy) >= AY0 && 32'(cy) <= AY1;

  assign out_bus.re    = (st == S_SEND);
  assign out_bus.start = (widx == 2'd0);
  always_comb
    unique case (widx)
      2'd0:    out_bus.data = {6'd0, ridx};
      2'd1:    out_bus.data = {2'b00, rv[ridx][13:8]};
      default: out_bus.data = rv[ridx][7:0];
    endcase

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_ACC; cnt <= '0; sx <= '0; sy <= '0; f_cnt <= '0; f_sy <= '0;
      rem <= '0; q <= '0; cx <= '0; cy <= '0; pcx <= '0; bit_i <= '0;
      ppresent <= 1'b0; pinbox <= 1'b0; ridx <= '0; widx <= '0; n_dropped <= '0;
      for (int i = 0; i < 4; i++) rv[i] <= '0;
    end else begin
      // accumulation runs all the time; a frame boundary restarts it
      if (pix_valid && vsync) begin
        cnt <= CNTW'(match);
        sx  <= match ? SUMW'(pixel_x) : '0;
        sy  <= match ? SUMW'(pixel_y) : '0;
        if (st == S_ACC) begin
          f_cnt <= cnt; f_sy <= sy;
          rem <= sx; q <= '0; bit_i <= 4'd10; st <= S_DIVX;
        end else
          n_dropped <= n_dropped + 1'b1;
      end else if (match) begin
        cnt <= cnt + 1'b1;
        sx  <= sx + SUMW'(pixel_x);
        sy  <= sy + SUMW'(pixel_y);
      end

      unique case (st)
        S_DIVX, S_DIVY: begin
          logic [10:0] qn;
          qn = q;
          if (f_cnt != '0 && rem >= dsh) begin
            rem <= rem - dsh; qn[bit_i] = 1'b1;
          end
          q <= qn;
          bit_i <= bit_i - 1'b1;
          if (bit_i == 4'd0) begin
            q <= '0; bit_i <= 4'd10;
            if (st == S_DIVX) begin cx <= qn; rem <= f_sy; st <= S_DIVY; end
            else begin cy <= qn; st <= S_RULE; end
          end
        end
        S_RULE: begin
          rv[0] <= (ppresent && present && 32'(pcx) < LINE_X && 32'(cx) >= LINE_X) ? 14'(cx - pcx) : '0;
          rv[1] <= (ppresent && present && 32'(pcx) >= LINE_X && 32'(cx) < LINE_X) ? 14'(pcx - cx) : '0;
          rv[2] <= !inbox ? '0 : (f_cnt > CNTW'(16383)) ? 14'd16383 : 14'(f_cnt);
          rv[3] <= (inbox && !pinbox) ? 14'd1 : '0;
          ppresent <= present; pinbox <= inbox; pcx <= cx;
          ridx <= '0; widx <= '0; st <= S_SEND;
        end
        S_SEND: if (out_bus.woe) begin
          if (widx == 2'd2) begin
            widx <= '0; ridx <= ridx + 1'b1;
            if (ridx == 2'd3) st <= S_ACC;
          end else widx <= widx + 1'b1;
        end
        default: ;
      endcase
    end
  end
endmodule
