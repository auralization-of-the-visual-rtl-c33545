// video_decoder: turns the decoded camera stream into HSV pixels with
// coordinates.
//
// Input is one YCrCb pixel per pix_valid (8 bits per component, as
// delivered by the NTSC decoder chip interface) with a line-start (hsync)
// and frame-start (vsync) pulse.  Stage 1 converts to RGB with the ITU-R
// BT.601 equations in Q8 fixed point, clamped to 0..255.  Stage 2 converts
// to hue/saturation/brightness: brightness = max(R,G,B); saturation =
// 255*(max-min)/max; hue on a 0..255 circle, 43 steps per sixth of the
// circle (red = 0, green = 85, blue = 171).  pixel_x/pixel_y count pixels in
// the line and lines in the frame.  Latency is two clocks; hsync/vsync are
// delayed to match.  The outputs and their widths follow the design
// description; the conversion equations and the counting scheme are this
// design's own.
module video_decoder #(
  parameter int unsigned XW = 11,
  parameter int unsigned YW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [7:0]    y_in,
  input  logic [7:0]    cr_in,
  input  logic [7:0]    cb_in,
  input  logic          pix_valid,
  input  logic          hsync_in,   // first pixel of a line
  input  logic          vsync_in,   // first pixel of a frame
  output logic [7:0]    hue,
  output logic [7:0]    saturation,
  output logic [7:0]    brightness,
  output logic [XW-1:0] pixel_x,
  output logic [YW-1:0] pixel_y,
  output logic          out_valid,
  output logic          hsync,
  output logic          vsync
);
  logic [XW-1:0] xc, x1;
  logic [YW-1:0] yc, y1;
  logic [7:0]    r1, g1, b1;
  logic          v1, hs1, vs1;

  function automatic logic [7:0] clamp8(input logic signed [19:0] v);
    if (v < 0)          return 8'd0;
    else if (v > 20'sd255) return 8'd255;
    else                return v[7:0];
  endfunction

  logic signed [19:0] yy, cr, cb;
  always_comb begin
    yy = 20'(y_in) <<< 8;
    cr = 20'(cr_in) - 20'sd128;
    cb = 20'(cb_in) - 20'sd128;
  end

  // pixel coordinates of the incoming pixel
  logic [XW-1:0] xin;
  logic [YW-1:0] yin;
  always_comb begin
    xin = hsync_in || vsync_in ? '0 : xc;
    yin = vsync_in ? '0 : (hsync_in ? yc + 1'b1 : yc);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      xc <= '0; yc <= '0; v1 <= 1'b0; hs1 <= 1'b0; vs1 <= 1'b0;
    end else begin
      v1 <= pix_valid;
      hs1 <= pix_valid && hsync_in;
      vs1 <= pix_valid && vsync_in;
      if (pix_valid) begin
        xc <= xin + 1'b1;
        yc <= yin;
        x1 <= xin;
        y1 <= yin;
        r1 <= clamp8((yy + 20'sd359 * cr + 20'sd128) >>> 8);
        g1 <= clamp8((yy - 20'sd88 * cb - 20'sd183 * cr + 20'sd128) >>> 8);
        b1 <= clamp8((yy + 20'sd454 * cb + 20'sd128) >>> 8);
      end
    end
  end

  logic [7:0]  mx, mn, dl;
  logic signed [15:0] num;
  logic [15:0] hoff;
  logic [7:0]  h2, s2;
  always_comb begin
    mx = (r1 >= g1 && r1 >= b1) ? r1 : (g1 >= b1) ? g1 : b1;
    mn = (r1 <= g1 && r1 <= b1) ? r1 : (g1 <= b1) ? g1 : b1;
    dl = mx - mn;
    if (mx == r1)      begin num = 16'sd43 * (16'(g1) - 16'(b1)); hoff = 16'd0;   end
    else if (mx == g1) begin num = 16'sd43 * (16'(b1) - 16'(r1)); hoff = 16'd85;  end
    else               begin num = 16'sd43 * (16'(r1) - 16'(g1)); hoff = 16'd171; end
    h2 = (dl == 0) ? 8'd0 : 8'(hoff + 16'(num / $signed({8'd0, dl})));
    s2 = (mx == 0) ? 8'd0 : 8'((16'd255 * 16'(dl)) / 16'(mx));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; hsync <= 1'b0; vsync <= 1'b0;
      hue <= '0; saturation <= '0; brightness <= '0; pixel_x <= '0; pixel_y <= '0;
    end else begin
      out_valid <= v1;
      hsync <= hs1;
      vsync <= vs1;
      if (v1) begin
        hue <= h2; saturation <= s2; brightness <= mx;
        pixel_x <= x1; pixel_y <= y1;
      end
    end
  end
endmodule
