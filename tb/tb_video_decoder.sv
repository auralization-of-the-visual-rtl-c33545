// tb_video_decoder: sends a small frame of random YCrCb pixels and checks
// each HSV output against a floating-point conversion (BT.601 to RGB, then
// RGB to HSV on a 256-step hue circle), plus coordinates, sync pulses and
// the two-clock latency.  Tolerance: 3 steps (hue compared on the circle).
module tb_video_decoder;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic [7:0] y_in, cr_in, cb_in;
  logic pix_valid = 0, hsync_in = 0, vsync_in = 0;
  logic [7:0] hue, saturation, brightness;
  logic [10:0] pixel_x;
  logic [9:0] pixel_y;
  logic out_valid, hsync, vsync;

  video_decoder dut (.clk, .rst, .y_in, .cr_in, .cb_in, .pix_valid, .hsync_in, .vsync_in,
    .hue, .saturation, .brightness, .pixel_x, .pixel_y, .out_valid, .hsync, .vsync);

  int checks = 0, failures = 0;
  typedef struct { int h, s, v, x, y, hs, vs; } exp_t;
  exp_t q [$];
  int sent = 0;

  function automatic int clampr(input real v);
    int i;
    i = int'(v);
    return i < 0 ? 0 : i > 255 ? 255 : i;
  endfunction

  function automatic exp_t ref_hsv(input int yv, input int crv, input int cbv);
    real r, g, b, mx, mn, d, h;
    exp_t e;
    r = clampr(yv + 1.402 * (crv - 128));
    g = clampr(yv - 0.344 * (cbv - 128) - 0.714 * (crv - 128));
    b = clampr(yv + 1.772 * (cbv - 128));
    mx = r > g ? (r > b ? r : b) : (g > b ? g : b);
    mn = r < g ? (r < b ? r : b) : (g < b ? g : b);
    d = mx - mn;
    if (d == 0) h = 0;
    else if (mx == r) h = 256.0 / 6 * ((g - b) / d);
    else if (mx == g) h = 256.0 / 6 * (2 + (b - r) / d);
    else h = 256.0 / 6 * (4 + (r - g) / d);
    if (h < 0) h += 256;
    e.h = int'(h) % 256; e.v = int'(mx); e.s = (mx == 0) ? 0 : int'(255 * d / mx);
    return e;
  endfunction

  always_ff @(posedge clk) if (!rst && out_valid) begin
    exp_t e;
    int dh;
    e = q.pop_front();
    dh = (int'(hue) - e.h + 256) % 256; if (dh > 128) dh = 256 - dh;
    checks++;
    if (dh > 3 || saturation > e.s + 3 || saturation + 3 < e.s || brightness > e.v + 3 || brightness + 3 < e.v
        || pixel_x != e.x || pixel_y != e.y || hsync != e.hs || vsync != e.vs) begin
      failures++;
      if (failures < 10) $display("(%0d,%0d) got h%0d s%0d v%0d x%0d y%0d exp h%0d s%0d v%0d x%0d y%0d",
        e.x, e.y, hue, saturation, brightness, pixel_x, pixel_y, e.h, e.s, e.v, e.x, e.y);
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int fr = 0; fr < 2; fr++)
      for (int yy = 0; yy < 6; yy++)
        for (int xx = 0; xx < 40; xx++) begin
          exp_t e;
          @(negedge clk);
          y_in = 8'($urandom_range(16, 235)); cr_in = 8'($urandom_range(16, 240)); cb_in = 8'($urandom_range(16, 240));
          pix_valid = ($urandom_range(0, 4) != 0) || xx == 0;
          if (!pix_valid) begin xx--; continue; end
          hsync_in = (xx == 0); vsync_in = (xx == 0 && yy == 0);
          e = ref_hsv(y_in, cr_in, cb_in);
          e.x = xx; e.y = yy; e.hs = hsync_in; e.vs = vsync_in;
          q.push_back(e);
          sent++;
          @(posedge clk); #1;
          pix_valid = 0;
        end
    repeat (5) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("%0d outputs missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
