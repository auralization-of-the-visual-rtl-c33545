// tb_sprite_detect: moves a red square across a 64x48 frame (left to right,
// then back, then away), mixing in decoy pixels that fail one threshold
// each, and compares every rule packet with a model of centroid, crossing,
// box and entry rules.  The receiver stalls at random.
module tb_sprite_detect;
  localparam int H = 64, V = 48;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  pkt_bus #(.W(8)) ob (.clk, .rst);
  logic [7:0] hue = 0, sat = 0, bri = 0;
  logic [10:0] px = 0;
  logic [9:0] py = 0;
  logic pv = 0, vs = 0;
  logic [7:0] n_dropped;

  sprite_detect #(.H_PIX(H), .V_PIX(V)) dut (.clk, .rst, .hue, .saturation(sat), .brightness(bri),
    .pixel_x(px), .pixel_y(py), .pix_valid(pv), .vsync(vs), .out_bus(ob), .n_dropped);

  int checks = 0, failures = 0;
  int got [$];
  always_ff @(posedge clk) ob.woe <= ($urandom_range(0, 3) != 0);
  always_ff @(posedge clk) if (!rst && ob.re && ob.woe) got.push_back({ob.start, ob.data});

  // object: square of side sz at (ox, oy); sz = 0 means absent
  task automatic frame(int ox, int oy, int sz);
    for (int y = 0; y < V; y++)
      for (int x = 0; x < H; x++) begin
        bit in;
        in = sz > 0 && x >= ox && x < ox + sz && y >= oy && y < oy + sz;
        @(negedge clk);
        pv = 1; vs = (x == 0 && y == 0); px = 11'(x); py = 10'(y);
        if (in) begin hue = 8'($urandom_range(0, 12) - (x % 2) * 12); sat = 200; bri = 220; end
        else case ($urandom_range(0, 3))
          0: begin hue = 8'd60; sat = 200; bri = 220; end  // wrong hue
          1: begin hue = 8'd0;  sat = 50;  bri = 220; end  // pale
          2: begin hue = 8'd250; sat = 200; bri = 100; end // dark
          default: begin hue = 8'd128; sat = 0; bri = 0; end
        endcase
      end
    @(negedge clk); pv = 0; vs = 0;
  endtask

  int pcx = 0, ppres = 0, pin = 0;
  task automatic expect_rules(int ox, int oy, int sz);
    int cnt, cx, cy, pres, inb, e [4];
    cnt = sz * sz;
    cx = cnt ? ((ox * sz + sz * (sz - 1) / 2) * sz) / cnt : 0;
    cy = cnt ? ((oy * sz + sz * (sz - 1) / 2) * sz) / cnt : 0;
    pres = cnt >= 4;
    inb = pres && cx >= H / 4 && cx <= 3 * H / 4 && cy >= V / 4 && cy <= 3 * V / 4;
    e[0] = (ppres && pres && pcx < H / 2 && cx >= H / 2) ? cx - pcx : 0;
    e[1] = (ppres && pres && pcx >= H / 2 && cx < H / 2) ? pcx - cx : 0;
    e[2] = inb ? cnt : 0;
    e[3] = (inb && !pin) ? 1 : 0;
    ppres = pres; pin = inb; pcx = cx;
    wait (got.size() == 12);
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (got[3*r] != (256 | r) || got[3*r+1] != (e[r] >> 8) || got[3*r+2] != (e[r] & 255)) begin
        failures++;
        $display("obj (%0d,%0d,%0d) rule %0d: got %h %h %h exp %0d", ox, oy, sz, r,
                 got[3*r], got[3*r+1], got[3*r+2], e[r]);
      end
    end
    got.delete();
  endtask

  int fx [8] = '{2, 20, 28, 40, 50, 30, 10, 0};
  int fz [8] = '{6, 6, 5, 6, 6, 4, 6, 0};
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int f = 0; f < 8; f++) begin
      frame(fx[f], 18, fz[f]);
      if (f > 0) expect_rules(fx[f-1], 18, fz[f-1]);
      else begin           // the first boundary reports an empty frame
        checks++;
        if (got.size() != 12) failures++;
        got.delete();
      end
    end
    // close the last frame with one boundary pixel
    @(negedge clk); pv = 1; vs = 1; px = 0; py = 0; hue = 128; sat = 0; bri = 0;
    @(negedge clk); pv = 0; vs = 0;
    expect_rules(fx[7], 18, fz[7]);
    checks++;
    if (n_dropped != 0) begin failures++; $display("dropped %0d", n_dropped); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
