// tb_csa: streams two 16 x 8 frames (2 x 2 cells, window 8) whose cells
// have clustered hues, and checks every {address, hue, saturation,
// brightness} packet against a reference: circular window search, first
// maximum wins, window means by integer division.
module tb_csa;
  localparam int H = 16, V = 8, NV = 2, NH = 2, WIN = 8;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  pkt_bus #(.W(8)) ob (.clk, .rst);
  logic [7:0] hue, sat, bri;
  logic [10:0] px;
  logic [9:0] py;
  logic pv = 0, busy, overrun;

  csa #(.H_PIX(H), .V_PIX(V), .NV(NV), .NH(NH), .WIN(WIN)) dut (
    .clk, .rst, .hue, .saturation(sat), .brightness(bri), .pixel_x(px), .pixel_y(py),
    .pix_valid(pv), .out_bus(ob), .busy, .overrun);

  int checks = 0, failures = 0;
  int c [NV][256];
  int s [NV][256];
  int b [NV][256];
  int expq [$];
  int got [$];
  int n_overrun = 0;
  always_ff @(posedge clk) if (!rst && overrun) n_overrun++;
  assign ob.woe = 1'b1;
  always_ff @(posedge clk) if (!rst && ob.re && ob.woe) got.push_back(int'(ob.data));

  task automatic model_band(input int hb);
    for (int v = 0; v < NV; v++) begin
      int best, bend, run, ss, bs, cs;
      best = 0; bend = WIN - 1;
      for (int e = WIN - 1; e < WIN - 1 + 256; e++) begin
        run = 0;
        for (int k = e - WIN + 1; k <= e; k++) run += c[v][k % 256];
        if (run > best) begin best = run; bend = e % 256; end
      end
      ss = 0; bs = 0; cs = 0;
      for (int k = bend - WIN + 1; k <= bend; k++) begin
        ss += s[v][(k + 256) % 256]; bs += b[v][(k + 256) % 256]; cs += c[v][(k + 256) % 256];
      end
      expq.push_back(hb * NV + v);
      expq.push_back((bend - WIN / 2 + 1 + 256) % 256);
      expq.push_back(cs == 0 ? 0 : ss / cs);
      expq.push_back(cs == 0 ? 0 : bs / cs);
      for (int k = 0; k < 256; k++) begin c[v][k] = 0; s[v][k] = 0; b[v][k] = 0; end
    end
  endtask

  task automatic pixel(input int x, input int y, input int h);
    @(negedge clk);
    pv = 1; px = 11'(x); py = 10'(y); hue = 8'(h);
    sat = 8'($urandom_range(0, 255)); bri = 8'($urandom_range(0, 255));
    c[x / (H / NV)][h]++; s[x / (H / NV)][h] += sat; b[x / (H / NV)][h] += bri;
    @(negedge clk); pv = 0;
  endtask

  initial begin
    foreach (c[v, k]) begin c[v][k] = 0; s[v][k] = 0; b[v][k] = 0; end
    repeat (3) @(posedge clk); rst = 0;
    wait (!busy);
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < V; y++) begin
        if (y % (V / NH) == 0) begin
          if (y != 0 || f != 0) model_band((y == 0) ? NH - 1 : y / (V / NH) - 1);
          wait (!busy);
        end
        for (int x = 0; x < H; x++) begin
          int centre;
          centre = (f * 97 + y * 31 + (x / (H / NV)) * 150 + 250) % 256;   // cluster wraps at 0 for some cells
          if ($urandom_range(0, 3) == 0) pixel(x, y, $urandom_range(0, 255));
          else pixel(x, y, (centre + $urandom_range(0, 6) - 3 + 256) % 256);
        end
      end
    model_band(NH - 1);
    wait (!busy);
    pixel(0, 0, 0);                  // next frame starts: last band is analysed
    wait (!busy); repeat (10) @(posedge clk);
    checks++;
    if (got.size() != expq.size()) begin failures++; $display("words %0d exp %0d", got.size(), expq.size()); end
    for (int i = 0; i < expq.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != expq[i]) begin failures++; $display("word %0d (cell %0d) got %0d exp %0d", i, i / 4, got[i], expq[i]); end
    end
    checks++; if (n_overrun != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
