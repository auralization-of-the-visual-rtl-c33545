// csa: chromatic spectrographic analysis - the dominant colour of every
// cell of the image grid.
//
// The frame is cut into NV vertical bands and NH horizontal bands.  For each
// cell three 256-bin lists indexed by hue are accumulated over its pixels:
// a pixel count, the sum of saturation and the sum of brightness.  When the
// stream moves into the next horizontal band, the finished band's NV cells
// are analysed one after another:
//   1. a window of WIN bins slides once around the (circular) hue list,
//      keeping a running count; the first window with the highest count wins
//      and its centre is the peak hue;
//   2. saturation and brightness sums and the count are added over that
//      window and divided, giving the mean saturation and brightness of the
//      peak colour;
//   3. a four-byte packet {cell address, hue, saturation, brightness} is
//      sent (address = hband*NV + vband), and the cell's lists are cleared.
// Lists are double-buffered by band parity, so accumulation of one band runs
// while the previous one is analysed.  Analysis takes about 256 + 2*WIN +
// 256 + 4 clocks per cell; a band must last longer than NV times that (a
// 1024 x 48 pixel band does, by far).  The last band of a frame is
// analysed when the next frame starts.  A reset sweep clears all lists.
// The lists, their widths and the window search follow the design
// description; the grid size NV = 16, the fixed window width, double
// buffering and the cell address layout are this design's own choices.
module csa #(
  parameter int unsigned H_PIX = 1024,
  parameter int unsigned V_PIX = 768,
  parameter int unsigned NV    = 16,
  parameter int unsigned NH    = 16,
  parameter int unsigned WIN   = 32,
  parameter int unsigned CW    = 20,
  parameter int unsigned SW    = 28
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  hue,
  input  logic [7:0]  saturation,
  input  logic [7:0]  brightness,
  input  logic [10:0] pixel_x,
  input  logic [9:0]  pixel_y,
  input  logic        pix_valid,
  pkt_bus.tx          out_bus,     // W = 8, 4-word packets
  output logic        busy,
  output logic        overrun      // pulse: a band ended while one was still being analysed
);
  localparam int unsigned VW = (NV > 1) ? $clog2(NV) : 1;
  localparam int unsigned HW = (NH > 1) ? $clog2(NH) : 1;
  localparam int unsigned XPB = H_PIX / NV;
  localparam int unsigned YPB = V_PIX / NH;
  localparam int unsigned IW = $clog2(256 + WIN);
  localparam int unsigned WW = $clog2(WIN + 1);

  logic [CW-1:0] cnt [2][NV][256];
  logic [SW-1:0] sm  [2][NV][256];
  logic [SW-1:0] bm  [2][NV][256];

  // ---------------- accumulation ----------------
  logic [VW-1:0] vb;
  logic [HW-1:0] hb, cur_h;
  logic          dirty, trig;
  always_comb begin
    vb = VW'(32'(pixel_x) / XPB);
    hb = HW'(32'(pixel_y) / YPB);
    trig = pix_valid && dirty && (hb != cur_h);
  end

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_SCAN, S_AVG, S_DIV, S_SEND, S_CLEAR} state_e;
  state_e st;
  logic          abank;
  logic [HW-1:0] ah;
  logic [VW-1:0] av;
  logic [IW-1:0] i;
  logic [CW+WW-1:0] run, best;
  logic [7:0]    bend;        // last bin of the best window
  logic [SW+WW-1:0] ssum, bsum;
  logic [CW+WW-1:0] csum;
  logic [7:0]    sat_pk, bri_pk, hue_pk;
  logic [1:0]    widx;
  logic [12:0]   ci;          // reset sweep index

  logic [7:0]    bi_new, bi_old;
  logic [CW+WW-1:0] run_n;
  always_comb begin
    bi_new = i[7:0];
    bi_old = 8'(i - IW'(WIN));
    run_n  = run + (CW+WW)'(cnt[abank][av][bi_new])
                 - ((i >= IW'(WIN)) ? (CW+WW)'(cnt[abank][av][bi_old]) : '0);
  end

  assign busy = (st != S_IDLE);
  assign out_bus.re    = (st == S_SEND);
  assign out_bus.start = (widx == 2'd0);
  always_comb
    unique case (widx)
      2'd0: out_bus.data = 8'(32'(ah) * NV + 32'(av));
      2'd1: out_bus.data = hue_pk;
      2'd2: out_bus.data = sat_pk;
      default: out_bus.data = bri_pk;
    endcase

  always_ff @(posedge clk) begin
    overrun <= 1'b0;
    if (rst) begin
      st <= S_INIT; ci <= '0; dirty <= 1'b0; cur_h <= '0;
      abank <= 1'b0; ah <= '0; av <= '0; i <= '0; run <= '0; best <= '0; bend <= '0;
      ssum <= '0; bsum <= '0; csum <= '0; widx <= '0;
      sat_pk <= '0; bri_pk <= '0; hue_pk <= '0;
    end else if (st == S_INIT) begin
      cnt[ci[12]][VW'(ci[11:8])][ci[7:0]] <= '0;
      sm [ci[12]][VW'(ci[11:8])][ci[7:0]] <= '0;
      bm [ci[12]][VW'(ci[11:8])][ci[7:0]] <= '0;
      ci <= ci + 1'b1;
      if (ci == 13'h1fff) st <= S_IDLE;
    end else begin
      // accumulate the incoming pixel
      if (pix_valid) begin
        cnt[hb[0]][vb][hue] <= cnt[hb[0]][vb][hue] + 1'b1;
        sm [hb[0]][vb][hue] <= sm [hb[0]][vb][hue] + SW'(saturation);
        bm [hb[0]][vb][hue] <= bm [hb[0]][vb][hue] + SW'(brightness);
        dirty <= 1'b1;
        cur_h <= hb;
      end
      if (trig) begin
        if (st == S_IDLE) begin
          st <= S_SCAN; abank <= cur_h[0]; ah <= cur_h; av <= '0;
          i <= '0; run <= '0; best <= '0; bend <= 8'(WIN - 1);
        end else begin
          overrun <= 1'b1;
        end
      end
      unique case (st)
        S_SCAN: begin
          run <= run_n;
          if (i >= IW'(WIN - 1) && run_n > best) begin best <= run_n; bend <= i[7:0]; end
          i <= i + 1'b1;
          if (i == IW'(256 + WIN - 2)) begin
            st <= S_AVG; i <= '0; ssum <= '0; bsum <= '0; csum <= '0;
          end
        end
        S_AVG: begin
          logic [7:0] b;
          b = 8'(bend - 8'(WIN - 1) + i[7:0]);
          ssum <= ssum + (SW+WW)'(sm[abank][av][b]);
          bsum <= bsum + (SW+WW)'(bm[abank][av][b]);
          csum <= csum + (CW+WW)'(cnt[abank][av][b]);
          i <= i + 1'b1;
          if (i == IW'(WIN - 1)) st <= S_DIV;
        end
        S_DIV: begin
          hue_pk <= 8'(bend - 8'(WIN / 2) + 8'd1);
          sat_pk <= (csum == 0) ? 8'd0 : 8'(ssum / (SW+WW)'(csum));
          bri_pk <= (csum == 0) ? 8'd0 : 8'(bsum / (SW+WW)'(csum));
          widx <= '0;
          st <= S_SEND;
        end
        S_SEND: if (out_bus.woe) begin
          widx <= widx + 1'b1;
          if (widx == 2'd3) begin st <= S_CLEAR; i <= '0; end
        end
        S_CLEAR: begin
          cnt[abank][av][i[7:0]] <= '0;
          sm [abank][av][i[7:0]] <= '0;
          bm [abank][av][i[7:0]] <= '0;
          i <= i + 1'b1;
          if (i[7:0] == 8'hff) begin
            if (av == VW'(NV - 1)) st <= S_IDLE;
            else begin
              av <= av + 1'b1; st <= S_SCAN; i <= '0; run <= '0; best <= '0;
              bend <= 8'(WIN - 1);
            end
          end
        end
        default: ;
      endcase
    end
  end
endmodule
